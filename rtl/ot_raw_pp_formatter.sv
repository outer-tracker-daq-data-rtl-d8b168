// ot_raw_pp_formatter: word selector for the RAW-bank data block of one PP
// FPGA (233 words = 932 bytes).
//
// The block carries the untouched 36-byte fragments of the 24 OTIS chips on
// the PP's six links, then the 17-word event information section:
//   words   0..107  "even" OTIS (0 and 2) of all six links,
//   words 108..215  "odd"  OTIS (1 and 3),
//   words 216..232  event information W1..W17.
// Within a half, byte k (0..35) of the fragments takes three consecutive
// words, one per link pair (0,1), (2,3), (4,5).  Each word is
//   {link 2p+1 OTIS hi byte k, link 2p+1 OTIS lo byte k,
//    link 2p   OTIS hi byte k, link 2p   OTIS lo byte k}
// with (lo, hi) = (0, 2) in the even half and (1, 3) in the odd half, so the
// even links use bits 15..0 and the odd links bits 31..16.  This
// arrangement is the OT format's.  Byte k<4 of a fragment is byte k of the
// OTIS header (bits 8k+7..8k), which is this design's choice.
//
// Purely combinational: `idx` selects the word, `word` returns it.  The
// event builder walks idx from 0 to 232, one word per cycle.
module ot_raw_pp_formatter
  import ot_pkg::*;
(
  input  link_frag_t [LINKS_PER_PP-1:0] links,
  input  logic [EVINFO_WORDS-1:0][31:0] evinfo,  // W1 at index 0
  input  logic [7:0]                    idx,     // 0..232
  output logic [31:0]                   word
);

  function automatic logic [7:0] frag_byte(input otis_frag_t f, input logic [5:0] k);
    logic [31:0] h;
    h = f.hdr;
    if (k < 6'd4) return h[8*k[1:0] +: 8];
    else          return f.data[5'(k - 6'd4)];
  endfunction

  logic       odd_half;
  logic [6:0] r;        // index within a half
  logic [5:0] k;        // fragment byte
  logic [1:0] p;        // link pair
  logic [4:0] ei;       // event info word
  logic [1:0] olo, ohi;

  always_comb begin
    odd_half = (idx >= 8'(RAW_HALF_WORDS));
    r   = odd_half ? 7'(idx - 8'(RAW_HALF_WORDS)) : 7'(idx);
    k   = 6'(r / 7'd3);
    p   = 2'(r % 7'd3);
    olo = odd_half ? 2'd1 : 2'd0;
    ohi = odd_half ? 2'd3 : 2'd2;
    ei  = 5'(idx - 8'(2 * RAW_HALF_WORDS));
    if (idx >= 8'(2 * RAW_HALF_WORDS)) begin
      word = (ei < 5'(EVINFO_WORDS)) ? evinfo[ei] : 32'h0;
    end else begin
      word = {frag_byte(links[2*p+1][ohi], k), frag_byte(links[2*p+1][olo], k),
              frag_byte(links[2*p][ohi], k),   frag_byte(links[2*p][olo], k)};
    end
  end

endmodule
