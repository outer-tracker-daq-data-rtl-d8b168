// ot_error_pp_formatter: word selector for the error-bank section of one PP
// FPGA.
//
// The section interleaves the PP's event information words (W) with the
// fixed "E" words, in this order:
//   W1, W2, E1, W3, E2, [W4..W17], E3, E4, [E5]
//   E1 = {processed bytes of this PP, 0x0000}
//   E2 = {0x0038 if the PP is enabled and its event part has an error,
//         else 0x0000, 0x8E00};  W4..W17 are present only when it is 0x0038
//   E3 = {processed bytes of this PP, 0x8E01}
//   E4 = 0x00008E02
//   E5 = {0x03A4 if the PP is enabled else 0x0000, 0x8E03}, present only
//        when the event carries a RAW bank.
// A section is therefore 7, 8, 21 or 22 words long (`n_words`).  The word
// order and E values are the OT format's; E1 and E3 carry the bytes of this
// PP's GOL data blocks, which is this design's reading of "length of the
// processed bank in this PP FPGA".
//
// Purely combinational: `idx` (0..n_words-1) selects the word.
module ot_error_pp_formatter
  import ot_pkg::*;
(
  input  logic [EVINFO_WORDS-1:0][31:0] evinfo,    // W1 at index 0
  input  logic                          pp_en,
  input  logic                          pp_error,
  input  logic [15:0]                   proc_bytes,
  input  logic                          raw_bank,
  input  logic [4:0]                    idx,
  output logic [31:0]                   word,
  output logic [4:0]                    n_words
);

  logic       with_info;
  logic [4:0] tail;   // index of E3

  always_comb begin
    with_info = pp_en & pp_error;
    tail      = with_info ? 5'd19 : 5'd5;
    n_words   = tail + 5'd2 + 5'(raw_bank);
    word      = 32'h0;
    if (idx == 5'd0)            word = evinfo[0];
    else if (idx == 5'd1)       word = evinfo[1];
    else if (idx == 5'd2)       word = {proc_bytes, 16'h0000};
    else if (idx == 5'd3)       word = evinfo[2];
    else if (idx == 5'd4)       word = {with_info ? INFO_LEN_BYTES : 16'h0000, E2_CONST};
    else if (idx < tail)        word = evinfo[idx - 5'd2];     // W4..W17
    else if (idx == tail)       word = {proc_bytes, E3_CONST};
    else if (idx == tail + 5'd1) word = E4_CONST;
    else if (idx == tail + 5'd2) word = {pp_en ? RAW_PP_BYTES : 16'h0000, E5_CONST};
  end

endmodule
