// ot_gol_processor: builds the GOL data block of one optical link for the
// processed bank.
//
// A block is one GOL header word followed by the link's hit data:
//   * zero-suppress mode: one 16-bit word per hit, {1, OTIS ID[1:0],
//     channel[4:0], drift time[7:0]}, two hits per 32-bit word, the first
//     hit of a pair in bits 15..0; an odd hit count leaves bits 31..16 of the
//     last word zero (padding to a 32-bit boundary);
//   * hitmap mode: four words, word k holding the 32 hit flags of OTIS k
//     (bit c = channel c).
// No data words follow the header when the link has no hit.  The GOL header
// is {hit count[7:0], optical ok, mode (1 = zero-suppress), OTIS3..OTIS0
// status[2:0], GOL ID[9:0]}.  These layouts are those of the OT format; the
// order of hits (straw ID ascending, OTIS 0 channel 0 first) and the
// placement of the first hit of a pair in the low half are this design's
// choices.
//
// Interface: a `start` pulse while `busy` is low captures the fragment and
// the per-link settings.  The block is then streamed on o_valid/o_data with
// o_last on its final word, advancing on o_ready.  Two lowest set hit flags
// are found per cycle, so a zero-suppressed block leaves at one word per
// cycle; the header follows `start` by one cycle.
module ot_gol_processor
  import ot_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  link_frag_t  frag,
  input  logic        zs_mode,
  input  logic [9:0]  gol_id,
  input  logic        opt_ok,
  output logic        busy,
  output logic        o_valid,
  output logic [31:0] o_data,
  output logic        o_last,
  input  logic        o_ready
);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_DATA} state_t;
  state_t state;

  logic [CH_PER_LINK-1:0]      rem;      // hits still to send (ZS mode)
  logic [CH_PER_LINK-1:0][7:0] drift;    // drift time per straw ID
  logic [CH_PER_LINK-1:0]      hmap;     // all hits (hitmap mode)
  logic [31:0]                 hdr_word;
  logic                        zs_q;
  logic [1:0]                  hm_idx;

  // Capture-side header word.
  logic [7:0]  nhits_in;
  logic [31:0] hdr_in;
  always_comb begin
    nhits_in = '0;
    for (int o = 0; o < OTIS_PER_LINK; o++)
      nhits_in += 8'(popcount32(frag[o].hit));
    hdr_in = {nhits_in, opt_ok, zs_mode,
              frag[3].hdr.status, frag[2].hdr.status,
              frag[1].hdr.status, frag[0].hdr.status, gol_id};
  end

  // Two lowest set bits of the remaining hit vector.
  logic [6:0]  i0, i1;
  logic        v0, v1;
  logic [CH_PER_LINK-1:0] rem_after;
  always_comb begin
    i0 = '0; i1 = '0; v0 = 1'b0; v1 = 1'b0;
    for (int i = CH_PER_LINK - 1; i >= 0; i--)
      if (rem[i]) begin i0 = 7'(i); v0 = 1'b1; end
    for (int i = CH_PER_LINK - 1; i >= 0; i--)
      if (rem[i] && 7'(i) != i0) begin i1 = 7'(i); v1 = 1'b1; end
    rem_after = rem;
    if (v0) rem_after[i0] = 1'b0;
    if (v1) rem_after[i1] = 1'b0;
  end

  function automatic logic [15:0] hit_word(input logic [6:0] sid, input logic [7:0] t);
    return {1'b1, sid, t};
  endfunction

  logic [31:0] data_word;
  logic        data_last;
  always_comb begin
    if (zs_q) begin
      data_word = {v1 ? hit_word(i1, drift[i1]) : 16'h0000, hit_word(i0, drift[i0])};
      data_last = (rem_after == '0);
    end else begin
      data_word = hmap[32*hm_idx +: 32];
      data_last = (hm_idx == 2'd3);
    end
  end

  assign busy    = (state != S_IDLE);
  assign o_valid = (state == S_HDR) || (state == S_DATA);
  assign o_data  = (state == S_HDR) ? hdr_word : data_word;
  assign o_last  = (state == S_HDR) ? (hmap == '0) : data_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      rem      <= '0;
      hmap     <= '0;
      drift    <= '0;
      hdr_word <= '0;
      zs_q     <= 1'b0;
      hm_idx   <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          for (int o = 0; o < OTIS_PER_LINK; o++) begin
            hmap[32*o +: 32] <= frag[o].hit;
            rem[32*o +: 32]  <= frag[o].hit;
            for (int c = 0; c < CH_PER_OTIS; c++)
              drift[32*o + c] <= frag[o].data[c];
          end
          hdr_word <= hdr_in;
          zs_q     <= zs_mode;
          hm_idx   <= '0;
          state    <= S_HDR;
        end
        S_HDR: if (o_ready) state <= (hmap == '0) ? S_IDLE : S_DATA;
        S_DATA: if (o_ready) begin
          if (zs_q) rem <= rem_after;
          else      hm_idx <= hm_idx + 2'd1;
          if (data_last) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
