// ot_bank_sizer: byte lengths of the banks of one event, needed before the
// first word of each bank is sent.
//
//   GOL block      4 + (no hits: 0 | zero-suppress: 4*ceil(hits/2) | hitmap: 16)
//   processed bank 8 (bank header) + 4 (OT specific header) + all GOL blocks
//                  of enabled links on enabled PP FPGAs
//   RAW bank       8 + 932 per enabled PP FPGA
//   error bank     8 + 4 * (words of the four PP sections)
//   event          processed + RAW (if sent) + error (if sent)
// Bank lengths include the 8-byte bank header and the per-GOL padding, as
// the OT format requires; every length is a multiple of four bytes, so no
// bank needs padding at its end.  Also returns the processed bytes of each
// PP (its GOL blocks only) for the error bank's E1/E3 words.
//
// Purely combinational.
module ot_bank_sizer
  import ot_pkg::*;
(
  input  link_frag_t [N_LINKS-1:0] links,
  input  logic [N_LINKS-1:0]       link_en,   // already masked by PP enable
  input  logic [N_LINKS-1:0]       zs_mode,
  input  logic [N_PP-1:0]          pp_en,
  input  logic [N_PP-1:0][4:0]     err_words, // words of each error section
  input  logic                     raw_bank,
  input  logic                     err_bank,
  output logic [N_PP-1:0][15:0]    pp_proc_bytes,
  output logic [15:0]              proc_len,
  output logic [15:0]              raw_len,
  output logic [15:0]              err_len,
  output logic [15:0]              event_len
);

  logic [7:0]  nh;
  logic [15:0] gb;

  always_comb begin
    pp_proc_bytes = '0;
    for (int l = 0; l < N_LINKS; l++) begin
      nh = '0;
      for (int o = 0; o < OTIS_PER_LINK; o++) nh += 8'(popcount32(links[l][o].hit));
      if (nh == 8'd0)   gb = 16'd4;
      else if (zs_mode[l]) gb = 16'd4 + ((16'(nh) + 16'd1) >> 1) * 16'd4;
      else              gb = 16'd20;
      if (link_en[l]) pp_proc_bytes[l / LINKS_PER_PP] += gb;
    end
    proc_len = 16'd12;
    raw_len  = 16'd8;
    err_len  = 16'd8;
    for (int p = 0; p < N_PP; p++) begin
      proc_len += pp_proc_bytes[p];
      if (pp_en[p]) raw_len += 16'(RAW_PP_BYTES);
      err_len  += 16'(err_words[p]) * 16'd4;
    end
    event_len = proc_len + (raw_bank ? raw_len : 16'd0) + (err_bank ? err_len : 16'd0);
  end

endmodule
