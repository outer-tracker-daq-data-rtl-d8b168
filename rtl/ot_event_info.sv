// ot_event_info: event information section (W1..W17) of one PP FPGA and the
// PP's error flag.
//
// The section qualifies the event fragments received by the PP:
//   W1  EvCTRL   {general error, data generator enable, ECS trigger, 5'b0,
//                 trigger type[2:0], bank list {0, RAW bank, 111},
//                 detector ID 0x3, bunch counter[11:0]}
//   W2  EvID     32-bit L0 event counter
//   W3  OT specific header of this PP (its error flag, its enabled GOLs)
//   W4  sync status 0 {PP address[1:0], buffer full, buffer empty,
//                      size error, TLK error, GOL ID not equal}  (6 bits each)
//   W5  sync status 1 {14'b0, GOL has hits, link clock inactive, link disabled}
//   W6..W17 two 16-bit OTIS status words each, the lower-numbered OTIS in
//       bits 15..0; OTIS n of the PP is OTIS n%4 of link n/4.  A status word
//       is {2'b0, header bit 19 not '1', OTIS disabled, BX mismatch,
//       event counter mismatch, OTIS ID wrong, expected OTIS ID wrong,
//       offline, offline zero, hit count[5:0]}.
// Field positions are the OT format's.  This design's choices: receiver
// flags of disabled links read as zero, status words of disabled OTIS hold
// only the "disabled" bit, the OTIS bunch counter is compared with the low
// 8 bits of the TTC bunch counter and the OTIS event counter with the low 8
// bits of the L0 event ID, and the PP error flag is the OR of every error
// indication of its enabled links (any receiver flag, any OTIS header status
// bit, any status-word error bit).  A disabled PP reports no enabled GOL and
// no error.
//
// Purely combinational.
module ot_event_info
  import ot_pkg::*;
(
  input  link_frag_t   [LINKS_PER_PP-1:0] links,
  input  link_status_t [LINKS_PER_PP-1:0] lstat,
  input  logic [LINKS_PER_PP-1:0]         link_en,   // per-link enable
  input  logic                            pp_en,
  input  logic [1:0]                      pp_addr,
  input  ttc_t                            ttc,
  input  logic                            gen_error, // event-wide error flag
  input  logic                            datagen_en,
  input  logic                            raw_bank,  // a RAW bank is sent
  output logic [EVINFO_WORDS-1:0][31:0]   w,         // W1 at index 0
  output logic                            pp_error,
  output logic [15:0]                     n_gols     // enabled GOLs of this PP
);

  logic [LINKS_PER_PP-1:0] en;
  logic [LINKS_PER_PP-1:0] full, empty, szerr, tlk, golne, clkin, hashits;
  logic [4*LINKS_PER_PP-1:0][15:0] ostat;
  logic any_err;

  always_comb begin
    en      = link_en & {LINKS_PER_PP{pp_en}};
    any_err = 1'b0;
    n_gols  = '0;
    for (int l = 0; l < LINKS_PER_PP; l++) begin
      full[l]    = en[l] & lstat[l].buf_full;
      empty[l]   = en[l] & lstat[l].buf_empty;
      szerr[l]   = en[l] & lstat[l].size_err;
      tlk[l]     = en[l] & lstat[l].tlk_err;
      golne[l]   = en[l] & lstat[l].golid_ne;
      clkin[l]   = en[l] & lstat[l].clk_inactive;
      hashits[l] = 1'b0;
      n_gols    += 16'(en[l]);
      for (int o = 0; o < OTIS_PER_LINK; o++) begin
        if (en[l]) begin
          ostat[4*l+o] = {2'b00,
                          ~links[l][o].hdr.one,
                          1'b0,
                          links[l][o].hdr.bx    != ttc.bx[7:0],
                          links[l][o].hdr.evcnt != ttc.l0_evid[7:0],
                          links[l][o].hdr.otis_id != 2'(o),
                          lstat[l].exp_id_wrong[o],
                          lstat[l].offline[o],
                          lstat[l].offline_zero[o],
                          popcount32(links[l][o].hit)};
          hashits[l] = hashits[l] | (links[l][o].hit != '0);
          any_err    = any_err | (ostat[4*l+o][13:6] != '0)
                               | (links[l][o].hdr.status != '0);
        end else begin
          ostat[4*l+o] = 16'h1000;
        end
      end
    end
    any_err  = any_err | (|{full, empty, szerr, tlk, golne, clkin});
    pp_error = pp_en & any_err;

    w[0] = {gen_error, datagen_en, ttc.ecs_trig, 5'b0, ttc.trig_type,
            {1'b0, raw_bank, 3'b111}, DETECTOR_ID_OT, ttc.bx};
    w[1] = ttc.l0_evid;
    w[2] = ot_spec_hdr(ttc.trig_type, pp_error, ttc.bx[7:0], n_gols);
    w[3] = {pp_addr, full, empty, szerr, tlk, golne};
    w[4] = {14'b0, hashits, clkin, ~en};
    for (int j = 0; j < 2 * LINKS_PER_PP; j++)
      w[5+j] = {ostat[2*j+1], ostat[2*j]};
  end

endmodule
