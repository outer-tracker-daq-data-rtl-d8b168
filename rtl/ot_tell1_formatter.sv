// ot_tell1_formatter: Outer Tracker TELL1 output formatter, from event data
// to Multiple Event Packets.
//
// For every L0-accepted event the formatter receives the 36-byte fragments
// of the 96 OTIS chips on the board's 24 GOL links (six per PP FPGA), the
// optical receivers' status flags and the TTC data.  ot_event_builder turns
// the event into a processed bank (zero-suppressed or hitmap GOL blocks,
// selected per link), an optional RAW bank (forced by configuration or by
// trigger type 0x5) and an optional error bank (forced by configuration or
// raised by any error); ot_mep_builder packs `cfg.mep_factor` such events
// behind one MEP header and sends the packet as a stream of 32-bit words.
//
// Interface: ev_valid/ev_ready per event; m_valid/m_data/m_last/m_ready per
// MEP word.  The status outputs (ev_raw_bank, ev_err_bank, mep_early_close)
// expose which optional banks the current event carries and when a MEP was
// closed early for lack of buffer space; they are meant for monitoring.
// ot_histogrammer samples accepted events (when it is free) into per-channel
// hit counters and per-OTIS drift-time histograms, read through the hist_*
// port by the slow-control side.
// Latency: an event's words reach the MEP buffer one per cycle after two
// cycles of capture; the MEP leaves once it is complete.
module ot_tell1_formatter
  import ot_pkg::*;
#(
  parameter int unsigned MEP_BUF_WORDS = 16384
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  cfg_t                       cfg,
  // event input
  input  logic                       ev_valid,
  output logic                       ev_ready,
  input  link_frag_t   [N_LINKS-1:0] ev_links,
  input  link_status_t [N_LINKS-1:0] ev_stat,
  input  ttc_t                       ev_ttc,
  // MEP output
  output logic                       m_valid,
  output logic [31:0]                m_data,
  output logic                       m_last,
  input  logic                       m_ready,
  // monitoring
  output logic                       ev_raw_bank,
  output logic                       ev_err_bank,
  output logic                       mep_early_close,
  // monitoring histograms (slow-control read port)
  input  logic                       hist_clear,
  output logic                       hist_busy,
  input  logic [14:0]                hist_addr,
  output logic [15:0]                hist_rdata,
  output logic [31:0]                hist_events,
  output logic [31:0]                hist_skipped
);

  logic        e_valid, e_ready, e_sop, e_eop;
  logic [31:0] e_data, e_id;
  logic [15:0] e_len;

  ot_event_builder u_evb (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg       (cfg),
    .ev_valid  (ev_valid),
    .ev_ready  (ev_ready),
    .ev_links  (ev_links),
    .ev_stat   (ev_stat),
    .ev_ttc    (ev_ttc),
    .o_valid   (e_valid),
    .o_data    (e_data),
    .o_sop     (e_sop),
    .o_eop     (e_eop),
    .o_ready   (e_ready),
    .o_ev_len  (e_len),
    .o_ev_id   (e_id),
    .o_raw_bank(ev_raw_bank),
    .o_err_bank(ev_err_bank)
  );

  ot_mep_builder #(.BUF_WORDS(MEP_BUF_WORDS)) u_mep (
    .clk         (clk),
    .rst_n       (rst_n),
    .mep_factor  (cfg.mep_factor),
    .partition_id(cfg.partition_id),
    .i_valid     (e_valid),
    .i_data      (e_data),
    .i_sop       (e_sop),
    .i_eop       (e_eop),
    .i_ev_len    (e_len),
    .i_ev_id     (e_id),
    .i_ready     (e_ready),
    .m_valid     (m_valid),
    .m_data      (m_data),
    .m_last      (m_last),
    .m_ready     (m_ready),
    .m_early     (mep_early_close)
  );

  // Links that carry data: enabled links of enabled PP FPGAs.
  logic [N_LINKS-1:0] link_on;
  always_comb
    for (int l = 0; l < N_LINKS; l++)
      link_on[l] = cfg.link_en[l] & cfg.pp_en[l / LINKS_PER_PP];

  ot_histogrammer u_hist (
    .clk      (clk),
    .rst_n    (rst_n),
    .sample   (ev_valid & ev_ready),
    .links    (ev_links),
    .link_en  (link_on),
    .clear    (hist_clear),
    .busy     (hist_busy),
    .rd_addr  (hist_addr),
    .rd_data  (hist_rdata),
    .n_events (hist_events),
    .n_skipped(hist_skipped)
  );

endmodule
