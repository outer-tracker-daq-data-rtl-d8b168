// ot_event_builder: turns one event's front-end data into the OT data banks
// of that event, as one stream of 32-bit words.
//
// Bank sequence (fixed by the OT format):
//   processed bank  always: bank header, OT specific header, then one GOL
//                   data block per enabled link of an enabled PP FPGA
//                   (ot_gol_processor), even a link with no hit;
//   RAW bank        when the configuration forces it or the trigger type is
//                   0x5: bank header, then 233 words per enabled PP FPGA
//                   (ot_raw_pp_formatter);
//   error bank      when the configuration forces it or any enabled PP
//                   reports an error: bank header, then one section for
//                   each of the four PP FPGAs, enabled or not
//                   (ot_error_pp_formatter).
// The bank lengths (ot_bank_sizer) go into the bank headers, so they are
// computed from the captured event before the first word leaves.
//
// Interface: ev_valid/ev_ready accept an event (links, receiver status and
// TTC data), which is captured in registers.  The event then leaves on
// o_valid/o_data/o_ready with o_sop on its first word and o_eop on its last;
// o_ev_len (event bytes, banks only) and o_ev_id are valid from o_sop to
// o_eop.  Timing: one cycle to capture, one to evaluate the error flags,
// then one word per cycle apart from one idle cycle before each GOL block;
// a new event is accepted the cycle after o_eop.  The cycle budget and the
// capture-then-stream organisation are this design's choices.
module ot_event_builder
  import ot_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  cfg_t                          cfg,
  input  logic                          ev_valid,
  output logic                          ev_ready,
  input  link_frag_t   [N_LINKS-1:0]    ev_links,
  input  link_status_t [N_LINKS-1:0]    ev_stat,
  input  ttc_t                          ev_ttc,
  output logic                          o_valid,
  output logic [31:0]                   o_data,
  output logic                          o_sop,
  output logic                          o_eop,
  input  logic                          o_ready,
  output logic [15:0]                   o_ev_len,
  output logic [31:0]                   o_ev_id,
  output logic                          o_raw_bank,
  output logic                          o_err_bank
);

  typedef enum logic [3:0] {
    S_IDLE, S_PREP, S_PH0, S_PH1, S_OTH, S_GSEL, S_GRUN,
    S_RH0, S_RH1, S_RAW, S_EH0, S_EH1, S_ERR
  } state_t;
  state_t state;

  link_frag_t   [N_LINKS-1:0] links_q;
  link_status_t [N_LINKS-1:0] stat_q;
  ttc_t                       ttc_q;
  logic                       gen_err_q;

  logic [5:0]  link_i;   // current GOL
  logic [2:0]  pp_i;     // current PP FPGA
  logic [7:0]  widx;     // word within the current PP block
  logic [13:0] wcnt;     // words of this event already sent

  // --------------------------------------------------- per-PP word sources
  logic [N_LINKS-1:0] en_eff;
  always_comb
    for (int l = 0; l < N_LINKS; l++)
      en_eff[l] = cfg.link_en[l] & cfg.pp_en[l / LINKS_PER_PP];

  logic raw_bank, err_bank;
  assign raw_bank = cfg.force_raw | (ttc_q.trig_type == TRIG_TYPE_RAW);
  assign err_bank = cfg.force_info | gen_err_q;

  logic [N_PP-1:0][EVINFO_WORDS-1:0][31:0] evinfo;
  logic [N_PP-1:0]                         pp_error;
  logic [N_PP-1:0][15:0]                   pp_ngol;
  logic [N_PP-1:0][31:0]                   raw_word, err_word;
  logic [N_PP-1:0][4:0]                    err_nw;
  logic [N_PP-1:0][15:0]                   pp_proc_bytes;
  logic [15:0] proc_len, raw_len, err_len, event_len;

  for (genvar p = 0; p < N_PP; p++) begin : g_pp
    ot_event_info u_info (
      .links     (links_q[LINKS_PER_PP*p +: LINKS_PER_PP]),
      .lstat     (stat_q[LINKS_PER_PP*p +: LINKS_PER_PP]),
      .link_en   (cfg.link_en[LINKS_PER_PP*p +: LINKS_PER_PP]),
      .pp_en     (cfg.pp_en[p]),
      .pp_addr   (2'(p)),
      .ttc       (ttc_q),
      .gen_error (gen_err_q),
      .datagen_en(cfg.datagen_en),
      .raw_bank  (raw_bank),
      .w         (evinfo[p]),
      .pp_error  (pp_error[p]),
      .n_gols    (pp_ngol[p])
    );
    ot_raw_pp_formatter u_raw (
      .links (links_q[LINKS_PER_PP*p +: LINKS_PER_PP]),
      .evinfo(evinfo[p]),
      .idx   (widx),
      .word  (raw_word[p])
    );
    ot_error_pp_formatter u_err (
      .evinfo    (evinfo[p]),
      .pp_en     (cfg.pp_en[p]),
      .pp_error  (pp_error[p]),
      .proc_bytes(pp_proc_bytes[p]),
      .raw_bank  (raw_bank),
      .idx       (widx[4:0]),
      .word      (err_word[p]),
      .n_words   (err_nw[p])
    );
  end

  ot_bank_sizer u_sizer (
    .links        (links_q),
    .link_en      (en_eff),
    .zs_mode      (cfg.zs_mode),
    .pp_en        (cfg.pp_en),
    .err_words    (err_nw),
    .raw_bank     (raw_bank),
    .err_bank     (err_bank),
    .pp_proc_bytes(pp_proc_bytes),
    .proc_len     (proc_len),
    .raw_len      (raw_len),
    .err_len      (err_len),
    .event_len    (event_len)
  );

  logic [15:0] n_gols;
  always_comb begin
    n_gols = '0;
    for (int p = 0; p < N_PP; p++) n_gols += pp_ngol[p];
  end

  // ------------------------------------------------------- GOL processor
  logic        gol_start, gol_busy, gol_valid, gol_last;
  logic [31:0] gol_data;
  logic [5:0]  next_link;
  logic [2:0]  next_pp;

  // Lowest enabled link at or above link_i (N_LINKS if none).
  always_comb begin
    next_link = 6'(N_LINKS);
    for (int l = N_LINKS - 1; l >= 0; l--)
      if (en_eff[l] && 6'(l) >= link_i) next_link = 6'(l);
  end

  // Lowest enabled PP at or above pp_i (N_PP if none).
  always_comb begin
    next_pp = 3'(N_PP);
    for (int p = N_PP - 1; p >= 0; p--)
      if (cfg.pp_en[p] && 3'(p) >= pp_i) next_pp = 3'(p);
  end

  logic [4:0] gsel;
  assign gsel      = (next_link < 6'(N_LINKS)) ? next_link[4:0] : 5'd0;
  assign gol_start = (state == S_GSEL) && (next_link < 6'(N_LINKS));

  ot_gol_processor u_gol (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (gol_start),
    .frag   (links_q[gsel]),
    .zs_mode(cfg.zs_mode[gsel]),
    .gol_id (cfg.gol_id[gsel]),
    .opt_ok (~(stat_q[gsel].tlk_err | stat_q[gsel].clk_inactive)),
    .busy   (gol_busy),
    .o_valid(gol_valid),
    .o_data (gol_data),
    .o_last (gol_last),
    .o_ready(o_ready && state == S_GRUN)
  );

  // ------------------------------------------------------------ output
  logic [2:0] cur_pp;
  assign cur_pp = (pp_i < 3'(N_PP)) ? pp_i : 3'd0;

  always_comb begin
    o_valid = 1'b0;
    o_data  = 32'h0;
    case (state)
      S_PH0:  begin o_valid = 1'b1; o_data = bank_hdr0(proc_len); end
      S_PH1:  begin o_valid = 1'b1; o_data = bank_hdr1(cfg.source_id, cfg.version, cfg.type_proc); end
      S_OTH:  begin o_valid = 1'b1; o_data = ot_spec_hdr(ttc_q.trig_type, gen_err_q, ttc_q.bx[7:0], n_gols); end
      S_GRUN: begin o_valid = gol_valid; o_data = gol_data; end
      S_RH0:  begin o_valid = 1'b1; o_data = bank_hdr0(raw_len); end
      S_RH1:  begin o_valid = 1'b1; o_data = bank_hdr1(cfg.source_id, cfg.version, cfg.type_raw); end
      S_RAW:  begin o_valid = 1'b1; o_data = raw_word[cur_pp]; end
      S_EH0:  begin o_valid = 1'b1; o_data = bank_hdr0(err_len); end
      S_EH1:  begin o_valid = 1'b1; o_data = bank_hdr1(cfg.source_id, cfg.version, cfg.type_err); end
      S_ERR:  begin o_valid = 1'b1; o_data = err_word[cur_pp]; end
      default: ;
    endcase
  end

  assign o_sop      = (state == S_PH0);
  assign o_eop      = o_valid && (wcnt == 14'(event_len >> 2) - 14'd1);
  assign o_ev_len   = event_len;
  assign o_ev_id    = ttc_q.l0_evid;
  assign o_raw_bank = raw_bank;
  assign o_err_bank = err_bank;
  assign ev_ready   = (state == S_IDLE);

  logic fire;
  assign fire = o_valid && o_ready;

  // Next state after the processed bank.
  state_t after_proc, after_raw;
  assign after_proc = raw_bank ? S_RH0 : (err_bank ? S_EH0 : S_IDLE);
  assign after_raw  = err_bank ? S_EH0 : S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      for (int l = 0; l < N_LINKS; l++) links_q[l] <= '0;
      stat_q    <= '0;
      ttc_q     <= '0;
      gen_err_q <= 1'b0;
      link_i    <= '0;
      pp_i      <= '0;
      widx      <= '0;
      wcnt      <= '0;
    end else begin
      if (fire) wcnt <= wcnt + 14'd1;
      case (state)
        S_IDLE: if (ev_valid) begin
          links_q <= ev_links;
          stat_q  <= ev_stat;
          ttc_q   <= ev_ttc;
          wcnt    <= '0;
          state   <= S_PREP;
        end
        S_PREP: begin
          gen_err_q <= |pp_error;
          state     <= S_PH0;
        end
        S_PH0: if (o_ready) state <= S_PH1;
        S_PH1: if (o_ready) state <= S_OTH;
        S_OTH: if (o_ready) begin
          link_i <= '0;
          pp_i   <= '0;
          widx   <= '0;
          state  <= (en_eff != '0) ? S_GSEL : after_proc;
        end
        S_GSEL: begin
          if (next_link < 6'(N_LINKS)) begin
            link_i <= next_link;
            state  <= S_GRUN;
          end else begin
            pp_i  <= '0;
            widx  <= '0;
            state <= after_proc;
          end
        end
        S_GRUN: if (gol_valid && gol_last && o_ready) begin
          link_i <= link_i + 6'd1;
          // skip the search cycle when this was the last enabled link
          state  <= ((en_eff >> (link_i + 6'd1)) != '0) ? S_GSEL : after_proc;
        end
        S_RH0: if (o_ready) state <= S_RH1;
        S_RH1: if (o_ready) begin
          pp_i  <= (next_pp < 3'(N_PP)) ? next_pp : 3'd0;
          widx  <= '0;
          state <= (next_pp < 3'(N_PP)) ? S_RAW : after_raw;
        end
        S_RAW: if (o_ready) begin
          if (widx == 8'(RAW_PP_WORDS - 1)) begin
            widx <= '0;
            if (next_pp_after(cfg.pp_en, cur_pp) < 3'(N_PP)) pp_i <= next_pp_after(cfg.pp_en, cur_pp);
            else begin
              pp_i  <= '0;
              state <= after_raw;
            end
          end else begin
            widx <= widx + 8'd1;
          end
        end
        S_EH0: if (o_ready) state <= S_EH1;
        S_EH1: if (o_ready) begin
          pp_i  <= '0;
          widx  <= '0;
          state <= S_ERR;
        end
        S_ERR: if (o_ready) begin
          if (widx[4:0] == err_nw[cur_pp] - 5'd1) begin
            widx <= '0;
            if (pp_i == 3'(N_PP - 1)) state <= S_IDLE;
            else pp_i <= pp_i + 3'd1;
          end else begin
            widx <= widx + 8'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Lowest enabled PP above `cur`.
  function automatic logic [2:0] next_pp_after(input logic [N_PP-1:0] en, input logic [2:0] cur);
    logic [2:0] r;
    r = 3'(N_PP);
    for (int p = N_PP - 1; p >= 0; p--)
      if (en[p] && 3'(p) > cur) r = 3'(p);
    return r;
  endfunction

  // The GOL processor must be idle whenever a block is started.
  a_gol_idle: assert property (@(posedge clk) disable iff (!rst_n) gol_start |-> !gol_busy);
  // The stream ends exactly at the precomputed event length.
  a_len: assert property (@(posedge clk) disable iff (!rst_n)
                          o_valid |-> wcnt < 14'(event_len >> 2));

endmodule
