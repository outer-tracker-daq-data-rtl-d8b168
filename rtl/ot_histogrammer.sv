// ot_histogrammer: monitoring histograms for the Outer Tracker TELL1 -
// hit counts per straw channel and drift-time distributions per OTIS chip,
// read by the slow-control (ECS) side.
//
// Two counter memories are kept:
//   hit map     one counter per channel, 24 links x 128 channels = 3072,
//               address link*128 + OTIS*32 + channel;
//   drift time  one 256-bin histogram of the 8-bit drift time per OTIS,
//               96 x 256 = 24576 bins, address 4096 + (link*4 + OTIS)*256 + time.
// The OT format lists these histograms as a debugging aid; their sizes
// follow from the channel count and the 8-bit drift time, while the counter
// width (CNT_W, saturating), the address map, the sampling policy and the
// read port are this design's choices.
//
// Operation: an event offered on `sample` while `busy` is low is captured
// (hit flags of enabled links and their drift times) and its hits are
// entered one per cycle, scanning the links in order; a link's scan ends
// with one cycle to move to the next link, so an event takes hits + 24
// cycles.  Events offered while busy are not histogrammed (`n_skipped`
// counts them, `n_events` counts those entered).  After reset, and on a
// `clear` pulse, both memories are swept to zero (24576 cycles, busy high).
// Read port: `rd_addr` is sampled each cycle, `rd_data` follows one cycle
// later; addresses outside both maps read zero.
module ot_histogrammer
  import ot_pkg::*;
#(
  parameter int unsigned CNT_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sample,
  input  link_frag_t [N_LINKS-1:0] links,
  input  logic [N_LINKS-1:0]       link_en,
  input  logic                     clear,
  output logic                     busy,
  input  logic [14:0]              rd_addr,
  output logic [CNT_W-1:0]         rd_data,
  output logic [31:0]              n_events,
  output logic [31:0]              n_skipped
);

  localparam int unsigned N_HIT   = N_LINKS * CH_PER_LINK;          // 3072
  localparam int unsigned N_DRIFT = N_LINKS * OTIS_PER_LINK * 256;  // 24576
  localparam logic [14:0] DRIFT_BASE = 15'd4096;

  typedef enum logic [1:0] {S_CLEAR, S_IDLE, S_SCAN} state_t;
  state_t state;

  logic [CNT_W-1:0] hitcnt [N_HIT];
  logic [CNT_W-1:0] dtbin  [N_DRIFT];

  logic [N_LINKS-1:0][CH_PER_LINK-1:0]      hits_q;
  logic [N_LINKS-1:0][CH_PER_LINK-1:0][7:0] drift_q;
  logic [4:0]  link_i;
  logic [14:0] clr_i;

  // Lowest remaining hit of the current link.
  logic [CH_PER_LINK-1:0] cur;
  logic [6:0]             sid;
  logic                   any;
  always_comb begin
    cur = hits_q[link_i];
    sid = '0;
    any = 1'b0;
    for (int i = CH_PER_LINK - 1; i >= 0; i--)
      if (cur[i]) begin sid = 7'(i); any = 1'b1; end
  end

  logic [11:0] h_addr;
  logic [14:0] d_addr;
  assign h_addr = {link_i, sid};
  assign d_addr = 15'({link_i, sid[6:5]}) * 15'd256 + 15'(drift_q[link_i][sid]);

  function automatic logic [CNT_W-1:0] sat_inc(input logic [CNT_W-1:0] v);
    return (v == '1) ? v : v + 1'b1;
  endfunction

  assign busy = (state != S_IDLE);

  // Counter memories: clear sweep or one increment per cycle.
  always_ff @(posedge clk) begin
    if (state == S_CLEAR) begin
      if (clr_i < 15'(N_HIT)) hitcnt[clr_i[11:0]] <= '0;
      dtbin[clr_i] <= '0;
    end else if (state == S_SCAN && any) begin
      hitcnt[h_addr] <= sat_inc(hitcnt[h_addr]);
      dtbin[d_addr]  <= sat_inc(dtbin[d_addr]);
    end
  end

  // Read port.
  always_ff @(posedge clk) begin
    if (rd_addr < 15'(N_HIT))
      rd_data <= hitcnt[rd_addr[11:0]];
    else if (rd_addr >= DRIFT_BASE && rd_addr - DRIFT_BASE < 15'(N_DRIFT))
      rd_data <= dtbin[rd_addr - DRIFT_BASE];
    else
      rd_data <= '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_CLEAR;
      clr_i     <= '0;
      link_i    <= '0;
      n_events  <= '0;
      n_skipped <= '0;
      for (int l = 0; l < N_LINKS; l++) begin
        hits_q[l]  <= '0;
        drift_q[l] <= '0;
      end
    end else begin
      if (sample && state != S_IDLE) n_skipped <= n_skipped + 1'b1;
      case (state)
        S_CLEAR: begin
          clr_i <= clr_i + 1'b1;
          if (clr_i == 15'(N_DRIFT - 1)) state <= S_IDLE;
        end
        S_IDLE: begin
          if (clear) begin
            clr_i <= '0;
            state <= S_CLEAR;
          end else if (sample) begin
            for (int l = 0; l < N_LINKS; l++) begin
              for (int o = 0; o < OTIS_PER_LINK; o++) begin
                hits_q[l][32*o +: 32] <= link_en[l] ? links[l][o].hit : '0;
                for (int c = 0; c < CH_PER_OTIS; c++)
                  drift_q[l][32*o + c] <= links[l][o].data[c];
              end
            end
            link_i   <= '0;
            n_events <= n_events + 1'b1;
            state    <= S_SCAN;
          end
        end
        S_SCAN: begin
          if (any) hits_q[link_i][sid] <= 1'b0;
          else if (link_i == 5'(N_LINKS - 1)) state <= S_IDLE;
          else link_i <= link_i + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
