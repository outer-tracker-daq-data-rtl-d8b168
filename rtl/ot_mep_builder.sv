// ot_mep_builder: packs consecutive events into Multiple Event Packets.
//
// A MEP is a 3-word MEP header followed by its events, each preceded by a
// one-word MEP sub-header:
//   MEP header  word 0  L0 event ID of the first event
//               word 1  {total MEP length in bytes incl. this header, number of events}
//               word 2  partition ID
//   sub-header          {event length in bytes excl. the sub-header, L0 event ID[15:0]}
// These layouts are the LHCb MEP format.  Because the MEP length heads the
// packet, a MEP is collected in a buffer of BUF_WORDS 32-bit words before it
// is sent.  The buffer holds the largest MEP the 16-bit byte length can
// describe (65535 bytes, 16383 words; BUF_WORDS = 16384).
//
// Operation: words 0..2 are left free; each event's sub-header is written
// in the cycle after its first word is offered (the event length and ID come
// with o_sop from the event builder), then its words follow at one per
// cycle.  The MEP is closed when it holds `mep_factor` events, or early, when
// the next event would push it beyond BUF_WORDS-1 words (the event is then
// held back and opens the next MEP).  Closing writes the three header words
// (3 cycles), then the buffer is read out in order on m_valid/m_data/m_last,
// one word per cycle under m_ready; filling resumes once the last word has
// left.  The single buffer (no double buffering) and the early close are
// this design's choices.
module ot_mep_builder
  import ot_pkg::*;
#(
  parameter int unsigned BUF_WORDS = 16384
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [5:0]  mep_factor,    // 1..32
  input  logic [31:0] partition_id,
  // event stream
  input  logic        i_valid,
  input  logic [31:0] i_data,
  input  logic        i_sop,
  input  logic        i_eop,
  input  logic [15:0] i_ev_len,      // bytes, valid with i_sop
  input  logic [31:0] i_ev_id,       // valid with i_sop
  output logic        i_ready,
  // MEP stream
  output logic        m_valid,
  output logic [31:0] m_data,
  output logic        m_last,
  input  logic        m_ready,
  output logic        m_early        // pulse: a MEP was closed before mep_factor events
);

  localparam int unsigned AW = $clog2(BUF_WORDS);
  localparam int unsigned MAX_WORDS = (BUF_WORDS - 1 < 16383) ? BUF_WORDS - 1 : 16383;

  typedef enum logic [2:0] {S_FILL, S_SUB, S_DATA, S_HDR, S_DRAIN} state_t;
  state_t state;

  logic [31:0] mem [BUF_WORDS];

  logic [AW:0]  wr_ptr;     // next free word
  logic [AW:0]  rd_ptr;
  logic [5:0]   nev;
  logic [31:0]  first_id;
  logic [1:0]   hdr_i;
  logic         we;
  logic [AW-1:0] waddr;
  logic [31:0]  wdata;

  // Words needed by the offered event including its sub-header.
  logic [AW+1:0] need;
  logic          fits;
  assign need = (AW+2)'(wr_ptr) + (AW+2)'(i_ev_len >> 2) + (AW+2)'(1);
  assign fits = need <= (AW+2)'(MAX_WORDS);

  logic [5:0] factor;
  assign factor = (mep_factor == 6'd0) ? 6'd1 : (mep_factor > 6'd32 ? 6'd32 : mep_factor);

  // Close decisions taken in S_FILL with an event offered.
  logic close_now;
  assign close_now = (state == S_FILL) && i_valid && i_sop && (nev != 6'd0) && !fits;

  assign i_ready = (state == S_DATA);
  assign m_early = close_now;

  // Write port.
  always_comb begin
    we    = 1'b0;
    waddr = wr_ptr[AW-1:0];
    wdata = i_data;
    case (state)
      S_SUB:  begin we = 1'b1; wdata = {i_ev_len, i_ev_id[15:0]}; end
      S_DATA: begin we = i_valid; wdata = i_data; end
      S_HDR: begin
        we    = 1'b1;
        waddr = AW'(hdr_i);
        case (hdr_i)
          2'd0:    wdata = first_id;
          2'd1:    wdata = {16'(wr_ptr) << 2, 10'd0, nev};
          default: wdata = partition_id;
        endcase
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_FILL;
      wr_ptr   <= (AW+1)'(3);
      rd_ptr   <= '0;
      nev      <= '0;
      first_id <= '0;
      hdr_i    <= '0;
      m_valid  <= 1'b0;
      m_data   <= '0;
      m_last   <= 1'b0;
    end else begin
      case (state)
        S_FILL: if (i_valid && i_sop) begin
          if (close_now) begin
            hdr_i <= '0;
            state <= S_HDR;
          end else begin
            if (nev == 6'd0) first_id <= i_ev_id;
            state <= S_SUB;
          end
        end
        S_SUB: begin
          wr_ptr <= wr_ptr + 1'b1;
          state  <= S_DATA;
        end
        S_DATA: if (i_valid) begin
          wr_ptr <= wr_ptr + 1'b1;
          if (i_eop) begin
            nev <= nev + 6'd1;
            if (nev + 6'd1 >= factor) begin
              hdr_i <= '0;
              state <= S_HDR;
            end else begin
              state <= S_FILL;
            end
          end
        end
        S_HDR: begin
          hdr_i <= hdr_i + 2'd1;
          if (hdr_i == 2'd2) begin
            rd_ptr <= '0;
            state  <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          if (!m_valid || m_ready) begin
            if (rd_ptr < wr_ptr) begin
              m_data  <= mem[rd_ptr[AW-1:0]];
              m_valid <= 1'b1;
              m_last  <= (rd_ptr == wr_ptr - 1'b1);
              rd_ptr  <= rd_ptr + 1'b1;
            end else begin
              m_valid <= 1'b0;
              m_last  <= 1'b0;
              wr_ptr  <= (AW+1)'(3);
              nev     <= '0;
              state   <= S_FILL;
            end
          end
        end
        default: state <= S_FILL;
      endcase
    end
  end

  // An event must be announced with o_sop before its words are taken.
  a_sop_in_fill: assert property (@(posedge clk) disable iff (!rst_n)
                                  (state == S_FILL && i_valid) |-> i_sop);
  // The buffer never overflows.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  we |-> (state == S_HDR) || (wr_ptr < (AW+1)'(BUF_WORDS)));

endmodule
