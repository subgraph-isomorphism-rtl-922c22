// mwj_mergeasmset: joins the two verified tuple channels into one stream.
//
// Both channels are polled without blocking; when a tuple is available:
//  - a regular tuple (IT_EDGE without last_edge) is sent to the output;
//  - a tuple with last_edge is kept in a local register, not sent;
//  - an IT_LAST_SET (or IT_STOP) closes that channel: it is not read again
//    until the matching marker has arrived on the other channel as well.
// When both channels hold a marker:
//  - padding (pos = 1): the stored last_edge tuple is now known to be the
//    final tuple of its set, and is sent;
//  - real last set (pos = 0): one IT_LAST_SET is sent;
//  - IT_STOP: one IT_STOP is sent;
// and both channels are unlocked.
// This follows the reference architecture. Sending the real last set and the
// stop only once, after both copies arrived, and round-robin choice when
// both channels offer a tuple are this design's reading.
//
// Timing: one tuple per cycle; resolving a pair of markers takes one cycle.
module mwj_mergeasmset
  import less_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] t_valid,
  output logic [1:0] t_ready,
  input  itup_t      t_in [2],
  output logic       o_valid,
  input  logic       o_ready,
  output itup_t      o_out,
  output logic [31:0] syncs
);
  logic [1:0] held;
  itup_t      mark [2];
  itup_t      le;
  logic       le_v;
  logic       rr, sel;
  logic [1:0] cand;
  logic       resolve;
  itup_t      cur;
  logic       is_mark;

  assign cand    = t_valid & ~held;
  assign resolve = &held;
  assign sel     = (&cand) ? rr : cand[1];
  assign cur     = t_in[sel];
  assign is_mark = (cur.kind == IT_LAST_SET) || (cur.kind == IT_STOP);

  always_comb begin
    t_ready = '0;
    o_valid = 1'b0;
    o_out   = cur;
    if (resolve) begin
      if (mark[0].kind == IT_STOP) begin
        o_valid = 1'b1;
        o_out   = mark[0];
      end else if (mark[0].pos) begin
        o_valid = le_v;
        o_out   = le;
      end else begin
        o_valid = 1'b1;
        o_out   = mark[0];
      end
    end else if (|cand) begin
      if (is_mark || (cur.kind == IT_EDGE && cur.last_edge)) begin
        t_ready[sel] = 1'b1;
      end else begin
        o_valid      = 1'b1;
        t_ready[sel] = o_ready;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held    <= '0;
      mark[0] <= '0;
      mark[1] <= '0;
      le      <= '0;
      le_v    <= 1'b0;
      rr      <= 1'b0;
      syncs   <= '0;
    end else if (resolve) begin
      if (o_ready || !o_valid) begin
        held  <= '0;
        syncs <= syncs + 1;
        if (mark[0].pos && mark[0].kind == IT_LAST_SET) le_v <= 1'b0;
      end
    end else if (|cand && t_ready[sel]) begin
      rr <= ~sel;
      if (is_mark) begin
        held[sel] <= 1'b1;
        mark[sel] <= cur;
      end else if (cur.kind == IT_EDGE && cur.last_edge) begin
        le   <= cur;
        le_v <= 1'b1;
      end
    end
  end

  a_marks_match: assert property (@(posedge clk) disable iff (!rst_n)
    resolve |-> mark[0].kind == mark[1].kind && mark[0].pos == mark[1].pos);
endmodule
