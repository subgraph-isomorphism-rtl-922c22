// mwj_merge_h: joins the hstreams of the two homomorphism instances.
//
// Both inputs are polled without blocking. When one offers data it is locked
// and followed until one whole sequence has passed: solution nodes up to the
// first last flag, one minset word, then candidates up to the second last
// flag. Only then may the other input be chosen, so sequences never
// interleave. A stop node (a one-beat sequence) is not forwarded; the input
// that sent it is no longer polled. Once both inputs have stopped, a single
// stop node {STOP_NODE, last} is sent and the block is ready for a new run.
//
// The sequence pattern, non-blocking polling and the double-stop rule follow
// the reference architecture. When both inputs are ready at once the choice
// alternates (round robin): this design's choice.
//
// Timing: one beat per cycle, no bubble between sequences.
module mwj_merge_h
  import less_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] h_valid,
  output logic [1:0] h_ready,
  input  seq_t       h_in [2],
  output logic       o_valid,
  input  logic       o_ready,
  output seq_t       o_out,
  output logic [31:0] seqs [2]
);
  typedef enum logic [1:0] {P_SOL, P_MIN, P_SET} phase_e;

  logic       locked, cur, rr;
  phase_e     phase;
  logic [1:0] stopped;
  logic       sel, any, both_stop;
  logic [1:0] cand;

  assign both_stop = &stopped;
  assign cand      = h_valid & ~stopped;
  assign any       = locked ? h_valid[cur] : |cand;

  always_comb begin
    if (locked)           sel = cur;
    else if (&cand)       sel = rr;
    else                  sel = cand[1];
  end

  logic is_stop;
  assign is_stop = !locked && h_in[sel].node == STOP_NODE && h_in[sel].last;

  always_comb begin
    h_ready = '0;
    o_valid = 1'b0;
    o_out   = h_in[sel];
    if (both_stop) begin
      o_valid = 1'b1;
      o_out   = '{node: STOP_NODE, last: 1'b1, nil: 1'b0};
    end else if (any) begin
      if (is_stop) begin
        h_ready[sel] = 1'b1;
      end else begin
        o_valid      = 1'b1;
        h_ready[sel] = o_ready;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked  <= 1'b0;
      cur     <= 1'b0;
      rr      <= 1'b0;
      phase   <= P_SOL;
      stopped <= '0;
      seqs[0] <= '0;
      seqs[1] <= '0;
    end else if (both_stop) begin
      if (o_ready) stopped <= '0;
    end else if (any) begin
      if (is_stop) begin
        stopped[sel] <= 1'b1;
      end else if (o_ready) begin
        locked <= 1'b1;
        cur    <= sel;
        unique case (phase)
          P_SOL: if (h_in[sel].last) phase <= P_MIN;
          P_MIN: phase <= P_SET;
          P_SET: if (h_in[sel].last) begin
            phase      <= P_SOL;
            locked     <= 1'b0;
            rr         <= ~sel;
            seqs[sel]  <= seqs[sel] + 1;
          end
          default: phase <= P_SOL;
        endcase
      end
    end
  end
endmodule
