// mwj_fulldetect: marks complete partial solutions.
//
// Solution packets (already decompressed) leave tuplebuild on the solution
// output. A packet whose node count equals the number of query vertices
// (nq) holds a candidate for every query node: once its last node is
// verified it is a full match, which the assembly stage counts instead of
// writing it back to the FIFO. This block buffers each packet, then sends it
// again with out_full set on every beat when it is complete. The stop node
// passes through with out_full = 0.
//
// Marking complete solutions after tuplebuild, apart from decompression,
// follows the reference architecture; buffering the packet so the flag is
// known on its first beat is this design's choice.
//
// Timing: a packet of n nodes is taken in n cycles, then sent in n cycles.
module mwj_fulldetect
  import less_pkg::*;
#(
  parameter int unsigned MAXV = MAX_QV
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic [$clog2(MAX_QV+1)-1:0] nq,
  input  logic    in_valid,
  output logic    in_ready,
  input  vertex_t in_v,
  output logic    out_valid,
  input  logic    out_ready,
  output vertex_t out_v,
  output logic    out_full,
  output logic [31:0] full_count
);
  localparam int unsigned CW = $clog2(MAXV + 1);
  localparam int unsigned AW = $clog2(MAXV);

  typedef enum logic [1:0] {S_IN, S_OUT, S_STOP} state_e;

  state_e        state;
  node_t         buf_q [MAXV];
  logic [CW-1:0] n, idx;
  logic          full;

  assign in_ready  = (state == S_IN);
  assign out_valid = (state != S_IN);
  assign out_v     = (state == S_STOP) ? '{node: STOP_NODE, last: 1'b1}
                                       : '{node: buf_q[idx[AW-1:0]], last: (idx + 1'b1 == n)};
  assign out_full  = (state == S_OUT) && full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IN;
      n          <= '0;
      idx        <= '0;
      full       <= 1'b0;
      full_count <= '0;
    end else begin
      unique case (state)
        S_IN: if (in_valid) begin
          if (in_v.node == STOP_NODE) begin
            state <= S_STOP;
            n     <= '0;
          end else begin
            buf_q[n[AW-1:0]] <= in_v.node;
            if (in_v.last) begin
              full  <= (CW'(n + 1'b1) == CW'(nq));
              if (CW'(n + 1'b1) == CW'(nq)) full_count <= full_count + 1;
              n     <= n + 1'b1;
              idx   <= '0;
              state <= S_OUT;
            end else begin
              n <= n + 1'b1;
            end
          end
        end
        S_OUT: if (out_ready) begin
          if (idx + 1'b1 == n) begin
            n     <= '0;
            state <= S_IN;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        S_STOP: if (out_ready) state <= S_IN;
        default: state <= S_IN;
      endcase
    end
  end

  a_fits: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_IN && in_valid |-> n < CW'(MAXV));
endmodule
