// mwj_tuplebuild_split: output stage of tuplebuild in the two-channel design.
//
// tuplebuild produces one stream mixing solution nodes and intersect tuples.
// This stage sends solution nodes to the single solution output and spreads
// the tuples over the two intersect/verify chains:
//  - IT_STOP:     sent to both tuple channels;
//  - IT_SOL:      sent to the solution output (node and last flag);
//  - IT_LAST_SET: sent to both tuple channels;
//  - IT_EDGE:     sent to channel node_bank(node), i.e. the MSB of the hash of
//                 the vertex to verify. If the tuple has last_edge set, an
//                 extra IT_LAST_SET with pos = 1 (padding) follows on both
//                 channels, so that the merge after verification can tell
//                 when both channels have delivered all tuples of that set.
// These four cases and the padding tuple follow the reference architecture.
// The register stage and the broadcast order (channel 0 first) are this
// design's choices.
//
// Timing: an input tuple is registered in one cycle, then needs one cycle per
// output beat (1 for IT_SOL/IT_EDGE, 2 for a broadcast, 3 for an IT_EDGE with
// last_edge).
module mwj_tuplebuild_split
  import less_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       i_valid,
  output logic       i_ready,
  input  itup_t      i_in,
  output logic       s_valid,
  input  logic       s_ready,
  output vertex_t    s_out,
  output logic [1:0] t_valid,
  input  logic [1:0] t_ready,
  output itup_t      t_out [2],
  output logic [31:0] paddings
);
  typedef enum logic [2:0] {S_IDLE, S_SOL, S_EDGE, S_BC0, S_BC1} state_e;

  state_e state;
  itup_t  cur;
  logic   pad;      // S_BC0/S_BC1 are sending the padding last_set
  itup_t  bc;

  always_comb begin
    bc = cur;
    if (pad) begin
      bc           = '0;
      bc.kind      = IT_LAST_SET;
      bc.pos       = 1'b1;
      bc.tbl       = cur.tbl;
    end
  end

  assign i_ready = (state == S_IDLE);

  always_comb begin
    s_valid  = (state == S_SOL);
    s_out    = '{node: cur.node, last: cur.last};
    t_valid  = '0;
    t_out[0] = bc;
    t_out[1] = bc;
    unique case (state)
      S_EDGE: begin
        t_valid[node_bank(cur.node)] = 1'b1;
        t_out[0] = cur;
        t_out[1] = cur;
      end
      S_BC0: t_valid[0] = 1'b1;
      S_BC1: t_valid[1] = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cur      <= '0;
      pad      <= 1'b0;
      paddings <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (i_valid) begin
          cur <= i_in;
          pad <= 1'b0;
          unique case (i_in.kind)
            IT_SOL:  state <= S_SOL;
            IT_EDGE: state <= S_EDGE;
            default: state <= S_BC0;
          endcase
        end
        S_SOL: if (s_ready) state <= S_IDLE;
        S_EDGE: if (t_ready[node_bank(cur.node)]) begin
          if (cur.last_edge) begin
            pad      <= 1'b1;
            paddings <= paddings + 1;
            state    <= S_BC0;
          end else begin
            state <= S_IDLE;
          end
        end
        S_BC0: if (t_ready[0]) state <= S_BC1;
        S_BC1: if (t_ready[1]) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
