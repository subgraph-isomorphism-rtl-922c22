// mwj_findchannel: splits the edgebuild branch into two channels.
//
// It reads, with blocking reads and in this order, the minset tuple, its bloom
// word and the partial-solution packet coming from findmin. The MSB of the
// hash of the tuple's indexing node selects the channel (and with it the
// memory bank holding that node's edges); tuple, bloom and every node of the
// packet are forwarded to that channel, so the downstream readmin and
// homomorphism tasks of each channel see aligned streams exactly as in the
// single-channel design. A stop tuple is sent to both channels, followed by
// the stop node on both solution outputs, so both channels end.
//
// The routing rule and the stop broadcast follow the reference architecture;
// the valid/ready handshakes and the order of the broadcast (channel 0 first)
// are this design's choices.
//
// Timing: one beat per cycle when the selected output is ready; a stop costs
// four cycles (tuple and node to each channel).
module mwj_findchannel
  import less_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        t_valid,
  output logic        t_ready,
  input  fmin_tuple_t t_in,
  input  logic        b_valid,
  output logic        b_ready,
  input  bloom_t      b_in,
  input  logic        s_valid,
  output logic        s_ready,
  input  vertex_t     s_in,
  output logic [1:0]  ot_valid,
  input  logic [1:0]  ot_ready,
  output fmin_tuple_t ot_out [2],
  output logic [1:0]  ob_valid,
  input  logic [1:0]  ob_ready,
  output bloom_t      ob_out [2],
  output logic [1:0]  os_valid,
  input  logic [1:0]  os_ready,
  output vertex_t     os_out [2],
  // per-channel routing statistics
  output logic [31:0] routed [2]
);
  typedef enum logic [2:0] {
    S_TUP, S_BLOOM, S_SOL, S_STOP_T0, S_STOP_T1, S_STOP_S0, S_STOP_S1
  } state_e;

  state_e      state;
  logic        ch;
  fmin_tuple_t stop_t;
  logic        sel;

  assign sel = node_bank(t_in.indexing);

  always_comb begin
    t_ready  = 1'b0;
    b_ready  = 1'b0;
    s_ready  = 1'b0;
    ot_valid = '0;
    ob_valid = '0;
    os_valid = '0;
    for (int c = 0; c < 2; c++) begin
      ot_out[c] = (state == S_TUP) ? t_in : stop_t;
      ob_out[c] = b_in;
      os_out[c] = s_in;
    end
    unique case (state)
      S_TUP: if (!t_in.stop) begin
        ot_valid[sel] = t_valid;
        t_ready       = ot_ready[sel];
      end else begin
        t_ready = 1'b1;          // latched, broadcast below
      end
      S_BLOOM: begin
        ob_valid[ch] = b_valid;
        b_ready      = ob_ready[ch];
      end
      S_SOL: begin
        os_valid[ch] = s_valid;
        s_ready      = os_ready[ch];
      end
      S_STOP_T0: ot_valid[0] = 1'b1;
      S_STOP_T1: ot_valid[1] = 1'b1;
      S_STOP_S0: os_valid[0] = s_valid;
      S_STOP_S1: begin
        os_valid[1] = s_valid;
        s_ready     = os_ready[1];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_TUP;
      ch        <= 1'b0;
      stop_t    <= '0;
      routed[0] <= '0;
      routed[1] <= '0;
    end else begin
      unique case (state)
        S_TUP: if (t_valid) begin
          if (t_in.stop) begin
            stop_t <= t_in;
            state  <= S_STOP_T0;
          end else if (ot_ready[sel]) begin
            ch          <= sel;
            routed[sel] <= routed[sel] + 1;
            state       <= S_BLOOM;
          end
        end
        S_BLOOM:   if (b_valid && ob_ready[ch]) state <= S_SOL;
        S_SOL:     if (s_valid && os_ready[ch] && s_in.last) state <= S_TUP;
        S_STOP_T0: if (ot_ready[0]) state <= S_STOP_T1;
        S_STOP_T1: if (ot_ready[1]) state <= S_STOP_S0;
        S_STOP_S0: if (s_valid && os_ready[0]) state <= S_STOP_S1;
        S_STOP_S1: if (s_valid && os_ready[1]) state <= S_TUP;
        default:   state <= S_TUP;
      endcase
    end
  end

  a_stop_node: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_STOP_S0 && s_valid |-> s_in.node == STOP_NODE);
endmodule
