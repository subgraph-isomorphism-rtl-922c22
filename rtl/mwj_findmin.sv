// mwj_findmin: chooses the minimum set for one partial-solution packet.
//
// edgebuild proposes, per packet, one tuple for every query edge whose indexed
// node is the extension being mapped. For each tuple this block reads the
// bloom word at (table, low H1 bits of the indexing node's hash) from the
// bloom bank chosen by the MSB of that hash, and counts its set bits (the
// bloom "fullness"). The tuple with the emptiest bloom is the minset; it is
// sent out followed by its bloom word and then by the packet's solution nodes,
// which this block forwards so that tuple, bloom and solution stay aligned.
//
// Reading blooms, fullness as the selection measure, the bank chosen by hash
// MSB and forwarding the solution through this task follow the reference
// architecture. The bloom address layout, fullness as a popcount, ties going
// to the earliest tuple, and the output order are this design's choices.
//
// A stop tuple is forwarded as a stop tuple, then the stop node of the
// solution stream is forwarded; no bloom word is sent for it.
//
// Timing: two cycles per proposed tuple (the bloom memory answers one cycle
// after bl_rd_en), then one cycle each for tuple and bloom and one per
// solution node.
module mwj_findmin
  import less_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // tuples from edgebuild
  input  logic        t_valid,
  output logic        t_ready,
  input  fmin_tuple_t t_in,
  // solution packet from edgebuild
  input  logic        s_valid,
  output logic        s_ready,
  input  vertex_t     s_in,
  // bloom memory read port (data valid the cycle after bl_rd_en)
  output logic                        bl_rd_en,
  output logic                        bl_rd_bank,
  output logic [TABLE_W+H1_W-1:0]     bl_rd_addr,
  input  bloom_t                      bl_rd_data,
  // outputs to findchannel
  output logic        mt_valid,
  input  logic        mt_ready,
  output fmin_tuple_t mt_out,
  output logic        mb_valid,
  input  logic        mb_ready,
  output bloom_t      mb_out,
  output logic        ms_valid,
  input  logic        ms_ready,
  output vertex_t     ms_out
);
  typedef enum logic [2:0] {S_READ, S_WAIT, S_TUP, S_BLOOM, S_SOL} state_e;

  state_e      state;
  fmin_tuple_t cur, best;
  bloom_t      best_bloom;
  logic        have_best;
  logic [$clog2(BLOOM_W+1)-1:0] best_full, full;
  node_t       h;

  assign h = node_hash(t_in.indexing);

  assign t_ready    = (state == S_READ);
  assign bl_rd_en   = (state == S_READ) && t_valid && !t_in.stop;
  assign bl_rd_bank = h[NODE_W-1];
  assign bl_rd_addr = {t_in.tbl, h[H1_W-1:0]};

  always_comb begin
    full = '0;
    for (int i = 0; i < BLOOM_W; i++) full += bl_rd_data[i];
  end

  assign mt_valid = (state == S_TUP);
  assign mt_out   = best;
  assign mb_valid = (state == S_BLOOM);
  assign mb_out   = best_bloom;
  assign ms_valid = (state == S_SOL) && s_valid;
  assign ms_out   = s_in;
  assign s_ready  = (state == S_SOL) && ms_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_READ;
      cur        <= '0;
      best       <= '0;
      best_bloom <= '0;
      best_full  <= '0;
      have_best  <= 1'b0;
    end else begin
      unique case (state)
        S_READ: if (t_valid) begin
          cur <= t_in;
          if (t_in.stop) begin
            best  <= t_in;
            state <= S_TUP;
          end else begin
            state <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (!have_best || full < best_full) begin
            best       <= cur;
            best_bloom <= bl_rd_data;
            best_full  <= full;
          end
          have_best <= 1'b1;
          state     <= cur.last ? S_TUP : S_READ;
        end
        S_TUP: if (mt_ready) begin
          have_best <= 1'b0;
          state     <= best.stop ? S_SOL : S_BLOOM;
        end
        S_BLOOM: if (mb_ready) state <= S_SOL;
        S_SOL: if (s_valid && ms_ready && s_in.last) state <= S_READ;
        default: state <= S_READ;
      endcase
    end
  end

  a_mt_stable: assert property (@(posedge clk) disable iff (!rst_n)
    mt_valid && !mt_ready |=> mt_valid && $stable(mt_out));
endmodule
