// mwj_homomorphism: removes homomorphic candidates in one channel.
//
// For each partial-solution packet it receives the packet's nodes, one minset
// word (from readmin edge) and the candidate nodes read from the minset's
// edges. A candidate that is already a node of the partial solution would map
// two query nodes onto one data node (a homomorphism, not an isomorphism) and
// is dropped. The output (hstream) is the joined sequence the merge task
// expects: solution nodes with last on the final one, the minset word, then
// the surviving candidates with last on the final one. If no candidate
// survives, a single terminator beat (nil = 1, last = 1) closes the set.
// A stop node on the solution input is forwarded alone as {STOP_NODE, last}.
//
// Dropping candidates already in the solution, and the three-part sequence,
// follow the reference architecture; the terminator beat and one-candidate
// look-behind (needed to flag the last survivor) are this design's choices.
//
// Timing: one beat per cycle; each candidate is compared with all stored
// solution nodes in the same cycle. The last survivor leaves one cycle after
// the last candidate arrives.
module mwj_homomorphism
  import less_pkg::*;
#(
  parameter int unsigned MAXV = MAX_QV
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    s_valid,
  output logic    s_ready,
  input  vertex_t s_in,
  input  logic    m_valid,
  output logic    m_ready,
  input  node_t   m_in,
  input  logic    e_valid,
  output logic    e_ready,
  input  vertex_t e_in,
  output logic    h_valid,
  input  logic    h_ready,
  output seq_t    h_out,
  output logic [31:0] dropped
);
  localparam int unsigned CW = $clog2(MAXV + 1);

  typedef enum logic [1:0] {S_SOL, S_MIN, S_EDGE, S_FLUSH} state_e;

  state_e        state;
  node_t         mem [MAXV];
  logic [CW-1:0] n, len;
  node_t         pend;
  logic          pend_v;
  logic          hit;

  always_comb begin
    hit = 1'b0;
    for (int i = 0; i < MAXV; i++)
      if (CW'(i) < len && mem[i] == e_in.node) hit = 1'b1;
  end

  always_comb begin
    s_ready = 1'b0;
    m_ready = 1'b0;
    e_ready = 1'b0;
    h_valid = 1'b0;
    h_out   = '{node: '0, last: 1'b0, nil: 1'b0};
    unique case (state)
      S_SOL: begin
        h_valid = s_valid;
        h_out   = '{node: s_in.node, last: s_in.last, nil: 1'b0};
        s_ready = h_ready;
      end
      S_MIN: begin
        h_valid = m_valid;
        h_out   = '{node: m_in, last: 1'b0, nil: 1'b0};
        m_ready = h_ready;
      end
      S_EDGE: if (e_valid) begin
        if (!pend_v) begin
          if (!e_in.last) begin
            e_ready = 1'b1;                       // keep as pending or drop
          end else begin
            h_valid = 1'b1;
            h_out   = hit ? '{node: '0, last: 1'b1, nil: 1'b1}
                          : '{node: e_in.node, last: 1'b1, nil: 1'b0};
            e_ready = h_ready;
          end
        end else begin
          if (hit && !e_in.last) begin
            e_ready = 1'b1;                       // drop, pending stays
          end else begin
            h_valid = 1'b1;
            h_out   = '{node: pend, last: e_in.last && hit, nil: 1'b0};
            e_ready = h_ready;
          end
        end
      end
      S_FLUSH: begin
        h_valid = 1'b1;
        h_out   = '{node: pend, last: 1'b1, nil: 1'b0};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_SOL;
      n       <= '0;
      len     <= '0;
      pend    <= '0;
      pend_v  <= 1'b0;
      dropped <= '0;
    end else begin
      unique case (state)
        S_SOL: if (s_valid && h_ready) begin
          if (s_in.node == STOP_NODE) begin
            n <= '0;
          end else begin
            if (n < CW'(MAXV)) mem[n[$clog2(MAXV)-1:0]] <= s_in.node;
            if (s_in.last) begin
              n     <= '0;
              len   <= (n < CW'(MAXV)) ? n + 1'b1 : CW'(MAXV);
              state <= S_MIN;
            end else begin
              n <= n + 1'b1;
            end
          end
        end
        S_MIN: if (m_valid && h_ready) state <= S_EDGE;
        S_EDGE: if (e_valid && e_ready) begin
          if (hit) dropped <= dropped + 1;
          if (!hit) begin
            pend   <= e_in.node;
            pend_v <= 1'b1;
          end
          if (e_in.last) begin
            if (pend_v && !hit) state <= S_FLUSH;
            else begin
              pend_v <= 1'b0;
              state  <= S_SOL;
            end
          end
        end
        S_FLUSH: if (h_ready) begin
          pend_v <= 1'b0;
          state  <= S_SOL;
        end
        default: state <= S_SOL;
      endcase
    end
  end
endmodule
