// mwj_enlarge_sol: decompresses the partial-solution stream.
//
// The FIFO keeps partial solutions compressed: the radices shared by several
// solutions are stored once, followed by one extension per solution, so
// {A,B,C,D} and {A,B,C,E} travel as A B C D E (A, B, C flagged as radices).
// This block turns that into one self-contained packet per solution,
// A B C D(last) then A B C E(last), so that each packet can follow its own
// findmin tuple down either of the two channels.
//
// Rules:
//  - a radix (bit 31 set) that follows an extension starts a new radix group;
//  - FAKE_NODE is a radix that is not stored, so FAKE e1 e2 yields the
//    single-node packets {e1} and {e2};
//  - STOP_NODE is forwarded as a one-beat packet {STOP_NODE, last} and clears
//    the radix group;
//  - node ids leave with bit 31 cleared.
// Splitting decompression from full-solution marking (mwj_fulldetect) and
// placing it right after propose follows the reference architecture; the
// word-level rules for FAKE/STOP above are this design's reading of them.
//
// Interface: valid/ready word input, valid/ready vertex_t output. An
// extension is taken in one cycle and then emitted as (radices + 1) beats at
// one beat per cycle; the input is stalled meanwhile. At most MAX_QV-1
// radices are held.
module mwj_enlarge_sol
  import less_pkg::*;
#(
  parameter int unsigned MAXV = MAX_QV
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  node_t   in_word,
  output logic    out_valid,
  input  logic    out_ready,
  output vertex_t out
);
  localparam int unsigned CW = $clog2(MAXV + 1);

  typedef enum logic [1:0] {S_IN, S_EMIT, S_STOP} state_e;

  state_e        state;
  node_t         rad [MAXV];
  logic [CW-1:0] nrad, idx;
  logic          prev_ext;
  node_t         ext;

  logic is_radix;
  assign is_radix = in_word[RADIX_BIT];

  assign in_ready = (state == S_IN);

  always_comb begin
    out_valid = 1'b0;
    out       = '{node: '0, last: 1'b0};
    unique case (state)
      S_EMIT: begin
        out_valid = 1'b1;
        out.node  = (idx < nrad) ? rad[idx[$clog2(MAXV)-1:0]] : ext;
        out.last  = (idx == nrad);
      end
      S_STOP: begin
        out_valid = 1'b1;
        out.node  = STOP_NODE;
        out.last  = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IN;
      nrad     <= '0;
      idx      <= '0;
      prev_ext <= 1'b0;
      ext      <= '0;
    end else begin
      unique case (state)
        S_IN: if (in_valid) begin
          if (in_word == STOP_NODE) begin
            state    <= S_STOP;
            nrad     <= '0;
            prev_ext <= 1'b0;
          end else if (is_radix) begin
            // A radix after an extension opens a new group.
            if (in_word != FAKE_NODE) begin
              rad[prev_ext ? '0 : nrad[$clog2(MAXV)-1:0]] <= {1'b0, in_word[RADIX_BIT-1:0]};
              nrad <= prev_ext ? CW'(1) : nrad + 1'b1;
            end else if (prev_ext) begin
              nrad <= '0;
            end
            prev_ext <= 1'b0;
          end else begin
            ext      <= in_word;
            idx      <= '0;
            prev_ext <= 1'b1;
            state    <= S_EMIT;
          end
        end
        S_EMIT: if (out_ready) begin
          if (idx == nrad) state <= S_IN;
          else             idx   <= idx + 1'b1;
        end
        S_STOP: if (out_ready) state <= S_IN;
        default: state <= S_IN;
      endcase
    end
  end

  a_radix_room: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_IN && in_valid && is_radix && in_word != STOP_NODE &&
    in_word != FAKE_NODE && !prev_ext |-> nrad < CW'(MAXV - 1));
endmodule
