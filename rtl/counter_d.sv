// counter_d -- Counter D: pass counter P and butterfly counter B.
//
// A transform of N points takes V = log4(N) passes. In each pass the
// butterfly counter B steps once per clock from 0 to N/4-1; every such clock
// issues one read of all four memory banks (rd_valid). The pass counter P is
// kept one-hot (V bits, P[p] set in pass p), which lets the barrel shifter
// and the twiddle address logic select their pass directly.
//
// A result is written back WR_DELAY clocks after its operands were read, so
// the next pass may only start once no word it reads is still in flight.
// Word a is read at clock RL(a, 2p) of pass p (RL: rotate left, the inverse
// of the barrel shifter) and at clock RL(a, 2p+2) of pass p+1; the gap
// between passes is the smallest number of clocks that puts every such read
// after the write, computed at elaboration time (GAP). It is 7 clocks for
// N = 64 and 0 from N = 256 on, where passes follow each other back to back.
// A gap, when there is one, is at least 4 clocks so that the register sets
// finish the last group of a pass undisturbed; during a gap and during the
// final drain of WR_DELAY clocks B keeps counting without reads. The gap,
// the start/busy/done handshake and the reset are this design's own.
//
// Timing: start is taken in a clock where busy is low. done rises with the
// CYCLES-th clock edge after the edge that took start, for one clock, when
// all results are in the memory banks; busy falls with it.
// CYCLES = V*N/4 + (V-1)*GAP + WR_DELAY (75 for N = 64).
module counter_d
  import fft_pkg::*;
#(
  parameter int N = 64,
  parameter int V = $clog2(N) / 2,
  parameter int M = $clog2(N / 4)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic [V-1:0] pass_oh,
  output logic [M-1:0] bcnt,
  output logic         rd_valid,
  output logic         draining,
  output logic         busy,
  output logic         done
);

  // rotate an M-bit word left by sh
  function automatic int rotl(int a, int sh);
    sh = sh % M;
    return ((a << sh) | (a >> (M - sh))) & ((1 << M) - 1);
  endfunction

  // clocks between the last read of a pass and the first read of the next
  function automatic int gap_len();
    int worst = 0;
    for (int p = 0; p < V - 1; p++)
      for (int a = 0; a < N / 4; a++)
        if (rotl(a, 2 * p) - rotl(a, 2 * p + 2) > worst)
          worst = rotl(a, 2 * p) - rotl(a, 2 * p + 2);
    worst = worst + WR_DELAY + 1 - N / 4;
    if (worst <= 0) return 0;
    return (worst < 4) ? 4 : worst;
  endfunction

  localparam int GAP    = gap_len();
  localparam int DRAIN  = WR_DELAY;
  localparam int CYCLES = V * (N / 4) + (V - 1) * GAP + DRAIN;
  localparam int DCW    = $clog2(DRAIN + 1);

  typedef enum logic [1:0] {IDLE, ISSUE, DRAIN_ST} state_t;

  state_t         state;
  logic [DCW-1:0] dcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      pass_oh <= '0;
      bcnt    <= '0;
      dcnt    <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          state   <= ISSUE;
          pass_oh <= V'(1);
          bcnt    <= '0;
        end
        ISSUE: begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == M'(N / 4 - 1)) begin
            dcnt <= '0;
            if (pass_oh[V-1] || GAP > 0) begin
              state <= DRAIN_ST;
            end else begin
              bcnt    <= '0;
              pass_oh <= pass_oh << 1;
            end
          end
        end
        DRAIN_ST: begin
          bcnt <= bcnt + 1'b1;
          dcnt <= dcnt + 1'b1;
          if (pass_oh[V-1] ? (dcnt == DCW'(DRAIN - 1)) : (dcnt == DCW'(GAP - 1))) begin
            bcnt <= '0;
            if (pass_oh[V-1]) begin
              state   <= IDLE;
              pass_oh <= '0;
              done    <= 1'b1;
            end else begin
              state   <= ISSUE;
              pass_oh <= pass_oh << 1;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign rd_valid = (state == ISSUE);
  assign draining = (state == DRAIN_ST);
  assign busy     = (state != IDLE);

  // the pass counter is one-hot whenever a transform runs
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                             busy |-> $onehot(pass_oh));

endmodule
