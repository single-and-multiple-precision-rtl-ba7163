// kom_stage1: first pipeline stage of the sequential KO multiplier.
//
// Holds the operand registers R0 (multiplicand B, p digits of n bits, kept
// for the whole multiplication) and R1 (multiplier A, a right shift register
// that drops the two lowest digits, 2n bits, per iteration) and computes the
// p/2 + 1 pre-adder sums of the KO method:
//   R0S_j = R0_2j + R0_2j+1   (j = 0 .. p/2-1)     R1S = A_2i + A_2i+1
// The sums and the A digit pair used in this iteration are registered at the
// end of the stage. R0 itself is read directly by stage 2 (as drawn in the
// block diagram), which is why a new operand may only be loaded one cycle
// after the last iteration has left stage 1.
//
// Multiple precision: the value shifted into the top of R1 comes from the
// neighbouring (more significant) block when blocks are combined, 0
// otherwise; the A pair multiplied comes from the right-most block of the
// group. In the single-precision multiplier `r1_top_in` is 0 and `pair_in`
// is this block's own `r1_low`.
//
// The registers, the pre-adders and the R1 shift multiplexer follow the
// published design; sending the group's A pair to every block of a group
// (pair_in) and the register at the end of the stage are this design's own
// choices - the published description leaves them open.
//
// Timing: `load` writes R0/R1 at the clock edge; while `shift` is high R1
// shifts by 2n bits per cycle. The X1 outputs follow their inputs by one
// cycle.
module kom_stage1 #(
  parameter int unsigned N = 16,   // suboperand width n
  parameter int unsigned P = 128   // number of suboperands p (even)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic                    shift,
  input  logic [P*N-1:0]          a_in,
  input  logic [P*N-1:0]          b_in,
  input  logic [2*N-1:0]          r1_top_in,  // shifted into R1's top digit pair
  input  logic [2*N-1:0]          pair_in,    // A digit pair multiplied in this iteration
  output logic [2*N-1:0]          r1_low,     // R1 digits 1:0
  output logic [P-1:0][N-1:0]     r0,         // R0 digits (to stage 2)
  output logic [2*N-1:0]          pair_q,     // registered A pair {A_2i+1, A_2i}
  output logic [N:0]              r1s_q,      // registered R1S
  output logic [P/2-1:0][N:0]     r0s_q       // registered R0S_j
);

  logic [P*N-1:0] r1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0 <= '0;
      r1 <= '0;
    end else if (load) begin
      r0 <= b_in;
      r1 <= a_in;
    end else if (shift) begin
      r1 <= {r1_top_in, r1[P*N-1:2*N]};
    end
  end

  assign r1_low = r1[2*N-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pair_q <= '0;
      r1s_q  <= '0;
      r0s_q  <= '0;
    end else begin
      pair_q <= pair_in;
      r1s_q  <= (N+1)'(pair_in[N-1:0]) + (N+1)'(pair_in[2*N-1:N]);
      for (int j = 0; j < P/2; j++)
        r0s_q[j] <= (N+1)'(r0[2*j]) + (N+1)'(r0[2*j+1]);
    end
  end

endmodule
