// kom_stage5: fifth pipeline stage, product digit generation.
//
// Adds S_1(i-1) and C_0(i-1) in an n-bit adder and appends S_0(i-1) below
// the sum: the result is the next 2n bits of the lower product half. The
// adder's carry out, CT, goes back to MOA_0 of stage 4 (and, after the last
// iteration, to the align-and-add stage). The 2n-bit results are shifted in
// from the top of the right shift register R2 (p/2 digits of 2n bits), so
// after p/2 iterations R2 holds the lower w bits of the product.
//
// Multiple precision: the value shifted into R2 is this block's own result
// when `use_own` is high; otherwise it is `r2_top_in`, which the enclosing
// design takes from the lowest R2 digit of the block to the left or, for the
// left-most block of a group, from the result of the group's right-most
// block.
//
// The adder, CT and R2 follow the published design. How R2 is fed in a
// combined group (left-most block fed by the group's right-most result) is
// this design's own reading of a multiplexer the published description
// leaves unclear.
//
// Timing: `mt` and `ct` are combinational from the stage-4 registers; R2
// shifts at the clock edge while `shift` is high.
module kom_stage5
  import kom_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned P = 128
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      shift,
  input  logic [N-1:0]              s0,
  input  logic [N-1:0]              s1,
  input  logic [CW-1:0]             c0,
  input  logic                      use_own,
  input  logic [2*N-1:0]            r2_top_in,
  output logic [2*N-1:0]            mt,        // {S_1 + C_0, S_0}
  output logic                      ct,
  output logic [P/2-1:0][2*N-1:0]   r2,
  output logic [2*N-1:0]            r2_low
);

  logic [N-1:0] hi;

  assign {ct, hi} = (N+1)'(s1) + (N+1)'(c0);
  assign mt       = {hi, s0};
  assign r2_low   = r2[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      r2 <= '0;
    else if (shift)
      r2 <= {(use_own ? mt : r2_top_in), r2[P/2-1:1]};
  end

endmodule
