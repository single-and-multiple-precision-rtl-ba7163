// kom_align_add: the align-and-add stage, which produces the upper product
// half.
//
// After the last iteration the remaining columns of the running sum still
// carry the upper w bits of the product in redundant form: the sums
// S_2 .. S_p+1 form one w-bit vector SN and the 3-bit carries C_1 .. C_p,
// each zero-extended to n bits, form a second vector CN (carry C_k+1 sits in
// column k). A carry-propagate adder gives M_2w-1:w = SN + CN + CT.
//
// The stage is decoupled from the pipeline: `capture` (the cycle in which
// stage 4 holds the last iteration) stores SN, CN and the final CT, and the
// adder works on the stored copy while the pipeline runs the next
// multiplication.
//
// Multiple precision: in a block that is not the left-most of its group the
// two top sums S_p+1, S_p and the top carry C_p are taken from S_1, S_0 and
// C_0 of the block to its left; in a block that is not the right-most, the
// carry into the adder is the carry out CO of the block to its right instead
// of CT.
//
// The alignment follows the published design with two own choices: one
// full-width adder (a narrower, sequential adder is also allowed), and in a
// non-left-most block the top carry column takes C_0 of the block to the
// left. The published description puts 0 there, which would drop that
// carry.
module kom_align_add
  import kom_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned P = 128
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      capture,
  input  logic [P+1:0][N-1:0]       s,
  input  logic [P:0][CW-1:0]        c,
  input  logic                      ct,
  input  logic                      rightmost,
  input  logic                      leftmost,
  input  logic [N-1:0]              nb_hi_s0,
  input  logic [N-1:0]              nb_hi_s1,
  input  logic [CW-1:0]             nb_hi_c0,
  input  logic                      cin_nb,     // [t-1] CO
  output logic [P*N-1:0]            m_hi,
  output logic                      co
);

  logic [P-1:0][N-1:0] sn_q, cn_q;
  logic                ct_q, rm_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sn_q <= '0;
      cn_q <= '0;
      ct_q <= 1'b0;
      rm_q <= 1'b1;
    end else if (capture) begin
      for (int k = 0; k < P-2; k++) begin
        sn_q[k] <= s[k+2];
        cn_q[k] <= N'(c[k+1]);
      end
      sn_q[P-2] <= leftmost ? s[P]   : nb_hi_s0;
      sn_q[P-1] <= leftmost ? s[P+1] : nb_hi_s1;
      cn_q[P-2] <= N'(c[P-1]);
      cn_q[P-1] <= N'(leftmost ? c[P] : nb_hi_c0);
      ct_q      <= ct;
      rm_q      <= rightmost;
    end
  end

  assign {co, m_hi} = (P*N+1)'(sn_q) + (P*N+1)'(cn_q) + (P*N+1)'(rm_q ? ct_q : cin_nb);

endmodule
