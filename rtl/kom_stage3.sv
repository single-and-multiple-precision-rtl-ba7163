// kom_stage3: third pipeline stage, the p/2 three-operand subtractors of the
// Karatsuba-Ofman method.
//   PM_j = PT_j - PH_j - PL_j  = B_2j * A_2i+1 + B_2j+1 * A_2i
// PM_j needs 2n+1 bits. PL_j and PH_j are passed on with it. One cycle of
// latency.
module kom_stage3 #(
  parameter int unsigned N = 16,
  parameter int unsigned P = 128
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [P/2-1:0][2*N-1:0]   pl,
  input  logic [P/2-1:0][2*N-1:0]   ph,
  input  logic [P/2-1:0][2*N+1:0]   pt,
  output logic [P/2-1:0][2*N-1:0]   pl_q,
  output logic [P/2-1:0][2*N-1:0]   ph_q,
  output logic [P/2-1:0][2*N:0]     pm_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pl_q <= '0;
      ph_q <= '0;
      pm_q <= '0;
    end else begin
      pl_q <= pl;
      ph_q <= ph;
      for (int j = 0; j < P/2; j++)
        pm_q[j] <= (2*N+1)'(pt[j] - (2*N+2)'(ph[j]) - (2*N+2)'(pl[j]));
    end
  end

endmodule
