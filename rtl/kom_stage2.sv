// kom_stage2: second pipeline stage, the suboperand multipliers.
//
// For every digit pair j of B and the current digit pair i of A it forms the
// three Karatsuba-Ofman products
//   PL_j = B_2j   * A_2i               (n x n bits)
//   PH_j = B_2j+1 * A_2i+1             (n x n bits)
//   PT_j = R0S_j  * R1S                ((n+1) x (n+1) bits)
// using 1.5 p multipliers in all, and registers them. One cycle of latency.
module kom_stage2 #(
  parameter int unsigned N = 16,
  parameter int unsigned P = 128
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [P-1:0][N-1:0]       r0,
  input  logic [2*N-1:0]            pair,
  input  logic [N:0]                r1s,
  input  logic [P/2-1:0][N:0]       r0s,
  output logic [P/2-1:0][2*N-1:0]   pl_q,
  output logic [P/2-1:0][2*N-1:0]   ph_q,
  output logic [P/2-1:0][2*N+1:0]   pt_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pl_q <= '0;
      ph_q <= '0;
      pt_q <= '0;
    end else begin
      for (int j = 0; j < P/2; j++) begin
        pl_q[j] <= (2*N)'(r0[2*j])   * (2*N)'(pair[N-1:0]);
        ph_q[j] <= (2*N)'(r0[2*j+1]) * (2*N)'(pair[2*N-1:N]);
        pt_q[j] <= (2*N+2)'(r0s[j])  * (2*N+2)'(r1s);
      end
    end
  end

endmodule
