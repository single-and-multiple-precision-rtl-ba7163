// kom_stage4: fourth pipeline stage, the array of multioperand adders (MOAs).
//
// Each iteration adds the Karatsuba-Ofman products of one digit pair of A to
// the running sum. The products are split into n-bit halves (PLL/PLH,
// PML/PMH, PHL/PHH; PMH has n+1 bits) and every half goes to the column of
// its weight. Column m holds weight 2**(n*m) relative to the current
// iteration; the running sum from the previous iteration is moved down by
// two columns, so MOA_m also adds S_m+2(i-1) and the carry C_m+1(i-1):
//   MOA_0     : PLL_0 + S_2 + C_1 + CT
//   MOA_1     : PLH_0 + PML_0 + S_3 + C_2
//   MOA_2j    : PLL_j + PMH_j-1 + PHL_j-1 + S_2j+2 + C_2j+1
//   MOA_2j+1  : PLH_j + PML_j + PHH_j-1 + S_2j+3 + C_2j+2
//   MOA_p     : PHL_p/2-1 + PMH_p/2-1
//   S_p+1     : PHH_p/2-1
// Every sum S_m keeps n bits and every carry C_m 3 bits. Columns 0 and 1 of
// the result leave through stage 5 (which returns the carry CT).
//
// Multiple precision (blocks combined into a group): in a block that is not
// the right-most of its group MOA_0 adds the current MOA_p result {C_p,S_p}
// of the block to its right instead of CT, and MOA_1 adds that block's
// current PHH (its S_p+1). In a block that is not the left-most of its
// group, S_p, S_p+1 and C_p are replaced by S_0, S_1 and C_0 of the block to
// its left. These are the multiplexers of the multiple-precision design.
//
// Timing: when `acc` is high the registers take the new sums; when it is low
// they are cleared (the reset cycle between two multiplications).
//
// The column assignment follows the published algorithm and block
// diagrams; the neighbour inputs follow the published multiple-precision
// block diagram.
module kom_stage4
  import kom_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned P = 128
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      acc,
  input  logic [P/2-1:0][2*N-1:0]   pl,
  input  logic [P/2-1:0][2*N-1:0]   ph,
  input  logic [P/2-1:0][2*N:0]     pm,
  input  logic                      ct,         // from stage 5
  input  logic                      rightmost,  // block is the group's least significant
  input  logic                      leftmost,   // block is the group's most significant
  input  logic [N+1:0]              nb_lo_cs,   // [t-1] {C_p,S_p}(i)
  input  logic [N-1:0]              nb_lo_phh,  // [t-1] S_p+1(i)
  input  logic [N-1:0]              nb_hi_s0,   // [t+1] S_0(i-1)
  input  logic [N-1:0]              nb_hi_s1,   // [t+1] S_1(i-1)
  input  logic [CW-1:0]             nb_hi_c0,   // [t+1] C_0(i-1)
  output logic [P+1:0][N-1:0]       s_q,        // S_0 .. S_p+1
  output logic [P:0][CW-1:0]        c_q,        // C_0 .. C_p
  output logic [N+1:0]              cs_p_now,   // current {C_p,S_p} for block t+1
  output logic [N-1:0]              phh_now     // current S_p+1 for block t+1
);

  localparam int unsigned SW = N + CW;   // width of one column sum

  logic [P:0][SW-1:0] sum;

  always_comb begin
    for (int m = 0; m <= P; m++) begin
      logic [SW-1:0] acc_v;
      acc_v = '0;
      if (m % 2 == 0) begin
        if (m/2 < P/2)
          acc_v += SW'(pl[m/2][N-1:0]);                  // PLL_j
        if (m/2 >= 1) begin
          acc_v += SW'(pm[m/2-1][2*N:N]);                // PMH_j-1
          acc_v += SW'(ph[m/2-1][N-1:0]);                // PHL_j-1
        end
      end else begin
        acc_v += SW'(pl[m/2][2*N-1:N]);                  // PLH_j
        acc_v += SW'(pm[m/2][N-1:0]);                    // PML_j
        if (m/2 >= 1)
          acc_v += SW'(ph[m/2-1][2*N-1:N]);              // PHH_j-1
      end
      // previous iteration, moved down by two columns
      if (m == P-2)
        acc_v += SW'(leftmost ? s_q[P] : nb_hi_s0);
      else if (m == P-1)
        acc_v += SW'(leftmost ? s_q[P+1] : nb_hi_s1);
      else if (m < P-2)
        acc_v += SW'(s_q[m+2]);
      if (m == P-1)
        acc_v += SW'(leftmost ? c_q[P] : nb_hi_c0);
      else if (m < P-1)
        acc_v += SW'(c_q[m+1]);
      // links to the less significant neighbour or to stage 5
      if (m == 0) begin
        if (rightmost) acc_v += SW'(ct);
        else           acc_v += SW'(nb_lo_cs);
      end
      if (m == 1 && !rightmost)
        acc_v += SW'(nb_lo_phh);
      sum[m] = acc_v;
    end
  end

  assign cs_p_now = sum[P][N+1:0];
  assign phh_now  = ph[P/2-1][2*N-1:N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= '0;
      c_q <= '0;
    end else if (!acc) begin
      s_q <= '0;
      c_q <= '0;
    end else begin
      for (int m = 0; m <= P; m++) begin
        s_q[m] <= sum[m][N-1:0];
        c_q[m] <= sum[m][SW-1:N];
      end
      s_q[P+1] <= phh_now;
    end
  end

endmodule
