// tb_kom_stage4: checks the multioperand adder array by value. For random
// partial products it computes, with wide integers, what the carry-save
// state must represent after an iteration:
//   V(i) = sum_j (PL_j + PM_j 2^n + PH_j 2^2n) 2^2nj + CT (or the neighbour
//          inputs) + V(i-1) without its two lowest columns, moved down 2n,
// where V = sum_m S_m 2^nm + sum_m C_m 2^n(m+1), and compares it with the
// registers. Runs both as a stand-alone block and with every neighbour
// input in use, and checks that the reset cycle clears the state.
module tb_kom_stage4;
  import kom_pkg::*;
  localparam int N = 8, P = 8;
  localparam int VW = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic acc = 0, ct = 0, rightmost = 1, leftmost = 1;
  logic [P/2-1:0][2*N-1:0] pl, ph;
  logic [P/2-1:0][2*N:0] pm;
  logic [N+1:0] nb_lo_cs, cs_p_now;
  logic [N-1:0] nb_lo_phh, nb_hi_s0, nb_hi_s1, phh_now;
  logic [CW-1:0] nb_hi_c0;
  logic [P+1:0][N-1:0] s_q;
  logic [P:0][CW-1:0] c_q;
  kom_stage4 #(.N(N), .P(P)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [VW-1:0] value(input logic [P+1:0][N-1:0] s, input logic [P:0][CW-1:0] c);
    logic [VW-1:0] v = '0;
    for (int m = 0; m <= P+1; m++) v += VW'(s[m]) << (N*m);
    for (int m = 0; m <= P; m++)   v += VW'(c[m]) << (N*(m+1));
    return v;
  endfunction

  initial begin
    logic [VW-1:0] expv, prev_hi, prod;
    pl = '0; ph = '0; pm = '0;
    nb_lo_cs = '0; nb_lo_phh = '0; nb_hi_s0 = '0; nb_hi_s1 = '0; nb_hi_c0 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int mode = 0; mode < 2; mode++) begin
      rightmost = (mode == 0);
      leftmost  = (mode == 0);
      for (int rep = 0; rep < 40; rep++) begin
        for (int j = 0; j < P/2; j++) begin
          pl[j] = (rep == 1) ? '1 : 16'($urandom);
          ph[j] = (rep == 1) ? '1 : 16'($urandom);
          pm[j] = (rep == 1) ? '1 : 17'($urandom);
        end
        ct = (rep == 1) ? 1'b1 : 1'($urandom);
        nb_lo_cs = (rep == 1) ? '1 : 10'($urandom);
        nb_lo_phh = 8'($urandom);
        nb_hi_s0 = 8'($urandom); nb_hi_s1 = 8'($urandom); nb_hi_c0 = 3'($urandom);
        acc = (rep % 7 != 0);
        // expected new state
        prod = '0;
        for (int j = 0; j < P/2; j++)
          prod += (VW'(pl[j]) + (VW'(pm[j]) << N) + (VW'(ph[j]) << (2*N))) << (2*N*j);
        prev_hi = '0;
        for (int m = 2; m <= P+1; m++) begin
          logic [N-1:0] sv;
          sv = s_q[m];
          if (!leftmost && m == P)   sv = nb_hi_s0;
          if (!leftmost && m == P+1) sv = nb_hi_s1;
          prev_hi += VW'(sv) << (N*(m-2));
        end
        for (int m = 1; m <= P; m++) begin
          logic [CW-1:0] cv;
          cv = c_q[m];
          if (!leftmost && m == P) cv = nb_hi_c0;
          prev_hi += VW'(cv) << (N*(m-1));
        end
        expv = prod + prev_hi;
        if (rightmost) expv += VW'(ct);
        else           expv += VW'(nb_lo_cs) + (VW'(nb_lo_phh) << N);
        #1;
        check("MOA_p output", cs_p_now == (N+2)'(ph[P/2-1][N-1:0]) + (N+2)'(pm[P/2-1][2*N:N]));
        check("PHH to neighbour", phh_now == ph[P/2-1][2*N-1:N]);
        @(negedge clk);
        if (acc) check("carry-save value", value(s_q, c_q) == expv);
        else     check("reset cycle clears", value(s_q, c_q) == '0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
