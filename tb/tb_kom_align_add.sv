// tb_kom_align_add: checks the align-and-add stage. Random final sums,
// carries and CT are captured; the upper product half must equal
//   sum_k S_k+2 2^nk + sum_k C_k+1 2^nk + CT   (k = 0 .. p-1)
// with the neighbour substitutions when the block is not at the edge of
// its group. Also checks that the result is held while new values arrive.
module tb_kom_align_add;
  import kom_pkg::*;
  localparam int N = 8, P = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic capture = 0, ct = 0, rightmost = 1, leftmost = 1, cin_nb = 0, co;
  logic [P+1:0][N-1:0] s;
  logic [P:0][CW-1:0] c;
  logic [N-1:0] nb_hi_s0, nb_hi_s1;
  logic [CW-1:0] nb_hi_c0;
  logic [P*N-1:0] m_hi;
  kom_align_add #(.N(N), .P(P)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [P*N:0] e;
    s = '0; c = '0; nb_hi_s0 = '0; nb_hi_s1 = '0; nb_hi_c0 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 60; rep++) begin
      for (int m = 0; m <= P+1; m++) s[m] = (rep == 0) ? '1 : 8'($urandom);
      for (int m = 0; m <= P; m++)   c[m] = (rep == 0) ? '1 : 3'($urandom);
      ct = (rep == 0) ? 1'b1 : 1'($urandom);
      nb_hi_s0 = 8'($urandom); nb_hi_s1 = 8'($urandom); nb_hi_c0 = 3'($urandom);
      rightmost = (rep % 4 < 2);
      leftmost = (rep % 2 == 0);
      cin_nb = 1'($urandom);
      e = '0;
      for (int k = 0; k < P; k++) begin
        logic [N-1:0] sv;
        logic [CW-1:0] cv;
        sv = s[k+2]; cv = c[k+1];
        if (!leftmost && k == P-2) sv = nb_hi_s0;
        if (!leftmost && k == P-1) begin sv = nb_hi_s1; cv = nb_hi_c0; end
        e += ((P*N+1)'(sv) + (P*N+1)'(cv)) << (N*k);
      end
      e += (P*N+1)'(rightmost ? ct : cin_nb);
      capture = 1;
      @(negedge clk);
      capture = 0;
      check("upper half", m_hi == e[P*N-1:0]);
      check("carry out", co == e[P*N]);
      s = '0; c = '0;
      @(negedge clk);
      check("held after capture", m_hi == e[P*N-1:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
