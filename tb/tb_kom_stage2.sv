// tb_kom_stage2: checks the Karatsuba-Ofman multipliers of stage 2 with
// random digits, including all-ones digits, one cycle after the inputs.
module tb_kom_stage2;
  localparam int N = 16, P = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [P-1:0][N-1:0] r0;
  logic [2*N-1:0] pair;
  logic [N:0] r1s;
  logic [P/2-1:0][N:0] r0s;
  logic [P/2-1:0][2*N-1:0] pl_q, ph_q;
  logic [P/2-1:0][2*N+1:0] pt_q;
  kom_stage2 #(.N(N), .P(P)) dut (.*);

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
    r0 = '0; pair = '0; r1s = '0; r0s = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 50; rep++) begin
      for (int d = 0; d < P; d++) r0[d] = (rep == 0) ? '1 : N'($urandom);
      pair = (rep == 0) ? '1 : $urandom;
      r1s = (N+1)'(pair[N-1:0]) + (N+1)'(pair[2*N-1:N]);
      for (int j = 0; j < P/2; j++) r0s[j] = (N+1)'(r0[2*j]) + (N+1)'(r0[2*j+1]);
      @(negedge clk);
      for (int j = 0; j < P/2; j++) begin
        longint unsigned e_pl, e_ph, e_pt;
        e_pl = longint'(r0[2*j]) * longint'(pair[N-1:0]);
        e_ph = longint'(r0[2*j+1]) * longint'(pair[2*N-1:N]);
        e_pt = (longint'(r0[2*j]) + longint'(r0[2*j+1])) *
               (longint'(pair[N-1:0]) + longint'(pair[2*N-1:N]));
        check("PL", longint'(pl_q[j]) == e_pl);
        check("PH", longint'(ph_q[j]) == e_ph);
        check("PT", longint'(pt_q[j]) == e_pt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
