// tb_kom_stage5: checks the product-digit adder (S_1 + C_0, CT, S_0 below)
// and the R2 shift register, both with its own result and with the
// neighbour input shifted in.
module tb_kom_stage5;
  import kom_pkg::*;
  localparam int N = 16, P = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic shift = 0, use_own = 1, ct;
  logic [N-1:0] s0, s1;
  logic [CW-1:0] c0;
  logic [2*N-1:0] r2_top_in, mt, r2_low;
  logic [P/2-1:0][2*N-1:0] r2;
  kom_stage5 #(.N(N), .P(P)) dut (.*);

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
    logic [P/2-1:0][2*N-1:0] model;
    s0 = '0; s1 = '0; c0 = '0; r2_top_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    model = '0;
    for (int rep = 0; rep < 60; rep++) begin
      logic [N:0] e;
      s0 = 16'($urandom); s1 = (rep < 3) ? '1 : 16'($urandom); c0 = 3'($urandom);
      r2_top_in = $urandom;
      use_own = (rep % 5 != 4);
      shift = (rep % 9 != 8);
      e = (N+1)'(s1) + (N+1)'(c0);
      #1;
      check("digit sum", mt == {e[N-1:0], s0});
      check("CT", ct == e[N]);
      if (shift) model = {(use_own ? mt : r2_top_in), model[P/2-1:1]};
      @(negedge clk);
      check("R2 contents", r2 == model);
      check("R2 lowest digit", r2_low == model[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
