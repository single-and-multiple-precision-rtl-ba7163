// tb_kom_stage3: checks the Karatsuba-Ofman subtractors of stage 3. The
// inputs are built from random digits so that PM must equal the xprod
// product B_2j*A_2i+1 + B_2j+1*A_2i; PL and PH must pass unchanged.
module tb_kom_stage3;
  localparam int N = 16, P = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [P/2-1:0][2*N-1:0] pl, ph, pl_q, ph_q;
  logic [P/2-1:0][2*N+1:0] pt;
  logic [P/2-1:0][2*N:0] pm_q;
  kom_stage3 #(.N(N), .P(P)) dut (.*);

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
    longint unsigned xprod [P/2];
    pl = '0; ph = '0; pt = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 50; rep++) begin
      for (int j = 0; j < P/2; j++) begin
        longint unsigned a0, a1, b0, b1;
        a0 = (rep == 0) ? 64'hffff : 64'($urandom_range(0, 65535));
        a1 = (rep == 0) ? 64'hffff : 64'($urandom_range(0, 65535));
        b0 = (rep == 0) ? 64'hffff : 64'($urandom_range(0, 65535));
        b1 = (rep == 0) ? 64'hffff : 64'($urandom_range(0, 65535));
        pl[j] = 32'(a0 * b0);
        ph[j] = 32'(a1 * b1);
        pt[j] = 34'((a0 + a1) * (b0 + b1));
        xprod[j] = a0 * b1 + a1 * b0;
      end
      @(negedge clk);
      for (int j = 0; j < P/2; j++) begin
        check("PM", longint'(pm_q[j]) == xprod[j]);
        check("PL/PH pass", pl_q[j] == pl[j] && ph_q[j] == ph[j]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
