// tb_slkom: checks the single-precision multiplier at 256-bit operands
// (16 digits of 16 bits) with random, all-ones, zero and one-hot operands,
// issued back to back. Checks both product halves against the simulator's
// wide multiplication, the latency p/2 + 5 and the issue interval p/2 + 1.
module tb_slkom;
  localparam int W = 256, N = 16, P = W / N;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, ready, done;
  logic [W-1:0] a, b, p_lo, p_hi;
  slkom #(.W(W), .N(N)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0d", what, cyc); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NOPS = 200;
  logic [W-1:0] av [NOPS], bv [NOPS];
  int sc [NOPS];
  int seen = 0;

  always @(posedge clk) if (rst_n && done) begin
    logic [2*W-1:0] r;
    r = {{W{1'b0}}, av[seen]} * {{W{1'b0}}, bv[seen]};
    check("low half", p_lo == r[W-1:0]);
    check("high half", p_hi == r[2*W-1:W]);
    check("latency", cyc - sc[seen] == P/2 + 5);
    seen++;
  end

  initial begin
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NOPS; i++) begin
      for (int k = 0; k < W/32; k++) begin av[i][k*32 +: 32] = $urandom; bv[i][k*32 +: 32] = $urandom; end
      case (i)
        0: begin av[i] = '1; bv[i] = '1; end
        1: begin av[i] = '0; end
        2: begin av[i] = W'(1) << (W-1); bv[i] = '1; end
        3: begin av[i] = '1; bv[i] = 1; end
        default: ;
      endcase
      @(negedge clk);
      while (!ready) @(negedge clk);
      a = av[i]; b = bv[i]; start = 1; sc[i] = cyc;
      if (i > 0) check("issue interval", sc[i] - sc[i-1] == P/2 + 1);
      @(negedge clk);
      start = 0;
    end
    repeat (P + 10) @(negedge clk);
    check("all results", seen == NOPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
