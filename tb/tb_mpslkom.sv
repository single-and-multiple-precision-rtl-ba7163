// tb_mpslkom: checks the multiple-precision multiplier with 1024-bit
// operands, 8 blocks of 128 bits and 16-bit digits. Random and all-ones
// operands in all four precision modes, in random order and back to back;
// every group's product, the precision tag, the latency (p/2 << sp) + 5 and
// the issue interval (p/2 << sp) + 1 are checked.
module tb_mpslkom;
  localparam int W = 1024, K = 8, N = 16, PB = W / K / N;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, ready, done;
  logic [1:0] sp = 0, sp_out;
  logic [W-1:0] a, b, p_lo, p_hi;
  mpslkom #(.W(W), .K(K), .N(N)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0d", what, cyc); end
  endtask
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NOPS = 200;
  logic [W-1:0] av [NOPS], bv [NOPS];
  logic [1:0] spv [NOPS];
  int sc [NOPS];
  int seen = 0;
  int n_mode [4];

  always @(posedge clk) if (rst_n && done) begin
    int gw;
    logic ok_lo, ok_hi;
    gw = (W / K) << spv[seen];
    ok_lo = 1; ok_hi = 1;
    for (int g = 0; g < W / gw; g++) begin
      logic [2*W-1:0] ga, gb, r, mask2;
      logic [W-1:0] mask;
      mask = (gw == W) ? '1 : ((W'(1) << gw) - 1);
      mask2 = {{W{1'b0}}, mask};
      ga = {{W{1'b0}}, (av[seen] >> (g*gw)) & mask};
      gb = {{W{1'b0}}, (bv[seen] >> (g*gw)) & mask};
      r = ga * gb;
      if (((p_lo >> (g*gw)) & mask) != (r[W-1:0] & mask)) ok_lo = 0;
      if ((({{W{1'b0}}, p_hi} >> (g*gw)) & mask2) != ((r >> gw) & mask2)) ok_hi = 0;
    end
    check("low halves", ok_lo);
    check("high halves", ok_hi);
    check("precision tag", sp_out == spv[seen]);
    check("latency", cyc - sc[seen] == ((PB/2) << spv[seen]) + 5);
    n_mode[spv[seen]]++;
    seen++;
  end

  initial begin
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NOPS; i++) begin
      for (int k = 0; k < W/32; k++) begin av[i][k*32 +: 32] = $urandom; bv[i][k*32 +: 32] = $urandom; end
      spv[i] = 2'($urandom);
      if (i < 4) begin av[i] = '1; bv[i] = '1; spv[i] = 2'(i); end
      @(negedge clk);
      while (!ready) @(negedge clk);
      a = av[i]; b = bv[i]; sp = spv[i]; start = 1; sc[i] = cyc;
      if (i > 0) check("issue interval", sc[i] - sc[i-1] == ((PB/2) << spv[i-1]) + 1);
      @(negedge clk);
      start = 0;
    end
    repeat (W / N + 10) @(negedge clk);
    check("all results", seen == NOPS);
    for (int m = 0; m < 4; m++) check("mode used", n_mode[m] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
