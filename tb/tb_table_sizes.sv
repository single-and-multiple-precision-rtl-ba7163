// tb_table_sizes: runs the operand sizes of the published comparison tables
// below 2048 bits (the 2048-bit cases run in tb_large_mult_top):
//   single precision, 256 / 512 / 1024 bits: issue interval 9 / 17 / 33
//   multiple precision with 256-bit blocks, 512 bits (2 blocks) and
//   1024 bits (4 blocks), in every mode: interval 9 / 17 / 33 cycles.
// Each instance performs a few back-to-back random multiplications; the
// products and the cycles between consecutive starts are checked against
// these numbers.
module tb_table_sizes;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
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

  // ---- single precision instances ----
  for (genvar g = 0; g < 3; g++) begin : g_sl
    localparam int W = 256 << g;
    localparam int CYC = W / N / 2 + 1;     // Table 2 / Table 3 cycle count
    localparam int NOPS = 4;
    logic start = 0, ready, done;
    logic [W-1:0] a, b, p_lo, p_hi;
    logic [W-1:0] av [NOPS], bv [NOPS];
    int sc [NOPS];
    int seen = 0;
    logic fin = 0;
    slkom #(.W(W), .N(N)) dut (.*);
    always @(posedge clk) if (rst_n && done) begin
      logic [2*W-1:0] r;
      r = {{W{1'b0}}, av[seen]} * {{W{1'b0}}, bv[seen]};
      check($sformatf("SLKOM %0d product", W), {p_hi, p_lo} == r);
      seen++;
    end
    initial begin
      a = '0; b = '0;
      wait (rst_n);
      for (int i = 0; i < NOPS; i++) begin
        for (int k = 0; k < W/32; k++) begin av[i][k*32 +: 32] = $urandom; bv[i][k*32 +: 32] = $urandom; end
        @(negedge clk);
        while (!ready) @(negedge clk);
        a = av[i]; b = bv[i]; start = 1; sc[i] = cyc;
        if (i > 0) check($sformatf("SLKOM %0d cycles = %0d", W, CYC), sc[i] - sc[i-1] == CYC);
        @(negedge clk);
        start = 0;
      end
      repeat (CYC + 8) @(negedge clk);
      check($sformatf("SLKOM %0d all results", W), seen == NOPS);
      fin = 1;
    end
  end

  // ---- multiple precision instances, 256-bit blocks ----
  for (genvar g = 0; g < 2; g++) begin : g_mp
    localparam int K = 2 << g;
    localparam int W = 256 * K;
    localparam int NOPS = 8;
    logic start = 0, ready, done;
    logic [1:0] sp = 0, sp_out;
    logic [W-1:0] a, b, p_lo, p_hi;
    logic [W-1:0] av [NOPS], bv [NOPS];
    logic [1:0] spv [NOPS];
    int sc [NOPS];
    int seen = 0;
    logic fin = 0;
    mpslkom #(.W(W), .K(K), .N(N)) dut (
      .clk, .rst_n, .start, .sp(sp[$clog2($clog2(K)+1)-1:0]), .a, .b, .ready, .done,
      .sp_out(sp_out[$clog2($clog2(K)+1)-1:0]), .p_lo, .p_hi
    );
    if ($clog2($clog2(K)+1) < 2) begin : g_pad
      assign sp_out[1] = 1'b0;
    end
    always @(posedge clk) if (rst_n && done) begin
      int gw;
      logic ok;
      gw = 256 << spv[seen];
      ok = 1;
      for (int q = 0; q < W / gw; q++) begin
        logic [2*W-1:0] ga, gb, r, mask2;
        logic [W-1:0] mask;
        mask = (gw == W) ? '1 : ((W'(1) << gw) - 1);
        mask2 = {{W{1'b0}}, mask};
        ga = {{W{1'b0}}, (av[seen] >> (q*gw)) & mask};
        gb = {{W{1'b0}}, (bv[seen] >> (q*gw)) & mask};
        r = ga * gb;
        if (((p_lo >> (q*gw)) & mask) != (r[W-1:0] & mask)) ok = 0;
        if ((({{W{1'b0}}, p_hi} >> (q*gw)) & mask2) != ((r >> gw) & mask2)) ok = 0;
      end
      check($sformatf("MPSLKOM %0d mode %0d products", W, spv[seen]), ok);
      seen++;
    end
    initial begin
      a = '0; b = '0;
      wait (rst_n);
      for (int i = 0; i < NOPS; i++) begin
        for (int k = 0; k < W/32; k++) begin av[i][k*32 +: 32] = $urandom; bv[i][k*32 +: 32] = $urandom; end
        spv[i] = 2'(i % ($clog2(K) + 1));
        @(negedge clk);
        while (!ready) @(negedge clk);
        a = av[i]; b = bv[i]; sp = spv[i]; start = 1; sc[i] = cyc;
        // Table 4: 256-bit mode 9 cycles, 512-bit 17, 1024-bit 33
        if (i > 0) check($sformatf("MPSLKOM %0d mode %0d cycles", W, spv[i-1]),
                         sc[i] - sc[i-1] == (8 << spv[i-1]) + 1);
        @(negedge clk);
        start = 0;
      end
      repeat (80) @(negedge clk);
      check($sformatf("MPSLKOM %0d all results", W), seen == NOPS);
      fin = 1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (g_sl[0].fin && g_sl[1].fin && g_sl[2].fin && g_mp[0].fin && g_mp[1].fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
