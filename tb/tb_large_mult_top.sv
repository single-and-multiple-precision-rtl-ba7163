// tb_large_mult_top: end-to-end test of both multipliers at their default
// size (2048-bit operands, 16-bit digits, 8 blocks).
//
// Single precision: random and corner-case (all ones) operands, issued back
// to back as soon as `sl_ready` rises; one start is also attempted while the
// multiplier is busy and must be ignored. Every product is compared with the
// product of the simulator's own wide multiplication, and the cycle count
// from start to done (p/2 + 5) and the issue interval (p/2 + 1) are checked.
// Multiple precision: every precision code sp = 0..3, with mode changes
// between back-to-back operations; each group's product is checked against
// the wide multiplication of its operand slices.
// Counted mechanisms: back-to-back issue, start ignored while busy, every
// precision mode, a change of precision between consecutive operations.
module tb_large_mult_top;

  localparam int W = 2048, N = 16, K = 8;
  localparam int P = W / N, PB = W / K / N;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          sl_start = 0, sl_ready, sl_done;
  logic [W-1:0]  sl_a, sl_b, sl_p_lo, sl_p_hi;
  logic          mp_start = 0, mp_ready, mp_done;
  logic [1:0]    mp_sp = 0, mp_sp_out;
  logic [W-1:0]  mp_a, mp_b, mp_p_lo, mp_p_hi;

  large_mult_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rand_w();
    logic [W-1:0] v;
    for (int i = 0; i < W/32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // ---------------- single precision ----------------
  localparam int NSL = 10;
  logic [W-1:0] sla [NSL], slb [NSL];
  int           sl_start_cyc [NSL];
  int           sl_issued = 0, sl_seen = 0, n_b2b = 0, n_busy_rej = 0;

  task automatic sl_driver();
    for (int i = 0; i < NSL; i++) begin
      case (i)
        0: begin sla[i] = '1; slb[i] = '1; end
        1: begin sla[i] = '1; slb[i] = rand_w(); end
        default: begin sla[i] = rand_w(); slb[i] = rand_w(); end
      endcase
      // wait for ready, then issue
      @(negedge clk);
      while (!sl_ready) @(negedge clk);
      sl_a = sla[i]; sl_b = slb[i]; sl_start = 1;
      sl_start_cyc[i] = cyc;
      if (i > 0) begin
        check("single-precision issue interval", sl_start_cyc[i] - sl_start_cyc[i-1] == P/2 + 1);
        if (sl_start_cyc[i] - sl_start_cyc[i-1] == P/2 + 1) n_b2b++;
      end
      @(negedge clk);
      sl_start = 0;
      sl_issued++;
      // one start request while busy must be ignored
      if (i == 2) begin
        sl_a = '0; sl_b = '0; sl_start = 1;
        check("busy start ignored", !sl_ready);
        if (!sl_ready) n_busy_rej++;
        @(negedge clk);
        sl_start = 0;
      end
    end
  endtask

  always @(posedge clk) if (rst_n && sl_done) begin
    logic [2*W-1:0] ref_p;
    ref_p = {{W{1'b0}}, sla[sl_seen]} * {{W{1'b0}}, slb[sl_seen]};
    check("single-precision product low", sl_p_lo == ref_p[W-1:0]);
    check("single-precision product high", sl_p_hi == ref_p[2*W-1:W]);
    check("single-precision latency", cyc - sl_start_cyc[sl_seen] == P/2 + 5);
    sl_seen++;
  end

  // ---------------- multiple precision ----------------
  localparam int NMP = 16;
  logic [W-1:0] mpa [NMP], mpb [NMP];
  logic [1:0]   mpsp [NMP];
  int           mp_start_cyc [NMP];
  int           mp_seen = 0, n_mode [4], n_switch = 0, n_mp_b2b = 0;
  int           prev_sp = -1;

  task automatic mp_driver();
    for (int i = 0; i < NMP; i++) begin
      mpa[i] = (i == 0) ? '1 : rand_w();
      mpb[i] = (i == 0) ? '1 : rand_w();
      mpsp[i] = 2'((i == 0) ? 0 : (i % 4));
      @(negedge clk);
      while (!mp_ready) @(negedge clk);
      mp_a = mpa[i]; mp_b = mpb[i]; mp_sp = mpsp[i]; mp_start = 1;
      mp_start_cyc[i] = cyc;
      if (i > 0 && mp_start_cyc[i] - mp_start_cyc[i-1] == ((PB/2) << mpsp[i-1]) + 1) n_mp_b2b++;
      if (prev_sp >= 0 && prev_sp != int'(mpsp[i])) n_switch++;
      prev_sp = int'(mpsp[i]);
      @(negedge clk);
      mp_start = 0;
    end
  endtask

  always @(posedge clk) if (rst_n && mp_done) begin
    int gw, ng;
    logic ok_lo, ok_hi;
    gw = (W / K) << mpsp[mp_seen];
    ng = W / gw;
    ok_lo = 1; ok_hi = 1;
    for (int g = 0; g < ng; g++) begin
      logic [2*W-1:0] ga, gb, ref_p;
      logic [W-1:0] mask;
      mask = (W'(1) << gw) - 1;
      if (gw == W) mask = '1;
      ga = {{W{1'b0}}, (mpa[mp_seen] >> (g*gw)) & mask};
      gb = {{W{1'b0}}, (mpb[mp_seen] >> (g*gw)) & mask};
      ref_p = ga * gb;
      if (((mp_p_lo >> (g*gw)) & mask) != (ref_p[W-1:0] & mask)) ok_lo = 0;
      if (((mp_p_hi >> (g*gw)) & mask) != ((ref_p >> gw) & {{W{1'b0}}, mask})) ok_hi = 0;
    end
    check("multi-precision product low", ok_lo);
    check("multi-precision product high", ok_hi);
    check("multi-precision sp_out", mp_sp_out == mpsp[mp_seen]);
    check("multi-precision latency", cyc - mp_start_cyc[mp_seen] == ((PB/2) << mpsp[mp_seen]) + 5);
    n_mode[mpsp[mp_seen]]++;
    mp_seen++;
  end

  initial begin
    sl_a = '0; sl_b = '0; mp_a = '0; mp_b = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fork
      sl_driver();
      mp_driver();
    join
    repeat (P + 10) @(posedge clk);
    check("all single-precision results seen", sl_seen == NSL);
    check("all multi-precision results seen", mp_seen == NMP);
    // every mechanism must have happened
    check("back-to-back single-precision issue", n_b2b > 0);
    check("start ignored while busy", n_busy_rej > 0);
    check("back-to-back multi-precision issue", n_mp_b2b > 0);
    check("precision change", n_switch > 0);
    for (int m = 0; m < 4; m++) check($sformatf("mode sp=%0d used", m), n_mode[m] > 0);
    $display("mechanisms: b2b=%0d busy_rej=%0d mp_b2b=%0d switch=%0d modes=%0d/%0d/%0d/%0d",
             n_b2b, n_busy_rej, n_mp_b2b, n_switch, n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
