// tb_mpslkom_block: runs one block of the multiple-precision multiplier on
// its own (right-most and left-most of its group, no neighbours) under the
// shared sequencer, so that it must behave as a complete 128-bit multiplier.
// Checks both product halves of random and corner-case operands.
module tb_mpslkom_block;
  import kom_pkg::*;
  localparam int N = 16, P = 8, W = N * P;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, ready, load, it1, acc, sh5, cap, done;
  logic [0:0] sp_s1, sp_s4, sp_s5, sp_out;
  logic [W-1:0] a, b, p_lo, p_hi;
  logic [2*N-1:0] r1_low, mt, r2_low;
  logic [N+1:0] cs_p_now;
  logic [N-1:0] phh_now, s0, s1;
  logic [CW-1:0] c0;
  logic co;

  kom_ctrl #(.P(P), .SPW(1), .SPMAX(0)) u_ctrl (
    .clk, .rst_n, .start, .sp(1'b0), .ready, .load, .it1, .acc, .sh5, .cap,
    .done, .sp_s1, .sp_s4, .sp_s5, .sp_out
  );

  mpslkom_block #(.N(N), .P(P)) dut (
    .clk, .rst_n, .load, .it1, .acc, .sh5, .cap,
    .rm4(1'b1), .lm4(1'b1), .own5(1'b1), .rm5(1'b1), .lm5(1'b1),
    .a_in(a), .b_in(b), .r1_top_in('0), .pair_in(r1_low), .r1_low,
    .nb_lo_cs('0), .nb_lo_phh('0), .nb_hi_s0('0), .nb_hi_s1('0), .nb_hi_c0('0),
    .cs_p_now, .phh_now, .s0, .s1, .c0,
    .r2_top_in('0), .mt, .r2_low, .cin_nb(1'b0), .co, .p_lo, .p_hi
  );

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NOPS = 100;
  logic [W-1:0] av [NOPS], bv [NOPS];
  int seen = 0;
  always @(posedge clk) if (rst_n && done) begin
    logic [2*W-1:0] r;
    r = {{W{1'b0}}, av[seen]} * {{W{1'b0}}, bv[seen]};
    check("low half", p_lo == r[W-1:0]);
    check("high half", p_hi == r[2*W-1:W]);
    check("no carry out", co == 1'b0);
    seen++;
  end

  initial begin
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NOPS; i++) begin
      for (int k = 0; k < W/32; k++) begin av[i][k*32 +: 32] = $urandom; bv[i][k*32 +: 32] = $urandom; end
      if (i == 0) begin av[i] = '1; bv[i] = '1; end
      @(negedge clk);
      while (!ready) @(negedge clk);
      a = av[i]; b = bv[i]; start = 1;
      @(negedge clk);
      start = 0;
    end
    repeat (P + 10) @(negedge clk);
    check("all results", seen == NOPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
