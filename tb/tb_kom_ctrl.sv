// tb_kom_ctrl: checks the sequencer timing for every precision code:
// the load cycle, (p/2 << sp) stage-1 iterations, the stage-4 and stage-5
// strobes 3 and 4 cycles later, the capture on the last iteration, `done`
// (p/2 << sp) + 5 cycles after the start, the issue interval
// (p/2 << sp) + 1 and that a start while busy is ignored.
module tb_kom_ctrl;
  localparam int P = 8, SPW = 2, SPMAX = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0;
  logic [SPW-1:0] sp = 0, sp_s1, sp_s4, sp_s5, sp_out;
  logic ready, load, it1, acc, sh5, cap, done;
  kom_ctrl #(.P(P), .SPW(SPW), .SPMAX(SPMAX)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // strobe history, sampled at each rising edge
  int cyc = 0;
  logic [1023:0] h_it1, h_acc, h_sh5, h_cap, h_done, h_load;
  always @(posedge clk) begin
    h_it1[cyc] <= it1; h_acc[cyc] <= acc; h_sh5[cyc] <= sh5;
    h_cap[cyc] <= cap; h_done[cyc] <= done; h_load[cyc] <= load;
    cyc <= cyc + 1;
  end

  initial begin
    int s [8];
    int spv [8];
    h_it1 = '0; h_acc = '0; h_sh5 = '0; h_cap = '0; h_done = '0; h_load = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int op = 0; op < 8; op++) begin
      spv[op] = op % 3;
      @(negedge clk);
      while (!ready) @(negedge clk);
      sp = SPW'(spv[op]); start = 1; s[op] = cyc;
      @(negedge clk);
      // a start one cycle later is refused
      check("busy after load", !ready);
      if (op == 3) begin start = 1; @(negedge clk); end
      start = 0;
    end
    repeat (60) @(negedge clk);
    for (int op = 0; op < 8; op++) begin
      int it;
      it = (P/2) << spv[op];
      check("load strobe", h_load[s[op]]);
      for (int i = 0; i < it; i++) begin
        check("stage-1 iteration", h_it1[s[op]+1+i]);
        check("stage-4 accumulate", h_acc[s[op]+4+i]);
        check("stage-5 shift", h_sh5[s[op]+5+i]);
        check("no early capture", !h_cap[s[op]+5+i] || i == it-1);
      end
      check($sformatf("%s op%0d sp%0d", "reset bubble after iterations", op, spv[op]), !h_it1[s[op]+1+it]);
      check($sformatf("%s op%0d sp%0d", "capture on last iteration", op, spv[op]), h_cap[s[op]+4+it]);
      check($sformatf("%s op%0d sp%0d", "done latency", op, spv[op]), h_done[s[op]+5+it] && !h_done[s[op]+4+it]);
      if (op < 7) check($sformatf("%s op%0d sp%0d", "issue interval", op, spv[op]), s[op+1] - s[op] == it + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
