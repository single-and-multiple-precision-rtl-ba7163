// tb_kom_stage1: checks the operand registers and pre-adders of stage 1.
// Loads random operands, shifts R1 with random top inputs and compares R0,
// the lowest R1 digit pair and the registered sums R1S and R0S_j with values
// computed here from the operands.
module tb_kom_stage1;
  localparam int N = 8, P = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0, shift = 0;
  logic [P*N-1:0] a_in, b_in;
  logic [2*N-1:0] r1_top_in, pair_in, r1_low, pair_q;
  logic [P-1:0][N-1:0] r0;
  logic [N:0] r1s_q;
  logic [P/2-1:0][N:0] r0s_q;
  kom_stage1 #(.N(N), .P(P)) dut (.*);

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
    logic [P*N-1:0] model;
    pair_in = '0; r1_top_in = '0;
    a_in = '0; b_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 20; rep++) begin
      @(negedge clk);
      a_in = {$urandom, $urandom}; b_in = {$urandom, $urandom};
      load = 1; shift = 0;
      @(negedge clk);
      load = 0;
      model = a_in;
      check("R0 holds B", r0 == b_in);
      for (int i = 0; i < P/2; i++) begin
        check("R1 low digits", r1_low == model[2*N-1:0]);
        pair_in = r1_low;
        r1_top_in = 16'($urandom);
        shift = 1;
        @(negedge clk);
        shift = 0;
        check("pair register", pair_q == model[2*N-1:0]);
        check("R1S", r1s_q == (N+1)'(model[N-1:0]) + (N+1)'(model[2*N-1:N]));
        for (int j = 0; j < P/2; j++)
          check("R0S", r0s_q[j] == (N+1)'(b_in[2*j*N +: N]) + (N+1)'(b_in[(2*j+1)*N +: N]));
        model = {r1_top_in, model[P*N-1:2*N]};
      end
      check("R1 after shifts", dut.r1 == model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
