// kom_ctrl: sequencer of the sequential KO multipliers.
//
// A multiplication starts with one load cycle (`start` while `ready`), in
// which the operands are written into R0/R1, followed by ITER iterations in
// stage 1, ITER = (p/2) << sp, where p is the number of digits per block
// and 2**sp the number of blocks combined (sp = 0 in the single-precision
// multiplier). A new multiplication can thus begin every ITER + 1 cycles.
// The load cycle is also the reset cycle of the accumulator: it travels down
// the pipeline as a bubble and clears the stage-4 registers between two
// multiplications.
//
// Each iteration is followed through the pipeline by a valid bit, a "last"
// bit and its precision code:
//   stage 1 : iteration valid -> R1 shifts                (cycle s+1+i)
//   stage 4 : `acc` (MOA registers take new sums)         (cycle s+4+i)
//   stage 5 : `sh5` (R2 shifts), `cap` on the last one    (cycle s+5+i)
//   `done`  : one cycle after `cap`; the product is at the outputs
// so `done` comes ITER + 5 cycles after the start cycle s.
// `sp_s1`, `sp_s4`, `sp_s5` are the precision codes of the operations in
// stages 1, 4 and 5; `sp_out` is the code of the result flagged by `done`.
//
// The iteration count, the extra reset cycle and the resulting p/2 + 1
// cycles per multiplication follow the published design; the handshake,
// the sp encoding (log2 of the blocks per group) and carrying sp down the
// pipeline are this design's own choices.
module kom_ctrl #(
  parameter int unsigned P     = 128,  // digits per block
  parameter int unsigned SPW   = 1,    // width of the precision code
  parameter int unsigned SPMAX = 0     // largest legal precision code
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [SPW-1:0] sp,
  output logic           ready,
  output logic           load,
  output logic           it1,
  output logic           acc,
  output logic           sh5,
  output logic           cap,
  output logic           done,
  output logic [SPW-1:0] sp_s1,
  output logic [SPW-1:0] sp_s4,
  output logic [SPW-1:0] sp_s5,
  output logic [SPW-1:0] sp_out
);

  localparam int unsigned CNTW = $clog2((P/2) * (1 << SPMAX) + 1);

  logic [CNTW-1:0] cnt;            // iterations still to enter stage 1
  logic [5:2]      v, l;           // valid / last bits of stages 2..5
  logic            l6;
  logic [SPW-1:0]  sp2, sp3;

  assign ready = (cnt == '0);
  assign load  = start && ready;
  assign it1   = (cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      v      <= '0;
      l      <= '0;
      l6     <= 1'b0;
      sp_s1  <= '0;
      sp2    <= '0;
      sp3    <= '0;
      sp_s4  <= '0;
      sp_s5  <= '0;
      sp_out <= '0;
    end else begin
      if (load) begin
        cnt   <= CNTW'((P/2) << sp);
        sp_s1 <= sp;
      end else if (it1) begin
        cnt <= cnt - 1'b1;
      end
      v     <= {v[4:2], it1};
      l     <= {l[4:2], (cnt == CNTW'(1))};
      l6    <= l[5];
      sp2   <= sp_s1;
      sp3   <= sp2;
      sp_s4 <= sp3;
      sp_s5 <= sp_s4;
      if (l[5]) sp_out <= sp_s5;
    end
  end

  assign acc  = v[4];
  assign sh5  = v[5];
  assign cap  = l[5];
  assign done = l6;

  // a precision code above SPMAX has no meaning
  a_sp_legal: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> (int'(sp) <= int'(SPMAX)));

endmodule
