// slkom: sequential large Karatsuba-Ofman multiplier (single precision).
//
// Multiplies two unsigned W-bit operands into a 2W-bit product. The
// operands are cut into p = W/N digits of N bits. Each iteration takes the
// next pair of A digits (A_2i+1 A_2i) and multiplies it with all p/2 digit
// pairs of B at once, three n-bit multiplications per pair (Karatsuba-Ofman:
// low, high and the product of the digit sums), so the whole array needs
// 1.5 p multipliers. A row of multioperand adders keeps the running sum in
// carry-save form (n-bit sums, 3-bit carries); each iteration 2N finished
// product bits leave it and are shifted into R2. After p/2 iterations R2
// holds the lower W product bits and the align-and-add stage turns the
// remaining sums and carries into the upper W bits.
//
// Pipeline: stage 1 (operand registers, digit sums), stage 2 (multipliers),
// stage 3 (KO subtractors), stage 4 (multioperand adders), stage 5 (final
// n-bit adder and R2), then the independent align-and-add stage.
//
// Interface: assert `start` with `a`, `b` while `ready` is high. `done`
// pulses p/2 + 5 cycles later; in that cycle `p_lo` (R2, the single-size
// product) and `p_hi` hold the product. `p_lo` stays valid for two cycles,
// `p_hi` until the next result. A new multiplication can be started every
// p/2 + 1 cycles (the extra cycle loads the operands and clears the
// accumulator), so back-to-back multiplications overlap in the pipeline.
//
// The datapath follows the published design; the handshake and the exact
// pipeline registers are this design's own choices. Operands are unsigned.
module slkom #(
  parameter int unsigned W = 2048,
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         ready,
  output logic         done,
  output logic [W-1:0] p_lo,
  output logic [W-1:0] p_hi
);

  import kom_pkg::*;

  localparam int unsigned P = W / N;

  initial begin
    assert (W % (2*N) == 0 && P >= 4)
      else $fatal(1, "W must be a multiple of 2N with at least 4 digits");
  end

  logic load, it1, acc, sh5, cap;
  logic [0:0] sp_s1, sp_s4, sp_s5, sp_out;

  kom_ctrl #(.P(P), .SPW(1), .SPMAX(0)) u_ctrl (
    .clk, .rst_n, .start, .sp(1'b0), .ready, .load, .it1, .acc, .sh5, .cap,
    .done, .sp_s1, .sp_s4, .sp_s5, .sp_out
  );

  logic [2*N-1:0]            r1_low, pair;
  logic [P-1:0][N-1:0]       r0;
  logic [N:0]                r1s;
  logic [P/2-1:0][N:0]       r0s;

  kom_stage1 #(.N(N), .P(P)) u_s1 (
    .clk, .rst_n, .load, .shift(it1), .a_in(a), .b_in(b),
    .r1_top_in('0), .pair_in(r1_low), .r1_low, .r0,
    .pair_q(pair), .r1s_q(r1s), .r0s_q(r0s)
  );

  logic [P/2-1:0][2*N-1:0] pl2, ph2, pl3, ph3;
  logic [P/2-1:0][2*N+1:0] pt2;
  logic [P/2-1:0][2*N:0]   pm3;

  kom_stage2 #(.N(N), .P(P)) u_s2 (
    .clk, .rst_n, .r0, .pair, .r1s, .r0s, .pl_q(pl2), .ph_q(ph2), .pt_q(pt2)
  );

  kom_stage3 #(.N(N), .P(P)) u_s3 (
    .clk, .rst_n, .pl(pl2), .ph(ph2), .pt(pt2), .pl_q(pl3), .ph_q(ph3), .pm_q(pm3)
  );

  logic [P+1:0][N-1:0]  s;
  logic [P:0][CW-1:0]   c;
  logic                 ct;
  logic [N+1:0]         cs_p_unused;
  logic [N-1:0]         phh_unused;

  kom_stage4 #(.N(N), .P(P)) u_s4 (
    .clk, .rst_n, .acc, .pl(pl3), .ph(ph3), .pm(pm3), .ct,
    .rightmost(1'b1), .leftmost(1'b1),
    .nb_lo_cs('0), .nb_lo_phh('0), .nb_hi_s0('0), .nb_hi_s1('0), .nb_hi_c0('0),
    .s_q(s), .c_q(c), .cs_p_now(cs_p_unused), .phh_now(phh_unused)
  );

  logic [2*N-1:0]          mt_unused, r2_low_unused;
  logic [P/2-1:0][2*N-1:0] r2;

  kom_stage5 #(.N(N), .P(P)) u_s5 (
    .clk, .rst_n, .shift(sh5), .s0(s[0]), .s1(s[1]), .c0(c[0]),
    .use_own(1'b1), .r2_top_in('0), .mt(mt_unused), .ct, .r2, .r2_low(r2_low_unused)
  );

  logic co_unused;

  kom_align_add #(.N(N), .P(P)) u_aa (
    .clk, .rst_n, .capture(cap), .s, .c, .ct,
    .rightmost(1'b1), .leftmost(1'b1),
    .nb_hi_s0('0), .nb_hi_s1('0), .nb_hi_c0('0), .cin_nb(1'b0),
    .m_hi(p_hi), .co(co_unused)
  );

  assign p_lo = r2;

  // the operands are only taken while the multiplier is ready
  a_no_load_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    it1 |-> !load);

endmodule
