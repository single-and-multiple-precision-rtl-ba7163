// mpslkom: multiple-precision sequential large Karatsuba-Ofman multiplier.
//
// K identical blocks, each a sequential KO multiplier for W/K-bit operands
// (P = W/(K*N) digits of N bits), sit side by side. The precision code `sp`
// combines 2**sp adjacent blocks into one multiplier, so the design performs
// K/2**sp independent multiplications of (2**sp * W/K)-bit operands at once:
// with the default W = 2048, K = 8 that is 8 x 256, 4 x 512, 2 x 1024 or
// 1 x 2048 bits for sp = 0, 1, 2, 3.
//
// Within a group the blocks are joined at the points that the
// single-precision design leaves open: the R1 shift registers form one long
// shift register, every block multiplies the A digit pair at the bottom of
// the group's right-most block, the multioperand adders at the block
// borders exchange their edge columns, R2 becomes one long shift register
// fed by the group's right-most block, and the align-and-add adders form a
// carry chain. Each of these links is a 2:1 multiplexer controlled by `sp`.
//
// Operand and product layout: group g occupies bits
// [(g+1)*Wg-1 : g*Wg] of `a`, `b`, `p_lo` and `p_hi` with Wg = 2**sp * W/K;
// its product is {p_hi[group], p_lo[group]}.
//
// Timing: as the single-precision multiplier with p = 2**sp * P digits per
// group: `done` comes 2**sp * P/2 + 5 cycles after `start`, and a new
// multiplication (with any precision) can start every 2**sp * P/2 + 1
// cycles. `sp_out` gives the precision of the result flagged by `done`.
//
// The block structure and the neighbour multiplexers follow the published
// design; the A-pair broadcast, the R2 feed and the top carry column of the
// align-and-add stage are this design's corrections or choices (see
// kom_stage1, kom_stage5, kom_align_add), as is the operand layout.
module mpslkom
  import kom_pkg::*;
#(
  parameter int unsigned W = 2048,
  parameter int unsigned K = 8,
  parameter int unsigned N = 16,
  localparam int unsigned SPMAX = $clog2(K),
  localparam int unsigned SPW   = (SPMAX < 1) ? 1 : $clog2(SPMAX + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [SPW-1:0] sp,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic           ready,
  output logic           done,
  output logic [SPW-1:0] sp_out,
  output logic [W-1:0]   p_lo,
  output logic [W-1:0]   p_hi
);

  localparam int unsigned WB = W / K;     // block width
  localparam int unsigned P  = WB / N;    // digits per block

  initial begin
    assert ((1 << SPMAX) == K && WB % (2*N) == 0 && P >= 4)
      else $fatal(1, "K must be a power of two and W/K a multiple of 2N with at least 4 digits");
  end

  logic load, it1, acc, sh5, cap;
  logic [SPW-1:0] sp_s1, sp_s4, sp_s5;

  kom_ctrl #(.P(P), .SPW(SPW), .SPMAX(SPMAX)) u_ctrl (
    .clk, .rst_n, .start, .sp, .ready, .load, .it1, .acc, .sh5, .cap,
    .done, .sp_s1, .sp_s4, .sp_s5, .sp_out
  );

  // neighbour signals of all blocks
  logic [K-1:0][2*N-1:0] r1_low, r1_top_in, pair_in, mt, r2_low, r2_top_in;
  logic [K-1:0][N+1:0]   cs_p_now, nb_lo_cs;
  logic [K-1:0][N-1:0]   phh_now, nb_lo_phh, s0, s1, nb_hi_s0, nb_hi_s1;
  logic [K-1:0][CW-1:0]  c0, nb_hi_c0;
  logic [K-1:0]          co, cin_nb;
  logic [K-1:0]          rm4, lm4, rm5, lm5, own5;

  always_comb begin
    for (int t = 0; t < K; t++) begin
      // stage 1: R1 chain and A pair broadcast
      r1_top_in[t] = '0;
      if (t < K-1 && !is_leftmost(t, 32'(sp_s1)))
        r1_top_in[t] = r1_low[t+1];
      pair_in[t] = r1_low[group_base(t, 32'(sp_s1))];
      // stages 4 and 5: group position
      rm4[t]  = is_rightmost(t, 32'(sp_s4));
      lm4[t]  = is_leftmost(t, 32'(sp_s4));
      rm5[t]  = is_rightmost(t, 32'(sp_s5));
      lm5[t]  = is_leftmost(t, 32'(sp_s5));
      own5[t] = (sp_s5 == '0);
      // links to the less significant neighbour
      nb_lo_cs[t]  = (t > 0) ? cs_p_now[(t+K-1)%K] : '0;
      nb_lo_phh[t] = (t > 0) ? phh_now[(t+K-1)%K]  : '0;
      cin_nb[t]    = (t > 0) ? co[(t+K-1)%K]       : 1'b0;
      // links to the more significant neighbour
      nb_hi_s0[t] = (t < K-1) ? s0[(t+1)%K] : '0;
      nb_hi_s1[t] = (t < K-1) ? s1[(t+1)%K] : '0;
      nb_hi_c0[t] = (t < K-1) ? c0[(t+1)%K] : '0;
      // stage 5: R2 chain, fed by the group's right-most block
      if (lm5[t]) r2_top_in[t] = mt[group_base(t, 32'(sp_s5))];
      else        r2_top_in[t] = r2_low[(t+1)%K];
    end
  end

  for (genvar t = 0; t < K; t++) begin : g_blk
    mpslkom_block #(.N(N), .P(P)) u_blk (
      .clk, .rst_n, .load, .it1, .acc, .sh5, .cap,
      .rm4(rm4[t]), .lm4(lm4[t]), .own5(own5[t]), .rm5(rm5[t]), .lm5(lm5[t]),
      .a_in(a[t*WB +: WB]), .b_in(b[t*WB +: WB]),
      .r1_top_in(r1_top_in[t]), .pair_in(pair_in[t]), .r1_low(r1_low[t]),
      .nb_lo_cs(nb_lo_cs[t]), .nb_lo_phh(nb_lo_phh[t]),
      .nb_hi_s0(nb_hi_s0[t]), .nb_hi_s1(nb_hi_s1[t]), .nb_hi_c0(nb_hi_c0[t]),
      .cs_p_now(cs_p_now[t]), .phh_now(phh_now[t]),
      .s0(s0[t]), .s1(s1[t]), .c0(c0[t]),
      .r2_top_in(r2_top_in[t]), .mt(mt[t]), .r2_low(r2_low[t]),
      .cin_nb(cin_nb[t]), .co(co[t]),
      .p_lo(p_lo[t*WB +: WB]), .p_hi(p_hi[t*WB +: WB])
    );
  end

endmodule
