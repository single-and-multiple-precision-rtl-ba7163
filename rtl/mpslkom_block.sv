// mpslkom_block: one column ("block") of the multiple-precision sequential
// KO multiplier.
//
// A block is a complete (w/k)-bit sequential KO multiplier - stages 1 to 5
// and its part of the align-and-add stage - with extra inputs that let it
// work as one slice of a wider multiplier. The enclosing design tells the
// block, separately for the operations in stage 1, in stages 4/5 and at the
// capture of the align-and-add stage, whether it is the right-most (least
// significant) and/or left-most (most significant) block of its group, and
// routes the neighbour signals:
//   stage 1 : R1 top input (0 or R1 digits 1:0 of block t+1); the A digit
//             pair multiplied (the group's right-most R1 digits 1:0)
//   stage 4 : {C_p,S_p} and S_p+1 of block t-1 (current iteration);
//             S_0, S_1, C_0 of block t+1 (previous iteration)
//   stage 5 : R2 top input when the block is not alone in its group
//   align   : S_0, S_1, C_0 of block t+1; carry out CO of block t-1
// A block that is both right-most and left-most is a plain single-precision
// multiplier of P digits.
//
// Timing is the one of the single-precision multiplier: the control strobes
// come from the shared sequencer (kom_ctrl).
module mpslkom_block
  import kom_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned P = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // sequencer
  input  logic                    load,
  input  logic                    it1,
  input  logic                    acc,
  input  logic                    sh5,
  input  logic                    cap,
  // group position of the operations in stage 4 and in stage 5 / capture
  input  logic                    rm4,
  input  logic                    lm4,
  input  logic                    own5,   // block forms a group of its own
  input  logic                    rm5,
  input  logic                    lm5,
  // operands
  input  logic [P*N-1:0]          a_in,
  input  logic [P*N-1:0]          b_in,
  // stage 1 links
  input  logic [2*N-1:0]          r1_top_in,
  input  logic [2*N-1:0]          pair_in,
  output logic [2*N-1:0]          r1_low,
  // stage 4 links
  input  logic [N+1:0]            nb_lo_cs,
  input  logic [N-1:0]            nb_lo_phh,
  input  logic [N-1:0]            nb_hi_s0,
  input  logic [N-1:0]            nb_hi_s1,
  input  logic [CW-1:0]           nb_hi_c0,
  output logic [N+1:0]            cs_p_now,
  output logic [N-1:0]            phh_now,
  output logic [N-1:0]            s0,
  output logic [N-1:0]            s1,
  output logic [CW-1:0]           c0,
  // stage 5 links
  input  logic [2*N-1:0]          r2_top_in,
  output logic [2*N-1:0]          mt,
  output logic [2*N-1:0]          r2_low,
  // align-and-add links
  input  logic                    cin_nb,
  output logic                    co,
  // results
  output logic [P*N-1:0]          p_lo,
  output logic [P*N-1:0]          p_hi
);

  logic [P-1:0][N-1:0]       r0;
  logic [2*N-1:0]            pair;
  logic [N:0]                r1s;
  logic [P/2-1:0][N:0]       r0s;

  kom_stage1 #(.N(N), .P(P)) u_s1 (
    .clk, .rst_n, .load, .shift(it1), .a_in, .b_in,
    .r1_top_in, .pair_in, .r1_low, .r0,
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

  kom_stage4 #(.N(N), .P(P)) u_s4 (
    .clk, .rst_n, .acc, .pl(pl3), .ph(ph3), .pm(pm3), .ct,
    .rightmost(rm4), .leftmost(lm4),
    .nb_lo_cs, .nb_lo_phh, .nb_hi_s0, .nb_hi_s1, .nb_hi_c0,
    .s_q(s), .c_q(c), .cs_p_now, .phh_now
  );

  assign s0 = s[0];
  assign s1 = s[1];
  assign c0 = c[0];

  logic [P/2-1:0][2*N-1:0] r2;

  kom_stage5 #(.N(N), .P(P)) u_s5 (
    .clk, .rst_n, .shift(sh5), .s0(s[0]), .s1(s[1]), .c0(c[0]),
    .use_own(own5), .r2_top_in, .mt, .ct, .r2, .r2_low
  );

  kom_align_add #(.N(N), .P(P)) u_aa (
    .clk, .rst_n, .capture(cap), .s, .c, .ct,
    .rightmost(rm5), .leftmost(lm5),
    .nb_hi_s0, .nb_hi_s1, .nb_hi_c0, .cin_nb,
    .m_hi(p_hi), .co
  );

  assign p_lo = r2;

endmodule
