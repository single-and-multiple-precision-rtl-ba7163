// large_mult_top: the single-precision and the multiple-precision
// sequential Karatsuba-Ofman large multipliers side by side, each with its
// own ports (prefix sl_ and mp_). Both default to 2048-bit operands and
// 16-bit digits; the multiple-precision one has 8 blocks of 256 bits. See
// slkom and mpslkom for the interfaces and timing.
module large_mult_top #(
  parameter int unsigned W = 2048,
  parameter int unsigned N = 16,
  parameter int unsigned K = 8,
  localparam int unsigned SPW = ($clog2(K) < 1) ? 1 : $clog2($clog2(K) + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // single precision
  input  logic           sl_start,
  input  logic [W-1:0]   sl_a,
  input  logic [W-1:0]   sl_b,
  output logic           sl_ready,
  output logic           sl_done,
  output logic [W-1:0]   sl_p_lo,
  output logic [W-1:0]   sl_p_hi,
  // multiple precision
  input  logic           mp_start,
  input  logic [SPW-1:0] mp_sp,
  input  logic [W-1:0]   mp_a,
  input  logic [W-1:0]   mp_b,
  output logic           mp_ready,
  output logic           mp_done,
  output logic [SPW-1:0] mp_sp_out,
  output logic [W-1:0]   mp_p_lo,
  output logic [W-1:0]   mp_p_hi
);

  slkom #(.W(W), .N(N)) u_slkom (
    .clk, .rst_n, .start(sl_start), .a(sl_a), .b(sl_b),
    .ready(sl_ready), .done(sl_done), .p_lo(sl_p_lo), .p_hi(sl_p_hi)
  );

  mpslkom #(.W(W), .K(K), .N(N)) u_mpslkom (
    .clk, .rst_n, .start(mp_start), .sp(mp_sp), .a(mp_a), .b(mp_b),
    .ready(mp_ready), .done(mp_done), .sp_out(mp_sp_out),
    .p_lo(mp_p_lo), .p_hi(mp_p_hi)
  );

endmodule
