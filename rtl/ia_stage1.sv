// ia_stage1: first stage of the interval multiplier, the four end-point
// products.
//
// Four binary64 multipliers work in parallel on the end points of
// X = [xl, xu] and Y = [yl, yu]:  p = xl*yl, q = xl*yu, r = xu*yl, t = xu*yu.
// Every product is kept twice, rounded toward -infinity and toward
// +infinity, so that stage 2 can search the minimum among round-down values
// and the maximum among round-up values (outward rounding). The products and
// the operation code are held in the p, q, r, t registers until stage 2
// takes them.
//
// In the floating-point multiply mode (OP_FMUL) the unit does two ordinary
// multiplications, xl*yl and xu*yu, rounded to nearest even; both roundings
// of p and of t then hold that value, q and r are unused.
//
// Handshake: a new operand pair is loaded on a clock edge where in_valid and
// in_ready are both high. in_ready is high when the registers are empty or
// when stage 2 takes their contents in the same cycle (take), so stage 1
// refills while stage 2 finishes. One cycle from load to out_valid.
//
// The four products and their operands follow the stage-1 diagram of the
// design; the handshake, the two-rounding representation and the
// floating-point mode encoding are this design's choices.
module ia_stage1
  import ia_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  op_e       op,
  input  interval_t x,
  input  interval_t y,
  input  logic      take,       // stage 2 consumes the registers this cycle
  output logic      out_valid,
  output op_e       op_q,
  output prod_t     p,
  output prod_t     q,
  output prod_t     r,
  output prod_t     t
);

  prod_t p_d, q_d, r_d, t_d;
  fp64_t p_rn, t_rn;
  logic  p_ix, q_ix, r_ix, t_ix;   // inexact flags, not used further
  fp64_t q_rn_unused, r_rn_unused;

  fp_mul u_mul_p (.a(x.lo), .b(y.lo), .prod_dn(p_d.dn), .prod_up(p_d.up), .prod_rn(p_rn),        .inexact(p_ix));
  fp_mul u_mul_q (.a(x.lo), .b(y.hi), .prod_dn(q_d.dn), .prod_up(q_d.up), .prod_rn(q_rn_unused), .inexact(q_ix));
  fp_mul u_mul_r (.a(x.hi), .b(y.lo), .prod_dn(r_d.dn), .prod_up(r_d.up), .prod_rn(r_rn_unused), .inexact(r_ix));
  fp_mul u_mul_t (.a(x.hi), .b(y.hi), .prod_dn(t_d.dn), .prod_up(t_d.up), .prod_rn(t_rn),        .inexact(t_ix));

  assign in_ready = !out_valid || take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      op_q      <= OP_IMUL;
      p         <= '0;
      q         <= '0;
      r         <= '0;
      t         <= '0;
    end else if (in_valid && in_ready) begin
      out_valid <= 1'b1;
      op_q      <= op;
      if (op == OP_FMUL) begin
        p <= '{dn: p_rn, up: p_rn};
        t <= '{dn: t_rn, up: t_rn};
      end else begin
        p <= p_d;
        t <= t_d;
      end
      q <= q_d;
      r <= r_d;
    end else if (take) begin
      out_valid <= 1'b0;
    end
  end

endmodule
