// ia_mul: interval multiplier for IEEE 754 double precision intervals.
//
// Computes Z = X * Y = [Zl, Zu] for X = [xl, xu] and Y = [yl, yu] without
// looking at the signs of the end points: all four end-point products are
// formed (stage 1) and the smallest and largest of them are found with a
// fixed sequence of three comparisons on each side (stage 2). Because every
// operand pair takes the same path and the same number of cycles, the unit
// needs no case analysis and pipelines cleanly. The lower end point is the
// minimum of the products rounded toward -infinity and the upper end point
// the maximum of the products rounded toward +infinity, so Z always encloses
// the exact product set.
//
// A second operation, OP_FMUL, uses the same multipliers for two ordinary
// double precision multiplications: Zl = xl*yl and Zu = xu*yu, rounded to
// nearest even.
//
// Interface: in_valid/in_ready handshake on the operands (op, x, y); the
// result appears in z with a one-cycle z_valid pulse and stays until the
// next result. Timing: interval multiply 1 cycle in stage 1 plus 3 cycles
// in stage 2, result registered 4 cycles after the accepting edge; a new
// operand pair is accepted every 3 cycles. OP_FMUL: 2 cycles, one per cycle.
//
// Both stages and their contents follow the design's description; the
// handshake, NaN handling and the OP_FMUL lane assignment are this design's.
module ia_mul
  import ia_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  op_e       op,
  input  interval_t x,
  input  interval_t y,
  output interval_t z,
  output logic      z_valid
);

  logic  s1_valid, take;
  op_e   s1_op;
  prod_t p, q, r, t;
  sel_e  sel;

  ia_stage1 u_stage1 (
    .clk, .rst_n, .in_valid, .in_ready, .op, .x, .y, .take,
    .out_valid(s1_valid), .op_q(s1_op), .p, .q, .r, .t
  );

  ia_stage2 u_stage2 (
    .clk, .rst_n, .in_valid(s1_valid), .op(s1_op), .p, .q, .r, .t,
    .take, .sel, .z, .z_valid
  );

  // operands offered and not accepted must be held
  a_in_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              in_valid && !in_ready |=> in_valid && $stable(x) && $stable(y) && $stable(op));

endmodule
