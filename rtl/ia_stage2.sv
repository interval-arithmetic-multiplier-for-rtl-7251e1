// ia_stage2: second stage of the interval multiplier, the min/max search.
//
// Finds Zl = min(p, q, r, t) over the round-down products and
// Zu = max(p, q, r, t) over the round-up products in three steps, each step
// one clock cycle, stepped by the select lines sel (s0, s1):
//
//   sel = 00  min1 = min(p, q)     max1 = max(p, q)
//   sel = 01  min2 = min(min1, r)  max2 = max(max1, r)
//   sel = 10  Zl   = min(min2, t)  Zu   = max(max2, t)
//
// Two 64-bit comparators do the work, one on the minimum side and one on the
// maximum side. In front of each, one multiplexer chooses p (step 00) or the
// running min1/min2 (max1/max2) register, the other chooses q, r or t. The
// third step writes the Zl and Zu result registers and pulses z_valid for
// one cycle; Zl and Zu then hold until the next result. Latency 3 cycles
// from the first cycle with in_valid, one result every 3 cycles.
//
// In the floating-point multiply mode the comparisons are skipped: the
// first step copies p (xl*yl) to Zl and t (xu*yu) to Zu, so a result takes
// one cycle.
//
// The order of comparisons, the select-line codes and the comparator and
// multiplexer arrangement follow the design's description of stage 2; the
// sharing of one comparator per side across the three steps, the running
// registers and the handshake are this design's reading of it.
module ia_stage2
  import ia_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,   // p, q, r, t and op are valid
  input  op_e       op,
  input  prod_t     p,
  input  prod_t     q,
  input  prod_t     r,
  input  prod_t     t,
  output logic      take,       // last step: the inputs are consumed
  output sel_e      sel,        // current select-line state
  output interval_t z,          // {Zl, Zu} result registers
  output logic      z_valid     // one-cycle pulse when z is updated
);

  fp64_t min_q, max_q;                 // min1/min2 and max1/max2
  fp64_t min_a, min_b, max_a, max_b;   // comparator operands
  fp64_t min_o, max_o;                 // comparator results
  logic  min_lt, max_lt, min_un, max_un;
  fp64_t min_hi_unused, max_lo_unused;

  // operand multiplexers
  always_comb begin
    min_a = (sel == SEL_PQ) ? p.dn : min_q;
    max_a = (sel == SEL_PQ) ? p.up : max_q;
    unique case (sel)
      SEL_PQ:  begin min_b = q.dn; max_b = q.up; end
      SEL_R:   begin min_b = r.dn; max_b = r.up; end
      default: begin min_b = t.dn; max_b = t.up; end
    endcase
  end

  fp_cmp u_cmp_min (.a(min_a), .b(min_b), .lt(min_lt), .unordered(min_un),
                    .min(min_o), .max(min_hi_unused));
  fp_cmp u_cmp_max (.a(max_a), .b(max_b), .lt(max_lt), .unordered(max_un),
                    .min(max_lo_unused), .max(max_o));

  assign take = in_valid && (op == OP_FMUL || sel == SEL_T);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel     <= SEL_PQ;
      min_q   <= '0;
      max_q   <= '0;
      z       <= '0;
      z_valid <= 1'b0;
    end else begin
      z_valid <= 1'b0;
      if (in_valid) begin
        if (op == OP_FMUL) begin
          z       <= '{lo: p.dn, hi: t.up};
          z_valid <= 1'b1;
          sel     <= SEL_PQ;
        end else begin
          unique case (sel)
            SEL_PQ: begin
              min_q <= min_o;
              max_q <= max_o;
              sel   <= SEL_R;
            end
            SEL_R: begin
              min_q <= min_o;
              max_q <= max_o;
              sel   <= SEL_T;
            end
            default: begin
              z       <= '{lo: min_o, hi: max_o};
              z_valid <= 1'b1;
              sel     <= SEL_PQ;
            end
          endcase
        end
      end
    end
  end

  // the select lines only take the three codes of the sequence
  a_sel_legal: assert property (@(posedge clk) disable iff (!rst_n) sel != 2'b11);
  // the inputs stay valid until the sequence has consumed them
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           in_valid && !take |=> in_valid);

endmodule
