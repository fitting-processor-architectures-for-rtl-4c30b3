// Double-precision divide and square-root unit with an analysis mode (FDIVD, FSQRTD).
//
// The quotient or root is formed by a restoring digit recurrence, BITS_PER_CYCLE result bits
// per cycle, 56 bits in all (1 integer bit, 52 fraction bits, guard bit, two more for the
// sticky), then rounded to nearest-even. The recurrence itself always takes the same number of
// cycles; what varies is when the result is released:
//   operation mode: DIV_LAT_MIN / SQRT_LAT_MIN cycles when the result is exact (no remainder,
//                   no rounding) or a special case, DIV_LAT_MAX / SQRT_LAT_MAX otherwise;
//   analysis mode:  always DIV_LAT_MAX / SQRT_LAT_MAX.
// The latency ranges 15..18 and 23..26 cycles and the analysis-mode values 18 and 26 are the
// design's; which operands take the short latency is this design's reading of its examples
// (-1.0/2.0 and sqrt(16.0) are exact and short, the others are not). Only the two end points of
// each range are produced.
//
// Numbers: IEEE 754 binary64. Subnormal inputs are read as zero and results below the normal
// range are flushed to zero (this design's choice); infinities, zeros and NaNs follow IEEE 754
// (invalid operations give the quiet NaN 0x7FF8000000000000).
//
// Interface: `start` (with op, a, b) is accepted when !busy; a start in cycle 0 gives `done`
// for one cycle in cycle L, with `result` valid while done is high. `op`: 0 divide a/b,
// 1 square root of a.
module fpu_divsqrt #(
  parameter int unsigned DIV_LAT_MIN    = 15,
  parameter int unsigned DIV_LAT_MAX    = 18,
  parameter int unsigned SQRT_LAT_MIN   = 23,
  parameter int unsigned SQRT_LAT_MAX   = 26,
  parameter int unsigned BITS_PER_CYCLE = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        analysis_mode,
  input  logic        start,
  input  logic        op,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic        busy,
  output logic        done,
  output logic [63:0] result
);
  localparam int unsigned NBITS = 56;
  localparam int unsigned ITERS = NBITS / BITS_PER_CYCLE;
  localparam logic [63:0] QNAN  = 64'h7FF8_0000_0000_0000;

  // The recurrence must finish before the shortest latency.
  initial assert (ITERS < DIV_LAT_MIN && NBITS % BITS_PER_CYCLE == 0)
    else $error("fpu_divsqrt: recurrence does not fit in DIV_LAT_MIN");

  // ---- operand unpacking ----------------------------------------------------------------
  logic        sa, sb;
  logic [10:0] ea, eb;
  logic [52:0] ma, mb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  always_comb begin
    sa = a[63]; ea = a[62:52]; ma = {1'b1, a[51:0]};
    sb = b[63]; eb = b[62:52]; mb = {1'b1, b[51:0]};
    a_zero = (ea == 11'd0);                 // subnormals read as zero
    b_zero = (eb == 11'd0);
    a_inf  = (ea == 11'h7FF) && (a[51:0] == '0);
    b_inf  = (eb == 11'h7FF) && (b[51:0] == '0);
    a_nan  = (ea == 11'h7FF) && (a[51:0] != '0);
    b_nan  = (eb == 11'h7FF) && (b[51:0] != '0);
  end

  // Special-case result, and whether there is one.
  logic        special;
  logic [63:0] special_res;
  always_comb begin
    special     = 1'b1;
    special_res = QNAN;
    if (!op) begin
      if (a_nan || b_nan || (a_zero && b_zero) || (a_inf && b_inf)) special_res = QNAN;
      else if (a_inf || b_zero) special_res = {sa ^ sb, 11'h7FF, 52'd0};
      else if (a_zero || b_inf) special_res = {sa ^ sb, 63'd0};
      else special = 1'b0;
    end else begin
      if (a_nan) special_res = QNAN;
      else if (a_zero) special_res = {sa, 63'd0};
      else if (sa) special_res = QNAN;
      else if (a_inf) special_res = {1'b0, 11'h7FF, 52'd0};
      else special = 1'b0;
    end
  end

  // ---- recurrence state -------------------------------------------------------------------
  logic          op_q, special_q;
  logic [63:0]   special_res_q;
  logic          sign_q;
  logic signed [13:0] exp_q;          // biased result exponent before rounding
  logic [59:0]   rem_q;               // partial remainder
  logic [55:0]   res_q;               // result bits so far
  logic [52:0]   div_q;               // divisor mantissa
  logic [111:0]  rad_q;               // radicand bits still to bring down (square root)
  logic [$clog2(ITERS+1)-1:0] iter_q;
  logic [5:0]    cyc_q;
  logic          active;

  // One cycle of the recurrence: BITS_PER_CYCLE restoring steps.
  logic [59:0]  rem_n;
  logic [55:0]  res_n;
  logic [111:0] rad_n;
  always_comb begin
    logic [59:0] trial;
    trial = '0;
    rem_n = rem_q;
    res_n = res_q;
    rad_n = rad_q;
    for (int k = 0; k < int'(BITS_PER_CYCLE); k++) begin
      if (!op_q) begin
        // divide: compare the remainder with the divisor, then shift
        if (rem_n >= {7'd0, div_q}) begin
          rem_n = rem_n - {7'd0, div_q};
          res_n = {res_n[54:0], 1'b1};
        end else begin
          res_n = {res_n[54:0], 1'b0};
        end
        rem_n = rem_n << 1;
      end else begin
        // square root: bring down two radicand bits, try (root<<2)|1
        rem_n = {rem_n[57:0], rad_n[111:110]};
        rad_n = rad_n << 2;
        trial = {2'b00, res_n, 2'b01};
        if (rem_n >= trial) begin
          rem_n = rem_n - trial;
          res_n = {res_n[54:0], 1'b1};
        end else begin
          res_n = {res_n[54:0], 1'b0};
        end
      end
    end
  end

  // ---- rounding and packing ----------------------------------------------------------------
  logic        guard, sticky, exact;
  logic [52:0] frac_r;              // {carry, 52-bit fraction}
  logic signed [13:0] exp_r;
  logic [63:0] packed_res;
  always_comb begin
    guard  = res_q[2];
    sticky = res_q[1] | res_q[0] | (rem_q != '0);
    exact  = !guard && !sticky;
    frac_r = {1'b0, res_q[54:3]} + 53'(guard && (sticky || res_q[3]));
    exp_r  = exp_q + 14'(frac_r[52]);
    if (exp_r >= 14'sd2047)   packed_res = {sign_q, 11'h7FF, 52'd0};
    else if (exp_r <= 14'sd0) packed_res = {sign_q, 63'd0};
    else                      packed_res = {sign_q, exp_r[10:0], frac_r[51:0]};
  end

  // Release time for the running operation.
  logic [5:0] target;
  always_comb begin
    if (op_q) target = (analysis_mode || !(exact || special_q)) ? 6'(SQRT_LAT_MAX) : 6'(SQRT_LAT_MIN);
    else      target = (analysis_mode || !(exact || special_q)) ? 6'(DIV_LAT_MAX)  : 6'(DIV_LAT_MIN);
  end

  assign busy   = active;
  assign done   = active && (cyc_q == target);
  assign result = special_q ? special_res_q : packed_res;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active        <= 1'b0;
      op_q          <= 1'b0;
      special_q     <= 1'b0;
      special_res_q <= '0;
      sign_q        <= 1'b0;
      exp_q         <= '0;
      rem_q         <= '0;
      res_q         <= '0;
      div_q         <= '0;
      rad_q         <= '0;
      iter_q        <= '0;
      cyc_q         <= '0;
    end else if (!active) begin
      if (start) begin
        active        <= 1'b1;
        cyc_q         <= 6'd1;
        iter_q        <= '0;
        op_q          <= op;
        special_q     <= special;
        special_res_q <= special_res;
        res_q         <= '0;
        div_q         <= mb;
        if (!op) begin
          sign_q <= sa ^ sb;
          // keep the quotient in [1,2): pre-shift the dividend when ma < mb
          if (ma < mb) begin
            rem_q <= {6'd0, ma, 1'b0};
            exp_q <= 14'(ea) - 14'(eb) + 14'sd1022;
          end else begin
            rem_q <= {7'd0, ma};
            exp_q <= 14'(ea) - 14'(eb) + 14'sd1023;
          end
          rad_q <= '0;
        end else begin
          sign_q <= 1'b0;
          rem_q  <= '0;
          // unbiased exponent e = ea-1023; an odd e moves one factor 2 into the radicand
          if (ea[0]) begin
            rad_q <= {1'b0, ma, 58'd0};                    // e even: ma * 2^58
            exp_q <= (14'(ea) - 14'sd1023) / 2 + 14'sd1023;
          end else begin
            rad_q <= {ma, 59'd0};                          // e odd: ma * 2^59
            exp_q <= (14'(ea) - 14'sd1024) / 2 + 14'sd1023;
          end
        end
      end
    end else begin
      cyc_q <= cyc_q + 1'b1;
      if (iter_q != ($clog2(ITERS+1))'(ITERS)) begin
        rem_q  <= rem_n;
        res_q  <= res_n;
        rad_q  <= rad_n;
        iter_q <= iter_q + 1'b1;
      end
      if (done) active <= 1'b0;
    end
  end
endmodule
