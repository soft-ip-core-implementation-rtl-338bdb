// sgr_pkg: types and constants shared by the floating-point units, the
// generic squared-Givens-rotation (SGR) QR cell and the QR-RLS array.
//
// All arithmetic is IEEE-754 single precision (1 sign, 8 exponent and
// 23 fraction bits). Complex numbers are a packed pair of such words.
// The cell mode selects whether a generic cell does the boundary-cell
// (diagonal) or the internal-cell (off-diagonal) update.
package sgr_pkg;

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    fp32_t re;
    fp32_t im;
  } cplx_t;

  typedef enum logic {
    MODE_IC = 1'b0,   // internal cell: rotate a data element, update r
    MODE_BC = 1'b1    // boundary cell: update d, produce rotation (a, b, delta)
  } cell_mode_e;

  typedef enum logic {
    RECIP_NEWTON = 1'b0,  // Newton-Raphson: x <- x * (2 - m * x), dependent multiplies
    RECIP_SERIES = 1'b1   // series expansion: y <- y * (1 + e), e <- e * e, parallel
  } recip_method_e;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_INF  = 32'h7F80_0000;

  // Clocks from operand to result of the reciprocal unit used in a cell.
  // Pipelined (fp_recip): 2 + 2*iters for Newton-Raphson, 3 + iters for the
  // series form. Iterative on one multiplier (fp_recip_iter): 2 + 2*iters
  // for both forms.
  function automatic int unsigned recip_latency(input int unsigned iters,
                                                input recip_method_e method,
                                                input bit pipelined);
    if (iters == 0) return 2;
    if (pipelined && method == RECIP_SERIES) return iters + 3;
    return 2 + 2 * iters;
  endfunction

  // Clocks from in_valid to out_valid of sgr_generic_cell. Each schedule
  // step lasts fp_stages + 1 clocks; the boundary cell needs 6 steps plus
  // enough steps to cover the reciprocal latency, the internal cell 7 steps;
  // the longer schedule sets the latency, plus one clock.
  function automatic int unsigned cell_latency(input int unsigned iters,
                                               input recip_method_e method,
                                               input bit pipelined,
                                               input int unsigned fp_stages);
    int unsigned sl, bc;
    sl = fp_stages + 1;
    bc = 6 + (recip_latency(iters, method, pipelined) + sl - 1) / sl;
    return ((bc > 7) ? bc : 7) * sl + 1;
  endfunction

  // Flip the sign bit (exact negation).
  function automatic fp32_t fp_neg(input fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  // True for +0, -0 and any denormal (all treated as zero here).
  function automatic logic fp_is_zero(input fp32_t a);
    return a[30:23] == 8'd0;
  endfunction

endpackage
