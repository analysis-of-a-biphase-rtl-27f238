// bmp_pkg: shared types and the parameter arithmetic of the biphase mark
// protocol (BMP).
//
// A BMP link is correct (every bit sent is decoded, in order) when the cell
// geometry (CELL, MARK, SAMPLE clock ticks) and the timing of the two
// oscillators and the line satisfy three strict inequalities, with MIN/MAX
// the shortest/longest clock period and EDGELENGTH the time the line needs to
// settle after an edge:
//   (1) MARK*MIN         > 2*MAX + EDGELENGTH           edge never missed
//   (2) (SAMPLE-1)*MIN   > MARK*MAX + EDGELENGTH        never sampled too early
//   (3) CELL*MIN         > (SAMPLE+2)*MAX + EDGELENGTH  never sampled too late
// These functions evaluate the constraints at elaboration time so that a
// parameter set can be checked before it is used, give the clock-ratio and
// distortion margins of a layout, and pick the fastest DC-balanced cell
// layout for a given clock quality and edge distortion. The state encodings of the
// coder and decoder controllers are also kept here.
`timescale 1ns / 1ps
package bmp_pkg;

  // Coder control states. START is the state after reset, before the first
  // cell has been opened. MARK_PH counts the mark subcell of a cell that
  // carries a 1 (a mid-cell edge is still due). CODE_PH counts the rest of a
  // cell, after the mid-cell edge or for a cell that carries a 0.
  typedef enum logic [1:0] {
    CODER_START   = 2'd0,
    CODER_MARK_PH = 2'd1,
    CODER_CODE_PH = 2'd2
  } coder_state_e;

  // Decoder control states: WAIT_EDGE looks for a change of the sampled line,
  // COUNT counts the sampling distance after a detected cell edge.
  typedef enum logic {
    DEC_WAIT_EDGE = 1'b0,
    DEC_COUNT     = 1'b1
  } decoder_state_e;

  // Constraint (1): the edge at the start of a cell is always detected.
  function automatic bit edge_detected_ok(int unsigned mark, int unsigned tmin,
                                          int unsigned tmax, int unsigned edgelength);
    return mark * tmin > 2 * tmax + edgelength;
  endfunction

  // Constraint (2): the decision sample is never taken before the mid-cell
  // edge of a 1 has settled.
  function automatic bit sample_not_early_ok(int unsigned mark, int unsigned sample,
                                             int unsigned tmin, int unsigned tmax,
                                             int unsigned edgelength);
    return (sample - 1) * tmin > mark * tmax + edgelength;
  endfunction

  // Constraint (3): the decision sample is always taken before the next cell
  // edge.
  function automatic bit sample_not_late_ok(int unsigned cell_ticks, int unsigned sample,
                                            int unsigned tmin, int unsigned tmax,
                                            int unsigned edgelength);
    return cell_ticks * tmin > (sample + 2) * tmax + edgelength;
  endfunction

  // All three constraints together.
  function automatic bit params_ok(int unsigned cell_ticks, int unsigned mark, int unsigned sample,
                                   int unsigned tmin, int unsigned tmax,
                                   int unsigned edgelength);
    return edge_detected_ok(mark, tmin, tmax, edgelength) &&
           sample_not_early_ok(mark, sample, tmin, tmax, edgelength) &&
           sample_not_late_ok(cell_ticks, sample, tmin, tmax, edgelength);
  endfunction

  // Lower bound on the clock ratio rho = MIN/MAX of a layout for a given
  // distortion e = EDGELENGTH/MAX: the link works for every rho strictly above
  // max((2+e)/mark, (mark+e)/(sample-1), (sample+2+e)/cell).
  function automatic real rho_min(int unsigned cell_ticks, int unsigned mark,
                                  int unsigned sample, real e);
    real r1, r2, r3;
    r1 = (2.0 + e) / mark;
    r2 = (mark + e) / (sample - 1.0);
    r3 = (sample + 2.0 + e) / cell_ticks;
    return (r1 > r2) ? ((r1 > r3) ? r1 : r3) : ((r2 > r3) ? r2 : r3);
  endfunction

  // Upper bound on the distortion e of a layout for a given clock ratio rho:
  // the link works for every e strictly below
  // min(mark*rho - 2, (sample-1)*rho - mark, cell*rho - sample - 2).
  function automatic real e_max(int unsigned cell_ticks, int unsigned mark,
                                int unsigned sample, real rho);
    real e1, e2, e3;
    e1 = mark * rho - 2.0;
    e2 = (sample - 1.0) * rho - mark;
    e3 = cell_ticks * rho - sample - 2.0;
    return (e1 < e2) ? ((e1 < e3) ? e1 : e3) : ((e2 < e3) ? e2 : e3);
  endfunction

  // Sampling distance that maximises the tolerated edge distortion for a
  // DC-balanced cell (CELL = 2*MARK): (3*MARK-1)/2 for odd MARK and
  // (3*MARK-2)/2 for even MARK.
  function automatic int unsigned sample_opt(int unsigned mark);
    return (mark % 2 == 1) ? (3 * mark - 1) / 2 : (3 * mark - 2) / 2;
  endfunction

  // Upper bound on the tolerated distortion E = EDGELENGTH/MAX of a
  // DC-balanced cell with mark size mark, clock ratio rho = MIN/MAX and the
  // optimal sampling distance: (4*rho*mark - 3*mark - 3)/2 for odd mark,
  // (3*rho*mark - 2*mark - 4*rho)/2 for even mark (valid for rho close to 1).
  function automatic real e_opt(int unsigned mark, real rho);
    return (mark % 2 == 1) ? (4.0 * rho * mark - 3.0 * mark - 3.0) / 2.0
                           : (3.0 * rho * mark - 2.0 * mark - 4.0 * rho) / 2.0;
  endfunction

  // Fastest DC-balanced layout for a given distortion e and clock ratio rho:
  // the smallest mark with e_opt(mark) > e. The cell is then 2*mark and the
  // sampling distance sample_opt(mark). Returns 0 if no mark up to 1000 works.
  function automatic int unsigned fastest_mark(real e, real rho);
    for (int unsigned m = 3; m <= 1000; m++)
      if (e_opt(m, rho) > e) return m;
    return 0;
  endfunction

endpackage
