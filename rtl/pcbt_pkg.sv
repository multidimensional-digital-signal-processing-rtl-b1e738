// Shared types and constants of the PCB tester.
//
// The board under test has N_IN stimulus nodes (the input vector U^In) and
// K_OUT observed nodes (the output vector U^Out). Each observed node is
// reduced to a 3-bit approximation code: one sign bit and a 2-bit rate of
// change, counted in steps of the discretisation step. The code layout
// follows the published code table (sign first, then the two rate bits);
// the sizes N_IN = 7 and K_OUT = 8 are those of the example board.
package pcbt_pkg;

  localparam int unsigned N_IN   = 7;   // stimulus nodes of the example board
  localparam int unsigned K_OUT  = 8;   // observed nodes of the example board
  localparam int unsigned CODE_W = 3;   // bits per approximation code
  localparam int unsigned RATE_W = 2;   // rate bits per code

  // One approximation code Y_j1 Y_j2 Y_j3.
  //   sign : 0 for a rising or flat signal, 1 for a falling one
  //   rate : how many whole discretisation steps the rate of change spans,
  //          saturated at 3
  typedef struct packed {
    logic              sign;
    logic [RATE_W-1:0] rate;
  } apx_code_t;

  // Signed rate, in discretisation steps, that a code stands for. This is
  // the term summed by the host's reconstruction rule
  //   u_j(nT) = sum_{m=0..n} code_j(m) * delta.
  function automatic int signed code_to_steps(apx_code_t c);
    return c.sign ? -int'(c.rate) : int'(c.rate);
  endfunction

endpackage
