// Fuzzy logic unit: rate-of-change encoder for one observed board node.
//
// The unit turns the rate of change of one output signal into the 3-bit
// approximation code {sign, rate}. In the analog front end this is a bank of
// three amplifiers, each followed by a comparator that tests whether the
// amplified rate lies inside its band; this module is the digital model of
// that bank, with the rate of change given as a DU_W-bit sign-magnitude word
// du (du[DU_W-1] is the sign, the rest the magnitude).
//
//   sign = 1 when the rate is negative (sign bit of du), 0 otherwise
//   rate = floor(|du| / STEP), saturated at 3
//
// so a magnitude in [k*STEP, (k+1)*STEP) gives rate k, which is the code
// table of the method: 0..1 step -> 00, 1..2 -> 01, 2..3 -> 10, 3..4 -> 11,
// with the sign bit set for a falling signal. With the defaults (4-bit du,
// STEP = 2 LSB) the code is du[3:1], the mapping of the published timing
// simulation of the unit. Saturation above 4 steps and the sign-magnitude
// input format are choices of this design.
//
// Timing: purely combinational; the code is sampled by the store strobe.
module fuzzy_unit
  import pcbt_pkg::*;
#(
  parameter int unsigned DU_W = 4,   // width of the sign-magnitude rate word
  parameter int unsigned STEP = 2    // discretisation step, in LSB of |du|
) (
  input  logic [DU_W-1:0] du,        // rate of change, sign-magnitude
  output apx_code_t       y          // approximation code Y_j1 Y_j2 Y_j3
);

  localparam int unsigned MAG_W = DU_W - 1;

  logic [MAG_W-1:0] mag;
  logic [MAG_W-1:0] steps;

  assign mag   = du[MAG_W-1:0];
  assign steps = mag / MAG_W'(STEP);

  always_comb begin
    y.sign = du[DU_W-1];
    if (steps > MAG_W'(3)) y.rate = 2'd3;
    else                   y.rate = steps[RATE_W-1:0];
  end

  initial begin
    assert (DU_W >= 3) else $error("fuzzy_unit: DU_W must be at least 3");
    assert (STEP >= 1) else $error("fuzzy_unit: STEP must be at least 1");
  end

endmodule
