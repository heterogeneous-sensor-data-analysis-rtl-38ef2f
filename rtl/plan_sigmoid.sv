// PLAN piecewise-linear approximation of the logistic sigmoid (hidden-layer
// activation f1).
//
// For m = |beta|:
//   P(m) = 0.25    * m + 0.5       for 0     <= m < 1
//        = 0.125   * m + 0.625     for 1     <= m < 2.375
//        = 0.03125 * m + 0.84375   for 2.375 <= m < 5
//        = 1                       for 5     <= m
// and f(beta) = P(m) for beta >= 0, 1 - P(m) for beta < 0 (the sigmoid's point
// symmetry about (0, 0.5)). The segment breakpoints, slopes and offsets are
// those of the PLAN function; applying the symmetry for negative inputs is
// this design's reading, as the formula is stated for |beta| only. The slopes
// are powers of two, so the block is shifts, adds and comparators only.
//
// Ports: beta is signed IN_W bits, f is DATA_W bits (non-negative, at most
// 1.0); both have FRAC_W fraction bits. Exact for FRAC_W >= 5. Combinational.
module plan_sigmoid #(
  parameter int unsigned IN_W   = 2 * aann_pkg::DATA_W + 5,
  parameter int unsigned DATA_W = aann_pkg::DATA_W,
  parameter int unsigned FRAC_W = aann_pkg::FRAC_W
) (
  input  logic signed [IN_W-1:0]   beta,
  output logic signed [DATA_W-1:0] f
);
  localparam int unsigned MW = IN_W + 1;
  localparam logic [MW-1:0] ONE  = MW'(1) << FRAC_W;
  localparam logic [MW-1:0] T_2P375 = (MW'(19) << FRAC_W) >> 3;
  localparam logic [MW-1:0] T_5  = MW'(5) << FRAC_W;
  localparam logic [MW-1:0] C_1  = (MW'(1) << FRAC_W) >> 1;
  localparam logic [MW-1:0] C_2  = (MW'(5) << FRAC_W) >> 3;
  localparam logic [MW-1:0] C_3  = (MW'(27) << FRAC_W) >> 5;

  logic [MW-1:0] mag, p, r;

  always_comb begin
    mag = beta[IN_W-1] ? MW'(-{beta[IN_W-1], beta}) : MW'({1'b0, beta});
    if (mag >= T_5)          p = ONE;
    else if (mag >= T_2P375) p = (mag >> 5) + C_3;
    else if (mag >= ONE)     p = (mag >> 3) + C_2;
    else                     p = (mag >> 2) + C_1;
    r = beta[IN_W-1] ? (ONE - p) : p;
    f = r[DATA_W-1:0];
  end
endmodule
