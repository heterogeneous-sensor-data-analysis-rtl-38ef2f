// Input-layer neuron: maps one raw feature into the network's [-1, 1] range.
//
// Computes y = G * (x - x_min) + y_min (min-max scaling, one element of the
// Hadamard product of the input layer). The gain G = 2 / (x_max - x_min) is
// usually far below one, so at 8-bit precision it is held as an unsigned
// DATA_W-bit mantissa g and a right shift gsh: G = g * 2^-gsh in units of the
// neuron fixed-point format (FRAC_W fraction bits). That split is this
// design's choice; the formula is the classifier's. The result is saturated
// to DATA_W signed bits. Purely combinational, one multiplier.
//
// Ports: x, xmin are signed FEAT_W-bit integers; g, gsh, ymin come from the
// selected parameter set; y is signed DATA_W bits with FRAC_W fraction bits.
module input_neuron #(
  parameter int unsigned FEAT_W = aann_pkg::FEAT_W,
  parameter int unsigned DATA_W = aann_pkg::DATA_W,
  parameter int unsigned GSH_W  = aann_pkg::GSH_W
) (
  input  logic signed [FEAT_W-1:0] x,
  input  logic signed [FEAT_W-1:0] xmin,
  input  logic        [DATA_W-1:0] g,
  input  logic        [GSH_W-1:0]  gsh,
  input  logic signed [DATA_W-1:0] ymin,
  output logic signed [DATA_W-1:0] y
);
  localparam int unsigned PW = FEAT_W + DATA_W + 2;
  localparam logic signed [PW-1:0] SAT_MAX = {{(PW-DATA_W+1){1'b0}}, {(DATA_W-1){1'b1}}};
  localparam logic signed [PW-1:0] SAT_MIN = {{(PW-DATA_W+1){1'b1}}, {(DATA_W-1){1'b0}}};

  logic signed [FEAT_W:0] diff;
  logic signed [PW-1:0]   prod, scaled, sum;

  always_comb begin
    diff   = {x[FEAT_W-1], x} - {xmin[FEAT_W-1], xmin};
    prod   = PW'(diff) * PW'($signed({1'b0, g}));
    scaled = prod >>> gsh;
    sum    = scaled + PW'(ymin);
    if (sum > SAT_MAX)      y = SAT_MAX[DATA_W-1:0];
    else if (sum < SAT_MIN) y = SAT_MIN[DATA_W-1:0];
    else                    y = sum[DATA_W-1:0];
  end
endmodule
