// Output-layer neuron: op = f2( sum_j w_j * h_j + b ), f2 = identity.
//
// N_HID parallel multipliers and an adder tree at full precision; the bias is
// aligned to the product scale before the add. The linear result is rescaled
// to FRAC_W fraction bits and saturated to the DATA_W-bit neuron precision
// (saturation is this design's choice; the description only calls f2 a pure
// linear response). Combinational.
//
// Ports: h and w are N_HID signed DATA_W-bit values, b the signed bias, op the
// signed DATA_W-bit output with FRAC_W fraction bits.
module output_neuron #(
  parameter int unsigned N_HID  = aann_pkg::N_HID,
  parameter int unsigned DATA_W = aann_pkg::DATA_W,
  parameter int unsigned FRAC_W = aann_pkg::FRAC_W
) (
  input  logic signed [DATA_W-1:0] h [N_HID],
  input  logic signed [DATA_W-1:0] w [N_HID],
  input  logic signed [DATA_W-1:0] b,
  output logic signed [DATA_W-1:0] op
);
  localparam int unsigned ACC_W = 2 * DATA_W + $clog2(N_HID + 1) + 1;
  localparam logic signed [ACC_W-1:0] SAT_MAX = {{(ACC_W-DATA_W+1){1'b0}}, {(DATA_W-1){1'b1}}};
  localparam logic signed [ACC_W-1:0] SAT_MIN = {{(ACC_W-DATA_W+1){1'b1}}, {(DATA_W-1){1'b0}}};

  logic signed [ACC_W-1:0] acc, lin;

  always_comb begin
    acc = ACC_W'(b) <<< FRAC_W;
    for (int j = 0; j < N_HID; j++)
      acc += ACC_W'(w[j] * h[j]);
    lin = acc >>> FRAC_W;
    if (lin > SAT_MAX)      op = SAT_MAX[DATA_W-1:0];
    else if (lin < SAT_MIN) op = SAT_MIN[DATA_W-1:0];
    else                    op = lin[DATA_W-1:0];
  end
endmodule
