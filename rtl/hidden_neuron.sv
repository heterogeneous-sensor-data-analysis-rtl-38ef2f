// Hidden-layer neuron: h = f1( sum_i w_i * y_i + b ), f1 = PLAN sigmoid.
//
// All N_IN products are formed in parallel (one multiplier each) and summed
// in an adder tree at full precision; the bias is aligned to the product
// scale (2*FRAC_W fraction bits) before the add. The sum is rescaled to
// FRAC_W fraction bits and passed, without saturation, to plan_sigmoid, so the
// activation sees the true pre-activation value. The bias sits inside the
// activation, as in the neuron diagram. Combinational.
//
// Ports: y (inputs) and w (weights) are N_IN signed DATA_W-bit values, b is
// the signed DATA_W-bit bias, h is the DATA_W-bit activation in [0, 1] and
// beta the pre-activation value (ACC_W bits, FRAC_W fraction bits).
module hidden_neuron #(
  parameter int unsigned N_IN   = aann_pkg::N_IN,
  parameter int unsigned DATA_W = aann_pkg::DATA_W,
  parameter int unsigned FRAC_W = aann_pkg::FRAC_W,
  localparam int unsigned ACC_W = 2 * DATA_W + $clog2(N_IN + 1) + 1
) (
  input  logic signed [DATA_W-1:0] y [N_IN],
  input  logic signed [DATA_W-1:0] w [N_IN],
  input  logic signed [DATA_W-1:0] b,
  output logic signed [ACC_W-1:0]  beta,
  output logic signed [DATA_W-1:0] h
);
  logic signed [ACC_W-1:0] acc;

  always_comb begin
    acc = ACC_W'(b) <<< FRAC_W;
    for (int i = 0; i < N_IN; i++)
      acc += ACC_W'(w[i] * y[i]);
    beta = acc >>> FRAC_W;
  end

  plan_sigmoid #(.IN_W(ACC_W), .DATA_W(DATA_W), .FRAC_W(FRAC_W)) u_f1 (
    .beta(beta),
    .f   (h)
  );
endmodule
