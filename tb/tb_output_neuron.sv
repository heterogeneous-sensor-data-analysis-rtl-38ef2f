// Self-checking test of output_neuron: random hidden activations, weights and
// biases compared with the linear weighted sum (saturated to 8 bits) of the
// reference model; counts saturating and non-saturating cases.
module tb_output_neuron;
  import aann_pkg::*;
  import aann_ref_pkg::*;

  logic signed [DATA_W-1:0] h [N_HID];
  logic signed [DATA_W-1:0] w [N_HID];
  logic signed [DATA_W-1:0] b, op;
  int checks = 0, failures = 0, nsat = 0, nlin = 0;

  output_neuron dut (.h(h), .w(w), .b(b), .op(op));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked: h0 = 1.0, w0 = -0.5, b = 0.25 -> -0.25 (-8)
    for (int j = 0; j < N_HID; j++) begin h[j] = '0; w[j] = '0; end
    h[0] = 8'sd32; w[0] = -8'sd16; b = 8'sd8;
    #1;
    checks++;
    if (op != -8'sd8) begin failures++; $display("FAIL hand case op=%0d", op); end
    for (int n = 0; n < 10000; n++) begin
      automatic longint acc, e;
      automatic int wmax = (n % 2) ? 128 : 40;
      for (int j = 0; j < N_HID; j++) begin
        h[j] = DATA_W'($urandom_range(32, 0));
        w[j] = DATA_W'(int'($urandom_range(2 * wmax - 1, 0)) - wmax);
      end
      b = DATA_W'($urandom());
      #1;
      acc = longint'(b) * ONE_Q;
      for (int j = 0; j < N_HID; j++) acc += longint'(w[j]) * longint'(h[j]);
      e = sat(fdiv2(acc, FRAC_W), DATA_W);
      if (e == 127 || e == -128) nsat++; else nlin++;
      checks++;
      if (longint'(op) != e) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d exp=%0d", op, e);
      end
    end
    checks++;
    if (nsat == 0 || nlin == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
