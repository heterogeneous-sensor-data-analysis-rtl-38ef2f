// Self-checking test of hidden_neuron: random inputs, weights and biases
// compared with the weighted sum and the PLAN sigmoid of the reference model;
// also checks the exposed pre-activation value and one hand-worked case.
module tb_hidden_neuron;
  import aann_pkg::*;
  import aann_ref_pkg::*;
  localparam int unsigned ACC_W = 2 * DATA_W + $clog2(N_IN + 1) + 1;

  logic signed [DATA_W-1:0] y [N_IN];
  logic signed [DATA_W-1:0] w [N_IN];
  logic signed [DATA_W-1:0] b, h;
  logic signed [ACC_W-1:0]  beta;
  int checks = 0, failures = 0;

  hidden_neuron dut (.y(y), .w(w), .b(b), .beta(beta), .h(h));

  task automatic run_one(int wmax);
    longint acc, bexp, hexp;
    acc = 0;
    for (int i = 0; i < N_IN; i++) begin
      y[i] = DATA_W'($urandom_range(2 * 64, 0) - 64);
      w[i] = DATA_W'(int'($urandom_range(2 * wmax, 0)) - wmax);
    end
    b = DATA_W'($urandom());
    #1;
    acc = longint'(b) * ONE_Q;
    for (int i = 0; i < N_IN; i++) acc += longint'(w[i]) * longint'(y[i]);
    bexp = fdiv2(acc, FRAC_W);
    hexp = plan_ref(bexp);
    checks += 2;
    if (longint'(beta) != bexp) begin failures++; $display("FAIL beta=%0d exp=%0d", beta, bexp); end
    if (longint'(h) != hexp) begin failures++; $display("FAIL h=%0d exp=%0d", h, hexp); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked: y = 1.0 on input 0, w = 0.5, b = 0 -> beta = 0.5 -> h = 0.625 (20)
    for (int i = 0; i < N_IN; i++) begin y[i] = '0; w[i] = '0; end
    y[0] = 8'sd32; w[0] = 8'sd16; b = '0;
    #1;
    checks++;
    if (h != 8'sd20 || beta != 16) begin failures++; $display("FAIL hand case h=%0d", h); end
    for (int n = 0; n < 5000; n++) run_one(16);
    for (int n = 0; n < 5000; n++) run_one(128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
