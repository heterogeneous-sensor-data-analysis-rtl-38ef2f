// Self-checking test of input_neuron: random features, minima, gains, shifts
// and offsets (including values that saturate either way), compared with the
// min-max scaling formula in integer arithmetic; plus hand-worked cases.
module tb_input_neuron;
  import aann_pkg::*;
  import aann_ref_pkg::*;

  logic signed [FEAT_W-1:0] x, xmin;
  logic        [DATA_W-1:0] g;
  logic        [GSH_W-1:0]  gsh;
  logic signed [DATA_W-1:0] ymin, y;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;

  input_neuron dut (.x(x), .xmin(xmin), .g(g), .gsh(gsh), .ymin(ymin), .y(y));

  task automatic apply(longint xv, longint mv, longint gv, longint sv, longint yv, longint exp_v);
    x = FEAT_W'(xv); xmin = FEAT_W'(mv); g = DATA_W'(gv); gsh = GSH_W'(sv); ymin = DATA_W'(yv);
    #1;
    checks++;
    if (longint'(y) != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d xmin=%0d g=%0d gsh=%0d ymin=%0d y=%0d exp=%0d",
                                  xv, mv, gv, sv, yv, y, exp_v);
    end
    if (exp_v == 127) sat_hi++;
    if (exp_v == -128) sat_lo++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked: range [100, 356] -> G = 2/256 = 64/256 in Q.5 units: g=128, gsh=9
    apply(100, 100, 128, 9, -32, -32);   // x = x_min  -> -1.0
    apply(356, 100, 128, 9, -32, 32);    // x = x_max  -> +1.0
    apply(228, 100, 128, 9, -32, 0);     // midpoint   ->  0.0
    apply(30000, -30000, 255, 0, 0, 127);
    apply(-30000, 30000, 255, 0, 0, -128);
    for (int n = 0; n < 20000; n++) begin
      automatic longint xv = longint'($signed(16'($urandom())));
      automatic longint mv = longint'($signed(16'($urandom())));
      automatic longint gv = longint'($urandom_range(255, 0));
      automatic longint sv = longint'($urandom_range(31, 0));
      automatic longint yv = longint'($signed(8'($urandom())));
      apply(xv, mv, gv, sv, yv, input_ref(xv, mv, gv, sv, yv));
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("FAIL saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
