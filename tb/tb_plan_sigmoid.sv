// Self-checking test of plan_sigmoid: sweeps every pre-activation value in
// [-8, 8) at the default 5 fraction bits plus random wide values, and compares
// with the PLAN formula evaluated in real arithmetic. Also checks that all
// four segments and both signs were exercised and that the output is
// monotonic.
module tb_plan_sigmoid;
  import aann_pkg::*;
  import aann_ref_pkg::*;
  localparam int unsigned IN_W = 20;

  logic signed [IN_W-1:0]   beta;
  logic signed [DATA_W-1:0] f;
  int checks = 0, failures = 0;
  int seg [4] = '{0, 0, 0, 0};
  int negs = 0;
  longint prev;

  plan_sigmoid #(.IN_W(IN_W), .DATA_W(DATA_W), .FRAC_W(FRAC_W)) dut (.beta(beta), .f(f));

  task automatic check(longint b);
    longint exp_v, mag;
    beta = IN_W'(b);
    #1;
    exp_v = plan_ref(b);
    checks++;
    if (longint'(f) != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL beta=%0d f=%0d exp=%0d", b, f, exp_v);
    end
    mag = b < 0 ? -b : b;
    if (mag >= 5 * ONE_Q) seg[3]++;
    else if (mag * 8 >= 19 * ONE_Q) seg[2]++;
    else if (mag >= ONE_Q) seg[1]++;
    else seg[0]++;
    if (b < 0) negs++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = -1;
    for (longint b = -8 * ONE_Q; b < 8 * ONE_Q; b++) begin
      check(b);
      checks++;
      if (longint'(f) < prev) begin
        failures++;
        $display("FAIL not monotonic at beta=%0d", b);
      end
      prev = longint'(f);
    end
    // PLAN output at the breakpoints, from the formula by hand (F = 5)
    check(0);             checks++; if (f != 16) failures++;
    check(ONE_Q);         checks++; if (f != 24) failures++;
    check(-ONE_Q);        checks++; if (f != 8)  failures++;
    check(5 * ONE_Q);     checks++; if (f != 32) failures++;
    for (int n = 0; n < 2000; n++)
      check(longint'($signed(IN_W'($urandom()))));
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seg[s] == 0) begin failures++; $display("FAIL segment %0d never hit", s); end
    end
    checks++;
    if (negs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
