// Self-checking test of max_select: random output vectors (with frequent
// ties) and every active-neuron count, compared with a first-maximum search.
module tb_max_select;
  import aann_pkg::*;
  localparam int unsigned IDX_W = $clog2(N_OUT);
  localparam int unsigned CNT_W = $clog2(N_OUT + 1);

  logic signed [DATA_W-1:0] op [N_OUT];
  logic        [CNT_W-1:0]  n_active;
  logic        [IDX_W-1:0]  idx;
  logic signed [DATA_W-1:0] max_val;
  int checks = 0, failures = 0, masked_win = 0;

  max_select dut (.op(op), .n_active(n_active), .idx(idx), .max_val(max_val));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int best, full_best, na;
      for (int k = 0; k < N_OUT; k++)
        op[k] = (n % 3 == 0) ? DATA_W'($urandom_range(3, 0)) : DATA_W'($urandom());
      na = int'($urandom_range(N_OUT, 1));
      n_active = CNT_W'(na);
      #1;
      best = 0; full_best = 0;
      for (int k = 1; k < na; k++) if (op[k] > op[best]) best = k;
      for (int k = 1; k < N_OUT; k++) if (op[k] > op[full_best]) full_best = k;
      if (full_best != best) masked_win++;
      checks += 2;
      if (int'(idx) != best) begin
        failures++;
        if (failures < 10) $display("FAIL na=%0d idx=%0d exp=%0d", na, idx, best);
      end
      if (max_val != op[best]) failures++;
    end
    checks++;
    if (masked_win == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
