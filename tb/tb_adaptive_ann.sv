// Self-checking test of adaptive_ann: loads four random classifiers through
// the parameter write port, then streams random feature vectors with random
// sensor types back to back (one per clock, plus idle gaps) and checks each
// class against the reference model and its arrival exactly LATENCY = 4
// clocks after the request. Unused inputs carry random garbage and the
// padding entries of each parameter set are random rather than zero, so the
// input masking, hidden-neuron deactivation and MAX restriction are all
// needed for correct results; mode switches between consecutive samples are
// counted.
module tb_adaptive_ann;
  import aann_pkg::*;
  import aann_ref_pkg::*;
  localparam int LATENCY = 4;
  localparam int N_SAMPLES = 4000;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [SEL_W-1:0] in_sel = '0;
  logic signed [FEAT_W-1:0] x [N_IN];
  logic wr_en = 0;
  logic [SEL_W-1:0] wr_set = '0;
  logic [15:0] wr_idx = '0;
  logic [31:0] wr_data = '0;
  logic out_valid;
  logic [SEL_W-1:0] out_sel;
  logic [2:0] out_class;
  logic signed [DATA_W-1:0] out_max;

  typedef struct { int cls; int sel; longint t; longint mx; } exp_t;
  exp_t q [$];
  longint cyc = 0;
  int checks = 0, failures = 0, sent = 0, got = 0, switches = 0;
  int per_sel [N_SENS] = '{0, 0, 0, 0};
  int classes_seen [N_SENS][N_OUT];
  ann_model m;

  adaptive_ann dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (N_SAMPLES * 4 + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result checker
  always @(posedge clk) if (rst_n && out_valid) begin
    automatic exp_t e;
    got++;
    checks++;
    if (q.size() == 0) begin
      failures++; $display("FAIL unexpected result");
    end else begin
      e = q.pop_front();
      if (int'(out_class) != e.cls || int'(out_sel) != e.sel || longint'(out_max) != e.mx
          || cyc - e.t != LATENCY) begin
        failures++;
        if (failures < 10)
          $display("FAIL sel=%0d class=%0d exp=%0d max=%0d exp=%0d latency=%0d",
                   out_sel, out_class, e.cls, out_max, e.mx, cyc - e.t);
      end
      classes_seen[e.sel][e.cls]++;
    end
  end

  initial begin
    int prev_sel = 0;
    for (int s = 0; s < N_SENS; s++) for (int k = 0; k < N_OUT; k++) classes_seen[s][k] = 0;
    for (int i = 0; i < N_IN; i++) x[i] = '0;
    m = new(1'b1);   // non-zero padding: masking must hide it
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < N_SENS; s++)
      for (int idx = 0; idx < m.set_size(); idx++) begin
        @(negedge clk);
        wr_en = 1; wr_set = SEL_W'(s); wr_idx = 16'(idx); wr_data = 32'(m.entry(s, idx));
      end
    @(negedge clk);
    wr_en = 0;
    while (sent < N_SAMPLES) begin
      @(negedge clk);
      if ($urandom_range(4, 0) == 0) begin
        in_valid = 0;
      end else begin
        automatic int s = int'($urandom_range(N_SENS - 1, 0));
        automatic longint xv [N_IN];
        automatic exp_t e;
        for (int i = 0; i < N_IN; i++) begin
          xv[i] = (i < int'(TOPO_I[s])) ? m.feature(s, i) : longint'($signed(16'($urandom())));
          x[i] = FEAT_W'(xv[i]);
        end
        in_valid = 1; in_sel = SEL_W'(s);
        e.cls = m.classify(s, xv);
        e.sel = s;
        e.mx  = m.o[e.cls];
        e.t   = cyc;
        q.push_back(e);
        if (s != prev_sel) switches++;
        prev_sel = s;
        per_sel[s]++;
        sent++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (got != sent || q.size() != 0) begin failures++; $display("FAIL got %0d of %0d", got, sent); end
    for (int s = 0; s < N_SENS; s++) begin
      automatic int distinct = 0;
      for (int k = 0; k < N_OUT; k++) if (classes_seen[s][k] > 0) distinct++;
      $display("sensor %0d: %0d samples, %0d distinct classes", s, per_sel[s], distinct);
      checks++;
      if (per_sel[s] == 0 || distinct < 2) begin failures++; $display("FAIL sensor %0d not exercised", s); end
    end
    checks++;
    if (switches == 0) failures++;
    $display("mode switches: %0d", switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
