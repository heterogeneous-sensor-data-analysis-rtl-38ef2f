// End-to-end test of the adaptive ANN IP core at its default size, driven
// only through its AXI4-Lite port as a host processor would.
//
// Four random classifiers with the shapes 7-6-5, 5-4-2, 6-6-3 and 4-5-4 are
// loaded through PARAM_ADDR/PARAM_DATA. Then 300 test records per sensor type
// are classified in turn (human activity, ECG, blood pressure, gas, ...):
// write the active features, write SEL, write CTRL = 1, poll CLASS until it is
// non-zero, and compare with the reference model. Halfway through, the
// blood-pressure classifier is replaced by a new one (reconfiguration by
// reloading weights). Checked besides the classes: 4 clocks from the start
// pulse to the datapath result, and a whole classification (features in to
// class out) within 310 clocks, i.e. 31 us at 10 MHz. Every mechanism of the
// design is counted and must occur at least once: each sensor mode, mode
// switches, masking of unused inputs, deactivated hidden neurons, outputs
// excluded from MAX that would otherwise have won, each PLAN segment, input
// and output saturation, pending-class reads and the parameter reload.
module tb_aann_ip;
  import aann_pkg::*;
  import aann_ref_pkg::*;
  localparam int N_PER_SENSOR = 300;
  localparam int BUDGET_CYCLES = 310;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_bus_if bus (.clk(clk));

  aann_ip dut (
    .clk, .rst_n,
    .s_axi_awaddr(bus.awaddr), .s_axi_awvalid(bus.awvalid), .s_axi_awready(bus.awready),
    .s_axi_wdata(bus.wdata), .s_axi_wstrb(bus.wstrb), .s_axi_wvalid(bus.wvalid),
    .s_axi_wready(bus.wready), .s_axi_bresp(bus.bresp), .s_axi_bvalid(bus.bvalid),
    .s_axi_bready(bus.bready), .s_axi_araddr(bus.araddr), .s_axi_arvalid(bus.arvalid),
    .s_axi_arready(bus.arready), .s_axi_rdata(bus.rdata), .s_axi_rresp(bus.rresp),
    .s_axi_rvalid(bus.rvalid), .s_axi_rready(bus.rready)
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  longint t_start = -1;
  int max_core_lat = 0, max_total = 0;
  // mechanism counters
  int n_mode [N_SENS] = '{0, 0, 0, 0};
  int n_switch = 0, n_mask = 0, n_deact = 0, n_maxmask = 0, n_insat = 0, n_outsat = 0;
  int n_pending = 0, n_reload = 0;
  int n_seg [4] = '{0, 0, 0, 0};
  int correct [N_SENS] = '{0, 0, 0, 0};
  ann_model m;

  // core latency: start pulse to datapath result
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && dut.u_regs.start) t_start = cyc;
    if (rst_n && dut.u_ann.out_valid) begin
      checks++;
      if (cyc - t_start != 4) begin
        failures++;
        $display("FAIL core latency %0d", cyc - t_start);
      end
      if (int'(cyc - t_start) > max_core_lat) max_core_lat = int'(cyc - t_start);
    end
  end

  task automatic load_set(int s);
    bus.write(8'h30, (32'(s) << 16));
    for (int idx = 0; idx < m.set_size(); idx++)
      bus.write(8'h34, 32'(m.entry(s, idx)));
  endtask

  task automatic classify_one(int s, int prev_s);
    automatic longint xv [N_IN];
    automatic logic [31:0] rd;
    automatic longint t0, total;
    automatic int exp_cls, full_best, polls;
    for (int i = 0; i < N_IN; i++) xv[i] = m.feature(s, i);
    t0 = cyc;
    for (int i = 0; i < int'(TOPO_I[s]); i++)
      bus.write(8'(8'h10 + 4 * i), 32'(xv[i]));
    // stale or garbage values in the unused feature registers must not matter
    if ($urandom_range(1, 0) == 1)
      for (int i = int'(TOPO_I[s]); i < N_IN; i++) begin
        xv[i] = longint'($signed(16'($urandom())));
        bus.write(8'(8'h10 + 4 * i), 32'(xv[i]));
      end
    bus.write(8'h04, 32'(s));
    bus.write(8'h00, 32'd1);
    polls = 0;
    do begin
      bus.read(8'h0C, rd);
      polls++;
      if (rd == 0) n_pending++;
    end while (rd == 0 && polls < 50);
    total = cyc - t0;
    if (int'(total) > max_total) max_total = int'(total);

    exp_cls = m.classify(s, xv);
    checks++;
    if (rd != 32'(exp_cls + 1)) begin
      failures++;
      if (failures < 10) $display("FAIL sensor %0d class %0d expected %0d", s, rd, exp_cls + 1);
    end else correct[s]++;
    checks++;
    if (total > longint'(BUDGET_CYCLES)) begin
      failures++;
      $display("FAIL classification took %0d clocks", total);
    end

    // mechanism coverage
    n_mode[s]++;
    if (s != prev_s) n_switch++;
    for (int i = int'(TOPO_I[s]); i < N_IN; i++) if (xv[i] != 0) begin n_mask++; break; end
    if (TOPO_J[s] < N_HID) n_deact++;
    full_best = 0;
    for (int k = 1; k < N_OUT; k++) if (m.o[k] > m.o[full_best]) full_best = k;
    if (full_best != exp_cls) n_maxmask++;
    for (int i = 0; i < int'(TOPO_I[s]); i++) if (m.y[i] == 127 || m.y[i] == -128) begin n_insat++; break; end
    for (int k = 0; k < int'(TOPO_K[s]); k++) if (m.o[k] == 127 || m.o[k] == -128) begin n_outsat++; break; end
    for (int j = 0; j < int'(TOPO_J[s]); j++) begin
      automatic longint b = m.beta[j] < 0 ? -m.beta[j] : m.beta[j];
      if (b >= 5 * ONE_Q) n_seg[3]++;
      else if (8 * b >= 19 * ONE_Q) n_seg[2]++;
      else if (b >= ONE_Q) n_seg[1]++;
      else n_seg[0]++;
    end
  endtask

  task automatic need(int count, string what);
    checks++;
    $display("  %-34s %0d", what, count);
    if (count == 0) begin failures++; $display("FAIL %s never happened", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int prev = 0;
    bus.init();
    m = new();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < N_SENS; s++) load_set(s);
    for (int n = 0; n < N_PER_SENSOR; n++) begin
      if (n == N_PER_SENSOR / 2) begin
        m.randomize_set(int'(SENS_BP));
        load_set(int'(SENS_BP));
        n_reload++;
      end
      for (int s = 0; s < N_SENS; s++) begin
        classify_one(s, prev);
        prev = s;
      end
    end
    checks++;
    if (bus.resp_errors != 0) failures++;
    $display("classified: HAR %0d/%0d ECG %0d/%0d BP %0d/%0d GAS %0d/%0d as the reference model",
             correct[0], n_mode[0], correct[1], n_mode[1], correct[2], n_mode[2], correct[3], n_mode[3]);
    $display("core latency %0d clocks; longest classification over the bus %0d clocks (budget %0d)",
             max_core_lat, max_total, BUDGET_CYCLES);
    $display("mechanisms:");
    need(n_mode[0], "human activity mode (s=0)");
    need(n_mode[1], "ECG mode (s=1)");
    need(n_mode[2], "blood pressure mode (s=2)");
    need(n_mode[3], "toxic gas mode (s=3)");
    need(n_switch, "select line switches");
    need(n_mask, "unused inputs masked");
    need(n_deact, "hidden neurons deactivated");
    need(n_maxmask, "MAX ignored a larger unused output");
    need(n_seg[0], "PLAN segment |b|<1");
    need(n_seg[1], "PLAN segment 1<=|b|<2.375");
    need(n_seg[2], "PLAN segment 2.375<=|b|<5");
    need(n_seg[3], "PLAN segment |b|>=5");
    need(n_insat, "input layer saturation");
    need(n_outsat, "output layer saturation");
    need(n_pending, "class read while pending");
    need(n_reload, "classifier reloaded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
