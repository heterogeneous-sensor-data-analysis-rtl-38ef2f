// Self-checking test of aann_axi_regs: writes and reads back every feature
// and the select register, checks the one-clock start pulse and its timing,
// the busy/done/class protocol (class reads 0 until a result, then the
// 1-based class), the parameter write port with its auto-incrementing index,
// and that the slave answers OKAY on every transaction.
module tb_aann_axi_regs;
  import aann_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_bus_if bus (.clk(clk));

  logic start, pw_en, res_valid = 0;
  logic [SEL_W-1:0] sel, pw_set;
  logic signed [FEAT_W-1:0] feat [N_IN];
  logic [15:0] pw_idx;
  logic [31:0] pw_data;
  logic [2:0] res_class = '0;

  aann_axi_regs dut (
    .clk, .rst_n,
    .s_axi_awaddr(bus.awaddr), .s_axi_awvalid(bus.awvalid), .s_axi_awready(bus.awready),
    .s_axi_wdata(bus.wdata), .s_axi_wstrb(bus.wstrb), .s_axi_wvalid(bus.wvalid),
    .s_axi_wready(bus.wready), .s_axi_bresp(bus.bresp), .s_axi_bvalid(bus.bvalid),
    .s_axi_bready(bus.bready), .s_axi_araddr(bus.araddr), .s_axi_arvalid(bus.arvalid),
    .s_axi_arready(bus.arready), .s_axi_rdata(bus.rdata), .s_axi_rresp(bus.rresp),
    .s_axi_rvalid(bus.rvalid), .s_axi_rready(bus.rready),
    .start, .sel, .feat, .pw_en, .pw_set, .pw_idx, .pw_data, .res_valid, .res_class
  );

  int checks = 0, failures = 0;
  int starts = 0, pwrites = 0;
  longint cyc = 0;
  longint start_cyc;
  logic [15:0] pw_idx_log [$];
  logic [31:0] pw_data_log [$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && start) begin starts++; start_cyc = cyc; end
    if (rst_n && pw_en) begin pwrites++; pw_idx_log.push_back(pw_idx); pw_data_log.push_back(pw_data); end
  end

  task automatic expect_eq(longint got, longint exp_v, string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp_v);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    longint fv [N_IN];
    longint wr_end;
    bus.init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // reset values
    bus.read(8'h0C, rd); expect_eq(rd, 0, "class after reset");
    bus.read(8'h08, rd); expect_eq(rd, 0, "status after reset");
    // features and select
    for (int i = 0; i < N_IN; i++) begin
      fv[i] = longint'($signed(16'($urandom())));
      bus.write(8'(8'h10 + 4 * i), 32'(fv[i]));
    end
    for (int i = 0; i < N_IN; i++) begin
      bus.read(8'(8'h10 + 4 * i), rd);
      expect_eq(longint'($signed(rd)), fv[i], "feature readback");
      expect_eq(longint'(feat[i]), fv[i], "feature output");
    end
    bus.write(8'h04, 32'd2);
    expect_eq(longint'(sel), 2, "sel output");
    bus.read(8'h04, rd); expect_eq(rd, 2, "sel readback");
    // start: one-clock pulse, busy, class cleared
    bus.write(8'h00, 32'd1);
    wr_end = cyc;
    expect_eq(starts, 1, "one start pulse");
    bus.read(8'h08, rd); expect_eq(rd, 2, "status busy");
    bus.read(8'h0C, rd); expect_eq(rd, 0, "class pending");
    bus.read(8'h00, rd); expect_eq(rd, 1, "ctrl busy");
    // the datapath reports class index 3 -> register shows 4
    @(negedge clk); res_valid = 1; res_class = 3'd3;
    @(negedge clk); res_valid = 0;
    bus.read(8'h0C, rd); expect_eq(rd, 4, "class 1-based");
    bus.read(8'h08, rd); expect_eq(rd, 1, "status done");
    // a second start clears the class again
    bus.write(8'h00, 32'd1);
    expect_eq(starts, 2, "second start pulse");
    bus.read(8'h0C, rd); expect_eq(rd, 0, "class cleared by start");
    bus.write(8'h00, 32'd0);
    expect_eq(starts, 2, "ctrl write of 0 does not start");
    // parameter port: set 3, index 10, three data words
    bus.write(8'h30, 32'h0003_000A);
    bus.read(8'h30, rd); expect_eq(rd, 32'h0003_000A, "param addr readback");
    bus.write(8'h34, 32'h11);
    bus.write(8'h34, 32'h22);
    bus.write(8'h34, 32'h33);
    repeat (2) @(negedge clk);
    expect_eq(pwrites, 3, "param writes");
    expect_eq(longint'(pw_set), 3, "param set");
    for (int n = 0; n < 3 && pw_idx_log.size() > 0; n++) begin
      expect_eq(longint'(pw_idx_log.pop_front()), 10 + n, "param index");
      expect_eq(longint'(pw_data_log.pop_front()), 32'h11 * (n + 1), "param data");
    end
    // unmapped address reads 0
    bus.read(8'hFC, rd); expect_eq(rd, 0, "unmapped read");
    expect_eq(bus.resp_errors, 0, "OKAY responses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
