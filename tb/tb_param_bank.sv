// Self-checking test of param_bank: checks the reset contents (zeros, y_min =
// -1.0), loads four random parameter sets entry by entry, then drives every
// combination of the three per-layer select lines and compares every output
// with the loaded values. Also checks that writes outside a set are ignored.
module tb_param_bank;
  import aann_pkg::*;
  import aann_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [SEL_W-1:0] wr_set = '0, sel_in = '0, sel_hid = '0, sel_out = '0;
  logic [15:0] wr_idx = '0;
  logic [31:0] wr_data = '0;
  logic signed [FEAT_W-1:0] xmin [N_IN];
  logic        [DATA_W-1:0] gain [N_IN];
  logic        [GSH_W-1:0]  gsh  [N_IN];
  logic signed [DATA_W-1:0] ymin [N_IN];
  logic signed [DATA_W-1:0] wh [N_HID][N_IN];
  logic signed [DATA_W-1:0] bh [N_HID];
  logic signed [DATA_W-1:0] wo [N_OUT][N_HID];
  logic signed [DATA_W-1:0] bo [N_OUT];
  int checks = 0, failures = 0;
  ann_model m;

  param_bank dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(longint got, longint exp_v, string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", what, got, exp_v);
    end
  endtask

  task automatic check_sets(int si, int sh, int so);
    sel_in = SEL_W'(si); sel_hid = SEL_W'(sh); sel_out = SEL_W'(so);
    #1;
    for (int i = 0; i < N_IN; i++) begin
      expect_eq(longint'(xmin[i]), m.xmin[si][i], "xmin");
      expect_eq(longint'(gain[i]), m.gain[si][i], "gain");
      expect_eq(longint'(gsh[i]),  m.gsh[si][i],  "gsh");
      expect_eq(longint'(ymin[i]), m.ymin[si][i], "ymin");
    end
    for (int j = 0; j < N_HID; j++) begin
      for (int i = 0; i < N_IN; i++) expect_eq(longint'(wh[j][i]), m.wh[sh][j][i], "wh");
      expect_eq(longint'(bh[j]), m.bh[sh][j], "bh");
    end
    for (int k = 0; k < N_OUT; k++) begin
      for (int j = 0; j < N_HID; j++) expect_eq(longint'(wo[k][j]), m.wo[so][k][j], "wo");
      expect_eq(longint'(bo[k]), m.bo[so][k], "bo");
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = new();
    repeat (2) @(posedge clk);
    #1;
    for (int s = 0; s < N_SENS; s++) begin
      sel_in = SEL_W'(s); sel_hid = SEL_W'(s); sel_out = SEL_W'(s);
      #1;
      for (int i = 0; i < N_IN; i++) begin
        expect_eq(longint'(ymin[i]), -ONE_Q, "reset ymin");
        expect_eq(longint'(gain[i]), 0, "reset gain");
      end
      expect_eq(longint'(wh[N_HID-1][N_IN-1]), 0, "reset wh");
    end
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < N_SENS; s++)
      for (int idx = 0; idx < m.set_size(); idx++) begin
        wr_en = 1; wr_set = SEL_W'(s); wr_idx = 16'(idx);
        wr_data = 32'(m.entry(s, idx));
        @(negedge clk);
      end
    // a write past the end of the set changes nothing
    wr_idx = 16'(m.set_size()); wr_data = 32'hFFFF_FFFF;
    @(negedge clk);
    wr_en = 0;
    for (int a = 0; a < N_SENS; a++)
      for (int b = 0; b < N_SENS; b++)
        for (int c = 0; c < N_SENS; c++)
          check_sets(a, b, c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
