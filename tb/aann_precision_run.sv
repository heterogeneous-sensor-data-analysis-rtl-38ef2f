// Helper for tb_aann_precisions: one adaptive_ann built at neuron width DW
// with FW fraction bits, loaded with four random classifiers scaled to that
// format, then fed N_SAMPLES records of random sensor types back to back.
// Every class is compared with the reference model at the same width, and
// the result must arrive 4 clocks after the request. Reports its check and
// failure counts and raises done at the end.
module aann_precision_run #(
  parameter int unsigned DW = 16,
  parameter int unsigned FW = 13,
  parameter int N_SAMPLES = 1000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  import aann_pkg::*;
  import aann_ref_pkg::*;

  typedef ann_model #(DW, FW) model_t;
  typedef struct { int cls; longint t; } exp_t;

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
  logic signed [DW-1:0] out_max;
  exp_t q [$];
  longint cyc = 0;
  model_t m;

  adaptive_ann #(.DATA_W(DW), .FRAC_W(FW)) dut (.*);

  initial begin checks = 0; failures = 0; done = 0; end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      checks++;
      if (q.size() == 0) failures++;
      else begin
        automatic exp_t e = q.pop_front();
        if (int'(out_class) != e.cls || cyc - e.t != 4) begin
          failures++;
          if (failures < 5) $display("FAIL %0d-bit: class %0d expected %0d", DW, out_class, e.cls);
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < N_IN; i++) x[i] = '0;
    m = new();
    @(posedge rst_n);
    for (int s = 0; s < N_SENS; s++)
      for (int idx = 0; idx < m.set_size(); idx++) begin
        @(negedge clk);
        wr_en = 1; wr_set = SEL_W'(s); wr_idx = 16'(idx); wr_data = 32'(m.entry(s, idx));
      end
    @(negedge clk);
    wr_en = 0;
    for (int n = 0; n < N_SAMPLES; n++) begin
      automatic int s = int'($urandom_range(N_SENS - 1, 0));
      automatic longint xv [N_IN];
      automatic exp_t e;
      @(negedge clk);
      for (int i = 0; i < N_IN; i++) begin
        xv[i] = m.feature(s, i);
        x[i] = FEAT_W'(xv[i]);
      end
      in_valid = 1; in_sel = SEL_W'(s);
      e.cls = m.classify(s, xv);
      e.t = cyc;
      q.push_back(e);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (q.size() != 0) failures++;
    done = 1;
  end
endmodule
