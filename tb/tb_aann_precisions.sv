// Runs the adaptive ANN datapath at the other neuron precisions of the
// original evaluation: 12, 16, 24 and 32 bits (the 8-bit default has its own
// testbench). Fraction bits are 9, 13 and 21 for 12, 16 and 24 bits
// (DATA_W - 3, the same range as the default) and 24 at 32 bits, which
// keeps the 64-bit reference arithmetic free of overflow. Each width
// classifies 1000 records of mixed sensor types against the reference model.
module tb_aann_precisions;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NW = 4;
  int c [NW];
  int f [NW];
  logic d [NW];

  aann_precision_run #(.DW(12), .FW(9))  u12 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .done(d[0]));
  aann_precision_run #(.DW(16), .FW(13)) u16 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .done(d[1]));
  aann_precision_run #(.DW(24), .FW(21)) u24 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .done(d[2]));
  aann_precision_run #(.DW(32), .FW(24)) u32 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .done(d[3]));

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3],
             f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d[0] && d[1] && d[2] && d[3]);
    checks = 0; failures = 0;
    for (int w = 0; w < NW; w++) begin
      checks += c[w]; failures += f[w];
      $display("width %0d: %0d checks, %0d failures", w, c[w], f[w]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
