// Adaptive ANN classifier IP core: an AXI4-Lite register front end
// (aann_axi_regs) in front of the select-line switched neural network
// datapath (adaptive_ann, with its parameter bank).
//
// One classification: the host writes the features of one sensor record
// (F1..Fi of the selected classifier), writes the sensor type to SEL, writes
// 1 to CTRL and polls CLASS until it is non-zero. Select values: 0 human
// activity (7-6-5, classes walking/sitting/standing/laying/transition),
// 1 ECG (5-4-2, normal/abnormal), 2 blood pressure (6-6-3, normal/low/high),
// 3 toxic gas (4-5-4, acetaldehyde/acetone/toluene/other). The trained
// parameters of each classifier are loaded first through PARAM_ADDR and
// PARAM_DATA. The core needs 4 clocks from the start pulse to the result,
// 5 clocks from the accepted CTRL write to CLASS being updated; the rest of
// a classification's time is bus traffic.
//
// The AXI attachment and its use (features, sensor type and control written,
// class read back) follow the design description; the register map is this
// design's own (see aann_axi_regs).
module aann_ip #(
  parameter int unsigned N_SENS = aann_pkg::N_SENS,
  parameter int unsigned N_IN   = aann_pkg::N_IN,
  parameter int unsigned N_HID  = aann_pkg::N_HID,
  parameter int unsigned N_OUT  = aann_pkg::N_OUT,
  parameter int unsigned DATA_W = aann_pkg::DATA_W,
  parameter int unsigned FRAC_W = aann_pkg::FRAC_W,
  parameter int unsigned FEAT_W = aann_pkg::FEAT_W,
  parameter int unsigned GSH_W  = aann_pkg::GSH_W,
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready
);
  localparam int unsigned SEL_W = (N_SENS > 1) ? $clog2(N_SENS) : 1;
  localparam int unsigned IDX_W = (N_OUT > 1) ? $clog2(N_OUT) : 1;

  logic                     start;
  logic [SEL_W-1:0]         sel;
  logic signed [FEAT_W-1:0] feat [N_IN];
  logic                     pw_en;
  logic [SEL_W-1:0]         pw_set;
  logic [15:0]              pw_idx;
  logic [31:0]              pw_data;
  logic                     res_valid;
  logic [SEL_W-1:0]         res_sel;
  logic [IDX_W-1:0]         res_class;
  logic signed [DATA_W-1:0] res_max;

  aann_axi_regs #(
    .N_SENS(N_SENS), .N_IN(N_IN), .N_OUT(N_OUT), .FEAT_W(FEAT_W), .ADDR_W(ADDR_W)
  ) u_regs (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .start, .sel, .feat,
    .pw_en, .pw_set, .pw_idx, .pw_data,
    .res_valid, .res_class
  );

  adaptive_ann #(
    .N_SENS(N_SENS), .N_IN(N_IN), .N_HID(N_HID), .N_OUT(N_OUT),
    .DATA_W(DATA_W), .FRAC_W(FRAC_W), .FEAT_W(FEAT_W), .GSH_W(GSH_W)
  ) u_ann (
    .clk, .rst_n,
    .in_valid(start), .in_sel(sel), .x(feat),
    .wr_en(pw_en), .wr_set(pw_set), .wr_idx(pw_idx), .wr_data(pw_data),
    .out_valid(res_valid), .out_sel(res_sel), .out_class(res_class), .out_max(res_max)
  );

endmodule
