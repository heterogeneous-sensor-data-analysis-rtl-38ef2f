// Adaptive ANN datapath: one fixed 7-6-5 multilayer perceptron that becomes
// any of four classifiers according to a select line.
//
// The network shape is the maximum over the hosted classifiers (I = max i_s,
// J = max j_s, K = max k_s). For select value s, the parameter multiplexers
// (param_bank) feed classifier s's constants; inputs beyond i_s are forced to
// zero, hidden neurons beyond j_s are deactivated (forced to zero) and MAX
// considers only the first k_s outputs. Every neuron of a layer computes in
// parallel, with one multiplier per input of each neuron
// (I + J*I + K*J = 7 + 42 + 30 = 79 multipliers at the default size).
//
// The layer structure, the select-line switching, the zero padding and the
// per-classifier topologies follow the design description. The pipelining is
// this design's choice: a register after each layer and after MAX, with the
// select value travelling with the sample so every stage reads its own
// parameter set. Samples may enter back to back, one per clock, with any mix
// of sensor types.
//
// Timing: in_valid/in_sel/x sampled at a rising edge appear as out_valid with
// out_class (0-based) exactly LATENCY = 4 clocks later. No back-pressure.
// Parameter writes take effect one clock after wr_en and should not overlap
// classifications that use the set being written.
module adaptive_ann #(
  parameter int unsigned N_SENS = aann_pkg::N_SENS,
  parameter int unsigned N_IN   = aann_pkg::N_IN,
  parameter int unsigned N_HID  = aann_pkg::N_HID,
  parameter int unsigned N_OUT  = aann_pkg::N_OUT,
  parameter int unsigned DATA_W = aann_pkg::DATA_W,
  parameter int unsigned FRAC_W = aann_pkg::FRAC_W,
  parameter int unsigned FEAT_W = aann_pkg::FEAT_W,
  parameter int unsigned GSH_W  = aann_pkg::GSH_W,
  parameter int unsigned TOPO_I [N_SENS] = aann_pkg::TOPO_I,
  parameter int unsigned TOPO_J [N_SENS] = aann_pkg::TOPO_J,
  parameter int unsigned TOPO_K [N_SENS] = aann_pkg::TOPO_K,
  localparam int unsigned SEL_W = (N_SENS > 1) ? $clog2(N_SENS) : 1,
  localparam int unsigned IDX_W = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // classification request
  input  logic                     in_valid,
  input  logic [SEL_W-1:0]         in_sel,
  input  logic signed [FEAT_W-1:0] x [N_IN],
  // parameter load port
  input  logic                     wr_en,
  input  logic [SEL_W-1:0]         wr_set,
  input  logic [15:0]              wr_idx,
  input  logic [31:0]              wr_data,
  // result
  output logic                     out_valid,
  output logic [SEL_W-1:0]         out_sel,
  output logic [IDX_W-1:0]         out_class,
  output logic signed [DATA_W-1:0] out_max
);
  localparam int unsigned CNT_W = $clog2(N_OUT + 1);
  localparam int unsigned HACC_W = 2 * DATA_W + $clog2(N_IN + 1) + 1;

  // ---- parameter multiplexers --------------------------------------------
  logic signed [FEAT_W-1:0] p_xmin [N_IN];
  logic        [DATA_W-1:0] p_gain [N_IN];
  logic        [GSH_W-1:0]  p_gsh  [N_IN];
  logic signed [DATA_W-1:0] p_ymin [N_IN];
  logic signed [DATA_W-1:0] p_wh [N_HID][N_IN];
  logic signed [DATA_W-1:0] p_bh [N_HID];
  logic signed [DATA_W-1:0] p_wo [N_OUT][N_HID];
  logic signed [DATA_W-1:0] p_bo [N_OUT];

  // pipeline registers
  logic                     v1, v2, v3;
  logic [SEL_W-1:0]         s1, s2, s3;
  logic signed [DATA_W-1:0] y1 [N_IN];
  logic signed [DATA_W-1:0] h2 [N_HID];
  logic signed [DATA_W-1:0] o3 [N_OUT];

  param_bank #(
    .N_SENS(N_SENS), .N_IN(N_IN), .N_HID(N_HID), .N_OUT(N_OUT),
    .DATA_W(DATA_W), .FRAC_W(FRAC_W), .FEAT_W(FEAT_W), .GSH_W(GSH_W)
  ) u_bank (
    .clk, .rst_n,
    .wr_en, .wr_set, .wr_idx, .wr_data,
    .sel_in(in_sel), .sel_hid(s1), .sel_out(s2),
    .xmin(p_xmin), .gain(p_gain), .gsh(p_gsh), .ymin(p_ymin),
    .wh(p_wh), .bh(p_bh), .wo(p_wo), .bo(p_bo)
  );

  // ---- input layer -------------------------------------------------------
  logic signed [DATA_W-1:0] y_c [N_IN];
  for (genvar i = 0; i < N_IN; i++) begin : g_in
    input_neuron #(.FEAT_W(FEAT_W), .DATA_W(DATA_W), .GSH_W(GSH_W)) u_ni (
      .x(x[i]), .xmin(p_xmin[i]), .g(p_gain[i]), .gsh(p_gsh[i]),
      .ymin(p_ymin[i]), .y(y_c[i])
    );
  end

  // ---- hidden layer ------------------------------------------------------
  logic signed [DATA_W-1:0] h_c [N_HID];
  logic signed [HACC_W-1:0] beta_c [N_HID];
  for (genvar j = 0; j < N_HID; j++) begin : g_hid
    hidden_neuron #(.N_IN(N_IN), .DATA_W(DATA_W), .FRAC_W(FRAC_W)) u_nh (
      .y(y1), .w(p_wh[j]), .b(p_bh[j]), .beta(beta_c[j]), .h(h_c[j])
    );
  end

  // ---- output layer ------------------------------------------------------
  logic signed [DATA_W-1:0] o_c [N_OUT];
  for (genvar k = 0; k < N_OUT; k++) begin : g_out
    output_neuron #(.N_HID(N_HID), .DATA_W(DATA_W), .FRAC_W(FRAC_W)) u_no (
      .h(h2), .w(p_wo[k]), .b(p_bo[k]), .op(o_c[k])
    );
  end

  // ---- MAX ---------------------------------------------------------------
  logic [IDX_W-1:0]         cls_c;
  logic signed [DATA_W-1:0] max_c;
  logic [CNT_W-1:0]         k_active;
  always_comb k_active = CNT_W'(TOPO_K[s3]);

  max_select #(.N_OUT(N_OUT), .DATA_W(DATA_W)) u_max (
    .op(o3), .n_active(k_active), .idx(cls_c), .max_val(max_c)
  );

  // ---- layer registers with neuron deactivation --------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; out_valid <= 1'b0;
      s1 <= '0;   s2 <= '0;   s3 <= '0;   out_sel   <= '0;
      out_class <= '0;
      out_max   <= '0;
      for (int i = 0; i < N_IN; i++)  y1[i] <= '0;
      for (int j = 0; j < N_HID; j++) h2[j] <= '0;
      for (int k = 0; k < N_OUT; k++) o3[k] <= '0;
    end else begin
      v1 <= in_valid; s1 <= in_sel;
      for (int i = 0; i < N_IN; i++)
        y1[i] <= (i < TOPO_I[in_sel]) ? y_c[i] : '0;
      v2 <= v1; s2 <= s1;
      for (int j = 0; j < N_HID; j++)
        h2[j] <= (j < TOPO_J[s1]) ? h_c[j] : '0;
      v3 <= v2; s3 <= s2;
      o3 <= o_c;
      out_valid <= v3;
      out_sel   <= s3;
      out_class <= cls_c;
      out_max   <= max_c;
    end
  end

endmodule
