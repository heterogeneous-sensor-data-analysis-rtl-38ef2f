// Parameter bank and select-line multiplexers of the adaptive ANN.
//
// Holds one full parameter set per sensor type: the input-layer constants
// (x_min, gain mantissa and shift, y_min), the hidden weights and biases and
// the output weights and biases. A classifier smaller than I-J-K = 7-6-5
// simply leaves its unused entries at zero (zero padding). Three select
// inputs, one per layer, steer the multiplexers, so each pipeline stage of
// the datapath reads the set of the sample it currently holds.
//
// The trained constants are loaded through a write port (one entry per clock)
// rather than fixed at build time; the storage, the write port and the entry
// layout below are this design's choices. Entry index within a set:
//   [0, I)                x_min[i]        FEAT_W bits
//   [I, 2I)               gain g[i]       DATA_W bits, unsigned
//   [2I, 3I)              gain shift[i]   GSH_W bits
//   [3I, 4I)              y_min[i]        DATA_W bits
//   [4I, 4I+J*I)          W_h[j][i]       at 4I + j*I + i
//   then J entries        b_h[j]
//   then K*J entries      W_o[k][j]       at base + k*J + j
//   then K entries        b_o[k]
// Writes to indices past the set are ignored. Reset clears every entry
// except y_min, which resets to -1.0 (the scaled feature range is [-1, 1]).
// Reads are combinational; a write is visible the cycle after wr_en.
module param_bank #(
  parameter int unsigned N_SENS = aann_pkg::N_SENS,
  parameter int unsigned N_IN   = aann_pkg::N_IN,
  parameter int unsigned N_HID  = aann_pkg::N_HID,
  parameter int unsigned N_OUT  = aann_pkg::N_OUT,
  parameter int unsigned DATA_W = aann_pkg::DATA_W,
  parameter int unsigned FRAC_W = aann_pkg::FRAC_W,
  parameter int unsigned FEAT_W = aann_pkg::FEAT_W,
  parameter int unsigned GSH_W  = aann_pkg::GSH_W,
  localparam int unsigned SEL_W = (N_SENS > 1) ? $clog2(N_SENS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // write port
  input  logic                     wr_en,
  input  logic [SEL_W-1:0]         wr_set,
  input  logic [15:0]              wr_idx,
  input  logic [31:0]              wr_data,
  // per-layer select lines
  input  logic [SEL_W-1:0]         sel_in,
  input  logic [SEL_W-1:0]         sel_hid,
  input  logic [SEL_W-1:0]         sel_out,
  // input layer constants of set sel_in
  output logic signed [FEAT_W-1:0] xmin [N_IN],
  output logic        [DATA_W-1:0] gain [N_IN],
  output logic        [GSH_W-1:0]  gsh  [N_IN],
  output logic signed [DATA_W-1:0] ymin [N_IN],
  // hidden layer of set sel_hid
  output logic signed [DATA_W-1:0] wh [N_HID][N_IN],
  output logic signed [DATA_W-1:0] bh [N_HID],
  // output layer of set sel_out
  output logic signed [DATA_W-1:0] wo [N_OUT][N_HID],
  output logic signed [DATA_W-1:0] bo [N_OUT]
);
  localparam int unsigned O_XMIN = 0;
  localparam int unsigned O_GAIN = N_IN;
  localparam int unsigned O_GSH  = 2 * N_IN;
  localparam int unsigned O_YMIN = 3 * N_IN;
  localparam int unsigned O_WH   = 4 * N_IN;
  localparam int unsigned O_BH   = O_WH + N_HID * N_IN;
  localparam int unsigned O_WO   = O_BH + N_HID;
  localparam int unsigned O_BO   = O_WO + N_OUT * N_HID;
  localparam logic signed [DATA_W-1:0] MINUS_ONE = -DATA_W'(1 << FRAC_W);

  logic signed [FEAT_W-1:0] xmin_q [N_SENS][N_IN];
  logic        [DATA_W-1:0] gain_q [N_SENS][N_IN];
  logic        [GSH_W-1:0]  gsh_q  [N_SENS][N_IN];
  logic signed [DATA_W-1:0] ymin_q [N_SENS][N_IN];
  logic signed [DATA_W-1:0] wh_q   [N_SENS][N_HID][N_IN];
  logic signed [DATA_W-1:0] bh_q   [N_SENS][N_HID];
  logic signed [DATA_W-1:0] wo_q   [N_SENS][N_OUT][N_HID];
  logic signed [DATA_W-1:0] bo_q   [N_SENS][N_OUT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_SENS; s++) begin
        for (int i = 0; i < N_IN; i++) begin
          xmin_q[s][i] <= '0;
          gain_q[s][i] <= '0;
          gsh_q[s][i]  <= '0;
          ymin_q[s][i] <= MINUS_ONE;
        end
        for (int j = 0; j < N_HID; j++) begin
          for (int i = 0; i < N_IN; i++) wh_q[s][j][i] <= '0;
          bh_q[s][j] <= '0;
        end
        for (int k = 0; k < N_OUT; k++) begin
          for (int j = 0; j < N_HID; j++) wo_q[s][k][j] <= '0;
          bo_q[s][k] <= '0;
        end
      end
    end else if (wr_en && int'(wr_set) < N_SENS) begin
      for (int i = 0; i < N_IN; i++) begin
        if (wr_idx == 16'(O_XMIN + i)) xmin_q[wr_set][i] <= wr_data[FEAT_W-1:0];
        if (wr_idx == 16'(O_GAIN + i)) gain_q[wr_set][i] <= wr_data[DATA_W-1:0];
        if (wr_idx == 16'(O_GSH  + i)) gsh_q[wr_set][i]  <= wr_data[GSH_W-1:0];
        if (wr_idx == 16'(O_YMIN + i)) ymin_q[wr_set][i] <= wr_data[DATA_W-1:0];
      end
      for (int j = 0; j < N_HID; j++) begin
        for (int i = 0; i < N_IN; i++)
          if (wr_idx == 16'(O_WH + j * N_IN + i)) wh_q[wr_set][j][i] <= wr_data[DATA_W-1:0];
        if (wr_idx == 16'(O_BH + j)) bh_q[wr_set][j] <= wr_data[DATA_W-1:0];
      end
      for (int k = 0; k < N_OUT; k++) begin
        for (int j = 0; j < N_HID; j++)
          if (wr_idx == 16'(O_WO + k * N_HID + j)) wo_q[wr_set][k][j] <= wr_data[DATA_W-1:0];
        if (wr_idx == 16'(O_BO + k)) bo_q[wr_set][k] <= wr_data[DATA_W-1:0];
      end
    end
  end

  // Select-line multiplexers, one bank of them per layer.
  always_comb begin
    xmin = xmin_q[sel_in];
    gain = gain_q[sel_in];
    gsh  = gsh_q[sel_in];
    ymin = ymin_q[sel_in];
    wh   = wh_q[sel_hid];
    bh   = bh_q[sel_hid];
    wo   = wo_q[sel_out];
    bo   = bo_q[sel_out];
  end
endmodule
