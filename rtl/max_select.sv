// MAX block: returns the index of the largest output-layer value, looking
// only at the first n_active outputs (the neurons the selected classifier
// uses; the others are deactivated and ignored).
//
// A linear scan keeps the running maximum; on equal values the lower index
// wins (tie rule chosen by this design). The winning index is the class.
// With n_active = 0 the result is index 0. Combinational.
//
// Ports: op is N_OUT signed DATA_W-bit values, n_active the number of valid
// outputs, idx the 0-based winning index, max_val its value.
module max_select #(
  parameter int unsigned N_OUT  = aann_pkg::N_OUT,
  parameter int unsigned DATA_W = aann_pkg::DATA_W,
  localparam int unsigned IDX_W = (N_OUT > 1) ? $clog2(N_OUT) : 1,
  localparam int unsigned CNT_W = $clog2(N_OUT + 1)
) (
  input  logic signed [DATA_W-1:0] op [N_OUT],
  input  logic        [CNT_W-1:0]  n_active,
  output logic        [IDX_W-1:0]  idx,
  output logic signed [DATA_W-1:0] max_val
);
  always_comb begin
    idx     = '0;
    max_val = op[0];
    for (int k = 1; k < N_OUT; k++) begin
      if (CNT_W'(k) < n_active && op[k] > max_val) begin
        idx     = IDX_W'(k);
        max_val = op[k];
      end
    end
  end
endmodule
