// Shared constants and types of the adaptive ANN classifier.
//
// The adaptive network has one fixed shape, I-J-K = 7-6-5, which is the
// largest of the four classifiers it hosts (human activity 7-6-5, ECG 5-4-2,
// blood pressure 6-6-3, toxic gas 4-5-4). A 2-bit select line picks which
// classifier's parameters drive the datapath and how many input, hidden and
// output neurons are active. These shapes and the 8-bit neuron precision come
// from the design description; the fixed-point split (5 fraction bits), the
// 16-bit feature width and the gain shift width are choices of this design.
package aann_pkg;

  // Number of sensor types (select line values 0..3).
  localparam int unsigned N_SENS = 4;
  localparam int unsigned SEL_W  = 2;

  // Adaptive ANN dimensions I, J, K: the maxima over the four topologies.
  localparam int unsigned N_IN  = 7;
  localparam int unsigned N_HID = 6;
  localparam int unsigned N_OUT = 5;

  // Neuron data precision (8 bit is the main configuration) and its fixed-point
  // fraction bits. Features arrive as signed integers of FEAT_W bits.
  localparam int unsigned DATA_W = 8;
  localparam int unsigned FRAC_W = 5;
  localparam int unsigned FEAT_W = 16;
  localparam int unsigned GSH_W  = 5;

  // Sensor type encoded on the select line.
  typedef enum logic [SEL_W-1:0] {
    SENS_HAR = 2'd0,   // human activity recognition, 7-6-5
    SENS_ECG = 2'd1,   // abnormal ECG detection,     5-4-2
    SENS_BP  = 2'd2,   // blood pressure class,       6-6-3
    SENS_GAS = 2'd3    // toxic gas class,            4-5-4
  } sensor_e;

  // Active neurons per select value, index = select line value.
  localparam int unsigned TOPO_I [N_SENS] = '{7, 5, 6, 4};
  localparam int unsigned TOPO_J [N_SENS] = '{6, 4, 6, 5};
  localparam int unsigned TOPO_K [N_SENS] = '{5, 2, 3, 4};

endpackage
