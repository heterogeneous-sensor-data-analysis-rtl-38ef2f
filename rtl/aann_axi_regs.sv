// AXI4-Lite slave register file of the adaptive ANN IP core.
//
// The host writes the feature vector, the sensor type (select line) and a
// start command, then reads back the class; it also loads the trained
// parameter sets. That division of work over the AXI write and read channels
// follows the design description; the register map and the polling protocol
// below are this design's choices. All registers are 32 bits, word addressed:
//
//   0x00 CTRL        W: bit0 = 1 starts a classification (self-clearing)
//                    R: bit0 = busy
//   0x04 SEL         RW: sensor type s, bits [SEL_W-1:0]
//   0x08 STATUS      R: bit0 = result valid, bit1 = busy
//   0x0C CLASS       R: class number of the last result, 1-based (C1 = 1);
//                       reads 0 from a start until its result is ready
//   0x10 + 4*i       RW: feature F(i+1), signed FEAT_W bits, i < N_IN
//   0x30 PARAM_ADDR  RW: bits [15:0] entry index, bits [16+:SEL_W] set
//   0x34 PARAM_DATA  W: writes one parameter entry at PARAM_ADDR, then the
//                       index advances by one (burst loading)
//
// Write channel: AW and W are accepted together in one cycle when both are
// valid and no response is pending; B follows the next cycle. Read channel:
// AR is accepted when no read data is pending; R follows the next cycle.
// Byte strobes are ignored (full-word writes only). Responses are always OKAY.
// start is a one-clock pulse the cycle after the CTRL write is accepted.
module aann_axi_regs #(
  parameter int unsigned N_SENS = aann_pkg::N_SENS,
  parameter int unsigned N_IN   = aann_pkg::N_IN,
  parameter int unsigned N_OUT  = aann_pkg::N_OUT,
  parameter int unsigned FEAT_W = aann_pkg::FEAT_W,
  parameter int unsigned ADDR_W = 8,
  localparam int unsigned SEL_W = (N_SENS > 1) ? $clog2(N_SENS) : 1,
  localparam int unsigned IDX_W = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0]        s_axi_awaddr,
  input  logic                     s_axi_awvalid,
  output logic                     s_axi_awready,
  input  logic [31:0]              s_axi_wdata,
  input  logic [3:0]               s_axi_wstrb,
  input  logic                     s_axi_wvalid,
  output logic                     s_axi_wready,
  output logic [1:0]               s_axi_bresp,
  output logic                     s_axi_bvalid,
  input  logic                     s_axi_bready,
  input  logic [ADDR_W-1:0]        s_axi_araddr,
  input  logic                     s_axi_arvalid,
  output logic                     s_axi_arready,
  output logic [31:0]              s_axi_rdata,
  output logic [1:0]               s_axi_rresp,
  output logic                     s_axi_rvalid,
  input  logic                     s_axi_rready,
  // to the datapath
  output logic                     start,
  output logic [SEL_W-1:0]         sel,
  output logic signed [FEAT_W-1:0] feat [N_IN],
  output logic                     pw_en,
  output logic [SEL_W-1:0]         pw_set,
  output logic [15:0]              pw_idx,
  output logic [31:0]              pw_data,
  // from the datapath
  input  logic                     res_valid,
  input  logic [IDX_W-1:0]         res_class
);
  localparam logic [ADDR_W-1:0] A_CTRL   = ADDR_W'('h00);
  localparam logic [ADDR_W-1:0] A_SEL    = ADDR_W'('h04);
  localparam logic [ADDR_W-1:0] A_STATUS = ADDR_W'('h08);
  localparam logic [ADDR_W-1:0] A_CLASS  = ADDR_W'('h0C);
  localparam logic [ADDR_W-1:0] A_FEAT   = ADDR_W'('h10);
  localparam logic [ADDR_W-1:0] A_PADDR  = ADDR_W'('h30);
  localparam logic [ADDR_W-1:0] A_PDATA  = ADDR_W'('h34);

  logic        busy, done;
  logic [31:0] class_q;
  logic        wr_fire, rd_fire;
  logic [ADDR_W-1:0] waddr, raddr;

  assign wr_fire       = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = wr_fire;
  assign s_axi_wready  = wr_fire;
  assign s_axi_bresp   = 2'b00;
  assign rd_fire       = s_axi_arvalid && !s_axi_rvalid;
  assign s_axi_arready = rd_fire;
  assign s_axi_rresp   = 2'b00;
  assign waddr = {s_axi_awaddr[ADDR_W-1:2], 2'b00};
  assign raddr = {s_axi_araddr[ADDR_W-1:2], 2'b00};

  // write channel and register updates
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axi_bvalid <= 1'b0;
      start   <= 1'b0;
      sel     <= '0;
      for (int i = 0; i < N_IN; i++) feat[i] <= '0;
      pw_en   <= 1'b0;
      pw_set  <= '0;
      pw_idx  <= '0;
      pw_data <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      class_q <= '0;
    end else begin
      start <= 1'b0;
      pw_en <= 1'b0;
      if (pw_en) pw_idx <= pw_idx + 16'd1;
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;

      if (res_valid) begin
        busy    <= 1'b0;
        done    <= 1'b1;
        class_q <= 32'(res_class) + 32'd1;
      end

      if (wr_fire) begin
        s_axi_bvalid <= 1'b1;
        unique case (waddr)
          A_CTRL: if (s_axi_wdata[0]) begin
            start   <= 1'b1;
            busy    <= 1'b1;
            done    <= 1'b0;
            class_q <= '0;
          end
          A_SEL:   sel <= s_axi_wdata[SEL_W-1:0];
          A_PADDR: begin
            pw_idx <= s_axi_wdata[15:0];
            pw_set <= s_axi_wdata[16 +: SEL_W];
          end
          A_PDATA: begin
            pw_en   <= 1'b1;
            pw_data <= s_axi_wdata;
          end
          default: begin
            for (int i = 0; i < N_IN; i++)
              if (waddr == A_FEAT + ADDR_W'(4 * i)) feat[i] <= s_axi_wdata[FEAT_W-1:0];
          end
        endcase
      end
    end
  end

  // read channel
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else begin
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (rd_fire) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rdata  <= '0;
        case (raddr)
          A_CTRL:   s_axi_rdata <= {31'd0, busy};
          A_SEL:    s_axi_rdata <= 32'(sel);
          A_STATUS: s_axi_rdata <= {30'd0, busy, done};
          A_CLASS:  s_axi_rdata <= class_q;
          A_PADDR:  s_axi_rdata <= {{(16-SEL_W){1'b0}}, pw_set, pw_idx};
          default: begin
            for (int i = 0; i < N_IN; i++)
              if (raddr == A_FEAT + ADDR_W'(4 * i))
                s_axi_rdata <= 32'(feat[i]);
          end
        endcase
      end
    end
  end

  // AXI handshake rules: a response, once valid, is held until accepted;
  // the master must hold its requests until they are accepted.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
  a_awvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_awvalid && !s_axi_awready |=> s_axi_awvalid);
  a_arvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_arvalid && !s_axi_arready |=> s_axi_arvalid);

endmodule
