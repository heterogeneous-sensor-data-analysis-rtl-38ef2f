// AXI4-Lite bus bundle with a simple master model for the testbenches.
//
// write() presents AW and W together and waits for the slave to accept them,
// then for the B response; read() presents AR and waits for R. Both tasks
// record the number of clocks the transaction took. The master holds each
// request stable until it is accepted, as the protocol requires.
interface axil_bus_if #(parameter int unsigned ADDR_W = 8) (input logic clk);
  logic [ADDR_W-1:0] awaddr;
  logic              awvalid, awready;
  logic [31:0]       wdata;
  logic [3:0]        wstrb;
  logic              wvalid, wready;
  logic [1:0]        bresp;
  logic              bvalid, bready;
  logic [ADDR_W-1:0] araddr;
  logic              arvalid, arready;
  logic [31:0]       rdata;
  logic [1:0]        rresp;
  logic              rvalid, rready;

  int last_cycles;
  int resp_errors = 0;

  task automatic init();
    awaddr = '0; awvalid = 0; wdata = '0; wstrb = 4'hF; wvalid = 0; bready = 0;
    araddr = '0; arvalid = 0; rready = 0;
  endtask

  task automatic write(input logic [ADDR_W-1:0] addr, input logic [31:0] data);
    int n = 0;
    @(negedge clk);
    awaddr = addr; awvalid = 1; wdata = data; wvalid = 1; bready = 1;
    do begin @(posedge clk); n++; end while (!(awready && wready));
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    while (!bvalid) begin @(posedge clk); n++; @(negedge clk); end
    if (bresp != 2'b00) resp_errors++;
    @(posedge clk); n++;
    @(negedge clk);
    bready = 0;
    last_cycles = n;
  endtask

  task automatic read(input logic [ADDR_W-1:0] addr, output logic [31:0] data);
    int n = 0;
    @(negedge clk);
    araddr = addr; arvalid = 1; rready = 1;
    do begin @(posedge clk); n++; end while (!arready);
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) begin @(posedge clk); n++; @(negedge clk); end
    data = rdata;
    if (rresp != 2'b00) resp_errors++;
    @(posedge clk); n++;
    @(negedge clk);
    rready = 0;
    last_cycles = n;
  endtask
endinterface
