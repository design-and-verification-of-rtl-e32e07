// axi_master_bfm - simple AXI4 master for the testbenches.
//
// Not synthesizable: tasks that issue single writes, single reads and bursts
// on a 32-bit AXI4 port, one transaction at a time, with the address and data
// channels presented in the same cycle. Drives and samples on the clock edge
// given by its clk_i port. All beats are 4 bytes.
module axi_master_bfm #(
  parameter int ID_W = 4
) (
  input  logic            clk_i,
  output logic [ID_W-1:0] awid,
  output logic [31:0]     awaddr,
  output logic [7:0]      awlen,
  output logic [2:0]      awsize,
  output logic [1:0]      awburst,
  output logic            awvalid,
  input  logic            awready,
  output logic [31:0]     wdata,
  output logic            wlast,
  output logic            wvalid,
  input  logic            wready,
  input  logic [ID_W-1:0] bid,
  input  logic [1:0]      bresp,
  input  logic            bvalid,
  output logic            bready,
  output logic [ID_W-1:0] arid,
  output logic [31:0]     araddr,
  output logic [7:0]      arlen,
  output logic [2:0]      arsize,
  output logic [1:0]      arburst,
  output logic            arvalid,
  input  logic            arready,
  input  logic [ID_W-1:0] rid,
  input  logic [31:0]     rdata,
  input  logic [1:0]      rresp,
  input  logic            rlast,
  input  logic            rvalid,
  output logic            rready
);
  int protocol_errors = 0;

  initial begin
    awid = 0; awaddr = 0; awlen = 0; awsize = 3'd2; awburst = 2'b01; awvalid = 0;
    wdata = 0; wlast = 0; wvalid = 0; bready = 0;
    arid = 0; araddr = 0; arlen = 0; arsize = 3'd2; arburst = 2'b01; arvalid = 0; rready = 0;
  end

  // burst write; FIXED (burst = 0) or INCR (1)
  task automatic write_burst(input logic [31:0] addr, input logic [31:0] data[$],
                             input logic [1:0] burst, input logic [ID_W-1:0] id,
                             output logic [1:0] resp);
    @(negedge clk_i);
    awid = id; awaddr = addr; awlen = 8'(data.size() - 1); awburst = burst; awvalid = 1;
    do @(posedge clk_i); while (!awready);
    #1 awvalid = 0;
    foreach (data[i]) begin
      wdata = data[i]; wlast = (i == data.size() - 1); wvalid = 1;
      do @(posedge clk_i); while (!wready);
      #1 wvalid = 0; wlast = 0;
    end
    bready = 1;
    do @(posedge clk_i); while (!bvalid);
    resp = bresp;
    if (bid != id) protocol_errors++;
    #1 bready = 0;
  endtask

  task automatic write(input logic [31:0] addr, input logic [31:0] data, output logic [1:0] resp);
    logic [31:0] d[$];
    d.push_back(data);
    write_burst(addr, d, 2'b01, ID_W'(1), resp);
  endtask

  task automatic read_burst(input logic [31:0] addr, input int beats, input logic [1:0] burst,
                            input logic [ID_W-1:0] id, output logic [31:0] data[$],
                            output logic [1:0] resp);
    resp = 2'b00;
    data.delete();
    @(negedge clk_i);
    arid = id; araddr = addr; arlen = 8'(beats - 1); arburst = burst; arvalid = 1;
    do @(posedge clk_i); while (!arready);
    #1 arvalid = 0;
    rready = 1;
    for (int i = 0; i < beats; i++) begin
      do @(posedge clk_i); while (!rvalid);
      data.push_back(rdata);
      if (rresp != 2'b00) resp = rresp;
      if (rlast != (i == beats - 1) || rid != id) protocol_errors++;
    end
    #1 rready = 0;
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data, output logic [1:0] resp);
    logic [31:0] d[$];
    read_burst(addr, 1, 2'b01, ID_W'(2), d, resp);
    data = d[0];
  endtask
endmodule
