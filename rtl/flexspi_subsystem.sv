// flexspi_subsystem - FlexSPI subsystem: AXI4 slave in, serial flash out.
//
// The system reaches the flash controller over a 32-bit AXI4 bus. The
// AXI-to-APB bridge turns every AXI beat into one APB transfer to the FlexSPI
// controller, which holds the registers, the TX and RX FIFOs and the
// communication control that drives the flash pins. The AXI interconnect in
// front of this port is not part of the subsystem: it is expected to route the
// controller's 4 KB register window here (the low 12 address bits select the
// register).
// Interface: AXI4 slave (AW, W, B, AR, R channels), flash clock, active-low
// chip selects, four IO lines as output / output enable / input, interrupt.
// Timing: one register access costs the AXI handshakes plus two APB cycles;
// the flash clock runs at clk / (2*(CLKDIV+1)).
// The composition (AXI, AXI-to-APB bridge, FlexSPI controller) follows the
// document; the bridge's behaviour is this design's choice.
module flexspi_subsystem #(
  parameter int unsigned AXI_ID_W   = 4,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned NUM_CS     = 4
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // AXI4 write address
  input  logic [AXI_ID_W-1:0]   s_axi_awid,
  input  logic [31:0]       s_axi_awaddr,
  input  logic [7:0]        s_axi_awlen,
  input  logic [2:0]        s_axi_awsize,
  input  logic [1:0]        s_axi_awburst,
  input  logic              s_axi_awlock,
  input  logic [3:0]        s_axi_awcache,
  input  logic [2:0]        s_axi_awprot,
  input  logic [3:0]        s_axi_awqos,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  // AXI4 write data
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wlast,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  // AXI4 write response
  output logic [AXI_ID_W-1:0]   s_axi_bid,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  // AXI4 read address
  input  logic [AXI_ID_W-1:0]   s_axi_arid,
  input  logic [31:0]       s_axi_araddr,
  input  logic [7:0]        s_axi_arlen,
  input  logic [2:0]        s_axi_arsize,
  input  logic [1:0]        s_axi_arburst,
  input  logic              s_axi_arlock,
  input  logic [3:0]        s_axi_arcache,
  input  logic [2:0]        s_axi_arprot,
  input  logic [3:0]        s_axi_arqos,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  // AXI4 read data
  output logic [AXI_ID_W-1:0]   s_axi_rid,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rlast,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // flash pins
  output logic              spi_clk_o,
  output logic [NUM_CS-1:0] spi_csn_o,
  output logic [3:0]        spi_sdo_o,
  output logic [3:0]        spi_oe_o,
  input  logic [3:0]        spi_sdi_i,
  // interrupt
  output logic              irq_o
);

  logic [11:0] paddr;
  logic [31:0] pwdata, prdata;
  logic        pwrite, psel, penable, pready, pslverr;

  flexspi_axi2apb #(.ID_W(AXI_ID_W), .APB_AW(12)) u_axi2apb (
    .clk_i, .rst_ni,
    .s_axi_awid,
    .s_axi_awaddr,
    .s_axi_awlen,
    .s_axi_awsize,
    .s_axi_awburst,
    .s_axi_awlock,
    .s_axi_awcache,
    .s_axi_awprot,
    .s_axi_awqos,
    .s_axi_awvalid,
    .s_axi_awready,
    .s_axi_wdata,
    .s_axi_wstrb,
    .s_axi_wlast,
    .s_axi_wvalid,
    .s_axi_wready,
    .s_axi_bid,
    .s_axi_bresp,
    .s_axi_bvalid,
    .s_axi_bready,
    .s_axi_arid,
    .s_axi_araddr,
    .s_axi_arlen,
    .s_axi_arsize,
    .s_axi_arburst,
    .s_axi_arlock,
    .s_axi_arcache,
    .s_axi_arprot,
    .s_axi_arqos,
    .s_axi_arvalid,
    .s_axi_arready,
    .s_axi_rid,
    .s_axi_rdata,
    .s_axi_rresp,
    .s_axi_rlast,
    .s_axi_rvalid,
    .s_axi_rready,
    .paddr_o   (paddr),
    .pwdata_o  (pwdata),
    .pwrite_o  (pwrite),
    .psel_o    (psel),
    .penable_o (penable),
    .prdata_i  (prdata),
    .pready_i  (pready),
    .pslverr_i (pslverr)
  );

  flexspi #(.FIFO_DEPTH(FIFO_DEPTH), .NUM_CS(NUM_CS)) u_flexspi (
    .clk_i, .rst_ni,
    .paddr_i   (paddr),
    .pwdata_i  (pwdata),
    .pwrite_i  (pwrite),
    .psel_i    (psel),
    .penable_i (penable),
    .prdata_o  (prdata),
    .pready_o  (pready),
    .pslverr_o (pslverr),
    .spi_clk_o, .spi_csn_o, .spi_sdo_o, .spi_oe_o, .spi_sdi_i,
    .irq_o
  );

endmodule
