// flexspi - FlexSPI controller: APB slave to serial flash.
//
// The register configuration block decodes APB accesses, the TX FIFO buffers
// words written for the flash, the RX FIFO buffers words read from it, and the
// communication control block runs the command sequence (command, address,
// dummy cycles, data) on the flash pins with the divided flash clock, in
// standard (IO0 out, IO1 in) or quad (IO0..IO3) mode. A software reset clears
// both FIFOs and the control block; configuration registers keep their values.
// Interface: APB slave with a 12-bit byte address (the controller's 4 KB
// window), flash pins as separate output, output enable and input per IO line
// so that pads can be attached outside, and one interrupt line.
// Timing: register accesses take the two APB cycles; TXFIFO writes to a full
// FIFO and RXFIFO reads from an empty one are stretched with PREADY.
// The partition into register block, two FIFOs and control follows the
// document; FIFO depth 16 follows its FIFO waveform.
module flexspi
  import flexspi_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned NUM_CS     = 4
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // APB slave
  input  logic [11:0]       paddr_i,
  input  logic [31:0]       pwdata_i,
  input  logic              pwrite_i,
  input  logic              psel_i,
  input  logic              penable_i,
  output logic [31:0]       prdata_o,
  output logic              pready_o,
  output logic              pslverr_o,
  // flash pins
  output logic              spi_clk_o,
  output logic [NUM_CS-1:0] spi_csn_o,
  output logic [3:0]        spi_sdo_o,
  output logic [3:0]        spi_oe_o,
  input  logic [3:0]        spi_sdi_i,
  // interrupt
  output logic              irq_o
);

  localparam int unsigned LVL_W = $clog2(FIFO_DEPTH + 1);

  logic              start, read, quad, srst, clk_div_valid, busy, eot;
  logic [NUM_CS-1:0] cs;
  logic [7:0]        clk_div;
  seq_cfg_t          cfg;
  seq_state_e        state;

  logic [31:0]       txw_data, txr_data, rxw_data, rxr_data;
  logic              txw_valid, txw_ready, txr_valid, txr_ready;
  logic              rxw_valid, rxw_ready, rxr_valid, rxr_ready;
  logic [LVL_W-1:0]  tx_elements, rx_elements;

  flexspi_regs #(.NUM_CS(NUM_CS), .LVL_W(LVL_W)) u_regs (
    .clk_i, .rst_ni,
    .paddr_i, .pwdata_i, .pwrite_i, .psel_i, .penable_i,
    .prdata_o, .pready_o, .pslverr_o,
    .start_o         (start),
    .read_o          (read),
    .quad_o          (quad),
    .cs_o            (cs),
    .srst_o          (srst),
    .cfg_o           (cfg),
    .clk_div_o       (clk_div),
    .clk_div_valid_o (clk_div_valid),
    .busy_i          (busy),
    .state_i         (state),
    .eot_i           (eot),
    .tx_data_o       (txw_data),
    .tx_valid_o      (txw_valid),
    .tx_ready_i      (txw_ready),
    .tx_elements_i   (tx_elements),
    .rx_data_i       (rxr_data),
    .rx_valid_i      (rxr_valid),
    .rx_ready_o      (rxr_ready),
    .rx_elements_i   (rx_elements),
    .irq_o
  );

  flexspi_fifo #(.DATA_WIDTH(32), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk_i, .rst_ni,
    .clr_i      (srst),
    .elements_o (tx_elements),
    .data_o     (txr_data),
    .valid_o    (txr_valid),
    .ready_i    (txr_ready),
    .valid_i    (txw_valid),
    .data_i     (txw_data),
    .ready_o    (txw_ready)
  );

  flexspi_fifo #(.DATA_WIDTH(32), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk_i, .rst_ni,
    .clr_i      (srst),
    .elements_o (rx_elements),
    .data_o     (rxr_data),
    .valid_o    (rxr_valid),
    .ready_i    (rxr_ready),
    .valid_i    (rxw_valid),
    .data_i     (rxw_data),
    .ready_o    (rxw_ready)
  );

  flexspi_ctrl #(.NUM_CS(NUM_CS)) u_ctrl (
    .clk_i, .rst_ni,
    .srst_i          (srst),
    .start_i         (start),
    .read_i          (read),
    .quad_i          (quad),
    .cs_i            (cs),
    .cfg_i           (cfg),
    .clk_div_i       (clk_div),
    .clk_div_valid_i (clk_div_valid),
    .tx_data_i       (txr_data),
    .tx_valid_i      (txr_valid),
    .tx_ready_o      (txr_ready),
    .rx_data_o       (rxw_data),
    .rx_valid_o      (rxw_valid),
    .rx_ready_i      (rxw_ready),
    .busy_o          (busy),
    .state_o         (state),
    .eot_o           (eot),
    .spi_clk_o, .spi_csn_o, .spi_sdo_o, .spi_oe_o, .spi_sdi_i
  );

endmodule
