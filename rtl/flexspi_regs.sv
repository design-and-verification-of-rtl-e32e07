// flexspi_regs - register configuration module (APB slave).
//
// Decodes the low 12 bits of the APB address into the ten registers:
//   0x00 STATUS  write: bit0 RD, bit1 WR, bit2 QRD, bit3 QWR (start a
//                standard/quad read/write), bit4 SRST (software reset),
//                bits 11:8 one-hot chip select.
//                read: bit0 busy, 11:8 chip select, 14:12 sequence state,
//                20:16 TX FIFO level, 28:24 RX FIFO level.
//   0x04 CLKDIV  bits 7:0 divider, flash clock = clk / (2*(CLKDIV+1))
//   0x08 CMD     command value, right aligned
//   0x0C ADR     address value, right aligned
//   0x10 LEN     bits 5:0 command bits, 13:8 address bits, 31:16 data bits
//   0x14 DUM     bits 15:0 read dummy cycles, 31:16 write dummy cycles
//   0x18 TXFIFO  write pushes a word into the TX FIFO
//   0x20 RXFIFO  read pops a word from the RX FIFO
//   0x24 INTCFG  bit31 enable, bit30 end-of-transfer, bit29 RX threshold,
//                bit28 TX threshold events; bits 12:8 RX and 4:0 TX threshold
//   0x28 INTSTA  bit0 interrupt flag (OR of bits 3:1); bit1 RX threshold,
//                bit2 TX threshold, bit3 end of transfer; write 1 to clear
// A CLKDIV write is taken by the clock divider only while the flash clock is
// stopped, so it should be written while no transfer runs.
// Other offsets answer with PSLVERR. Register accesses complete in the APB
// access cycle, except a TXFIFO write while the TX FIFO is full and an RXFIFO
// read while the RX FIFO is empty: those hold PREADY low until the FIFO can
// serve. The RX threshold event fires when the RX level rises to the
// threshold or above, the TX one when the TX level falls to the threshold or
// below. irq_o is the INTSTA flag while INTCFG bit31 is set.
// The register names and offsets follow the document; the bit layouts and the
// interrupt events are this design's choice.
module flexspi_regs
  import flexspi_pkg::*;
#(
  parameter int unsigned NUM_CS = 4,
  parameter int unsigned LVL_W  = 5
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
  // to control
  output logic              start_o,
  output logic              read_o,
  output logic              quad_o,
  output logic [NUM_CS-1:0] cs_o,
  output logic              srst_o,
  output seq_cfg_t          cfg_o,
  output logic [7:0]        clk_div_o,
  output logic              clk_div_valid_o,
  // from control
  input  logic              busy_i,
  input  seq_state_e        state_i,
  input  logic              eot_i,
  // TX FIFO write side
  output logic [31:0]       tx_data_o,
  output logic              tx_valid_o,
  input  logic              tx_ready_i,
  input  logic [LVL_W-1:0]  tx_elements_i,
  // RX FIFO read side
  input  logic [31:0]       rx_data_i,
  input  logic              rx_valid_i,
  output logic              rx_ready_o,
  input  logic [LVL_W-1:0]  rx_elements_i,
  // interrupt
  output logic              irq_o
);

  logic [31:0]       cmd_q, adr_q, len_q, dum_q, intcfg_q;
  logic [7:0]        clkdiv_q;
  logic [NUM_CS-1:0] cs_q;
  logic [3:1]        intsta_q;
  logic [LVL_W-1:0]  tx_lvl_q, rx_lvl_q;
  logic              access, wr, rd, known;
  logic              ev_rx, ev_tx, ev_eot;

  assign access = psel_i & penable_i;
  assign wr     = access & pwrite_i;
  assign rd     = access & ~pwrite_i;

  always_comb begin
    unique case (paddr_i)
      REG_STATUS, REG_CLKDIV, REG_CMD, REG_ADR, REG_LEN, REG_DUM,
      REG_TXFIFO, REG_RXFIFO, REG_INTCFG, REG_INTSTA: known = 1'b1;
      default: known = 1'b0;
    endcase
  end

  // FIFO handshakes are made in the access phase
  assign tx_valid_o = wr & (paddr_i == REG_TXFIFO);
  assign tx_data_o  = pwdata_i;
  assign rx_ready_o = rd & (paddr_i == REG_RXFIFO);

  always_comb begin
    pready_o = 1'b1;
    if (paddr_i == REG_TXFIFO && pwrite_i)  pready_o = tx_ready_i;
    if (paddr_i == REG_RXFIFO && !pwrite_i) pready_o = rx_valid_i;
  end
  assign pslverr_o = ~known;

  always_comb begin
    prdata_o = '0;
    unique case (paddr_i)
      REG_STATUS: begin
        prdata_o[0]                 = busy_i;
        prdata_o[8 +: NUM_CS]       = cs_q;
        prdata_o[14:12]             = state_i;
        prdata_o[16 +: LVL_W]       = tx_elements_i;
        prdata_o[24 +: LVL_W]       = rx_elements_i;
      end
      REG_CLKDIV: prdata_o[7:0] = clkdiv_q;
      REG_CMD:    prdata_o = cmd_q;
      REG_ADR:    prdata_o = adr_q;
      REG_LEN:    prdata_o = len_q;
      REG_DUM:    prdata_o = dum_q;
      REG_RXFIFO: prdata_o = rx_data_i;
      REG_INTCFG: prdata_o = intcfg_q;
      REG_INTSTA: prdata_o[3:0] = {intsta_q, |intsta_q};
      default:    prdata_o = '0;
    endcase
  end

  // interrupt events: level crossings of the FIFOs and end of transfer
  assign ev_rx  = intcfg_q[IC_RX_EN] & (rx_elements_i >= intcfg_q[8 +: LVL_W])
                & (rx_lvl_q < intcfg_q[8 +: LVL_W]);
  assign ev_tx  = intcfg_q[IC_TX_EN] & (tx_elements_i <= intcfg_q[0 +: LVL_W])
                & (tx_lvl_q > intcfg_q[0 +: LVL_W]);
  assign ev_eot = intcfg_q[IC_EOT_EN] & eot_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cmd_q    <= '0;
      adr_q    <= '0;
      len_q    <= '0;
      dum_q    <= '0;
      intcfg_q <= '0;
      clkdiv_q <= '0;
      cs_q     <= '0;
      intsta_q <= '0;
      tx_lvl_q <= '0;
      rx_lvl_q <= '0;
    end else begin
      tx_lvl_q <= tx_elements_i;
      rx_lvl_q <= rx_elements_i;
      if (wr) begin
        unique case (paddr_i)
          REG_STATUS: cs_q     <= pwdata_i[8 +: NUM_CS];
          REG_CLKDIV: clkdiv_q <= pwdata_i[7:0];
          REG_CMD:    cmd_q    <= pwdata_i;
          REG_ADR:    adr_q    <= pwdata_i;
          REG_LEN:    len_q    <= pwdata_i;
          REG_DUM:    dum_q    <= pwdata_i;
          REG_INTCFG: intcfg_q <= pwdata_i;
          default:    ;
        endcase
      end
      // sticky causes: set by an event, cleared by writing 1
      for (int i = 1; i <= 3; i++) begin
        if (wr && paddr_i == REG_INTSTA && pwdata_i[i]) intsta_q[i] <= 1'b0;
      end
      if (intcfg_q[IC_EN]) begin
        if (ev_rx)  intsta_q[IS_RX]  <= 1'b1;
        if (ev_tx)  intsta_q[IS_TX]  <= 1'b1;
        if (ev_eot) intsta_q[IS_EOT] <= 1'b1;
      end
    end
  end

  // start and reset pulses are made in the access cycle of a STATUS write
  assign start_o         = wr & (paddr_i == REG_STATUS) & (|pwdata_i[ST_QWR:ST_RD]);
  assign read_o          = pwdata_i[ST_RD] | pwdata_i[ST_QRD];
  assign quad_o          = pwdata_i[ST_RD] ? 1'b0 : (pwdata_i[ST_QRD] | (~pwdata_i[ST_WR] & pwdata_i[ST_QWR]));
  assign srst_o          = wr & (paddr_i == REG_STATUS) & pwdata_i[ST_SRST];
  assign cs_o            = (wr && paddr_i == REG_STATUS) ? pwdata_i[8 +: NUM_CS] : cs_q;
  assign clk_div_o       = pwdata_i[7:0];
  assign clk_div_valid_o = wr & (paddr_i == REG_CLKDIV);
  assign irq_o           = intcfg_q[IC_EN] & (|intsta_q);

  assign cfg_o.cmd      = cmd_q;
  assign cfg_o.addr     = adr_q;
  assign cfg_o.cmd_len  = len_q[5:0];
  assign cfg_o.addr_len = len_q[13:8];
  assign cfg_o.data_len = len_q[31:16];
  assign cfg_o.dummy_rd = dum_q[15:0];
  assign cfg_o.dummy_wr = dum_q[31:16];

  // APB: the access phase is always inside a selected transfer
  assert property (@(posedge clk_i) disable iff (!rst_ni) penable_i |-> psel_i);

endmodule
