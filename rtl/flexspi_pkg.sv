// flexspi_pkg - constants and types shared by the FlexSPI controller.
//
// Holds the register map (byte offsets inside the controller's 4 KB window),
// the command-sequence state encoding and the field layout of the STATUS,
// LEN, DUM and INTCFG registers. The offsets follow the controller's register
// table; the bit layouts inside the registers are this design's own choice.
package flexspi_pkg;

  // Register byte offsets
  localparam logic [11:0] REG_STATUS = 12'h000;
  localparam logic [11:0] REG_CLKDIV = 12'h004;
  localparam logic [11:0] REG_CMD    = 12'h008;
  localparam logic [11:0] REG_ADR    = 12'h00C;
  localparam logic [11:0] REG_LEN    = 12'h010;
  localparam logic [11:0] REG_DUM    = 12'h014;
  localparam logic [11:0] REG_TXFIFO = 12'h018;
  localparam logic [11:0] REG_RXFIFO = 12'h020;
  localparam logic [11:0] REG_INTCFG = 12'h024;
  localparam logic [11:0] REG_INTSTA = 12'h028;

  // STATUS write bits
  localparam int unsigned ST_RD   = 0;  // standard read
  localparam int unsigned ST_WR   = 1;  // standard write
  localparam int unsigned ST_QRD  = 2;  // quad read
  localparam int unsigned ST_QWR  = 3;  // quad write
  localparam int unsigned ST_SRST = 4;  // software reset

  // INTCFG bits
  localparam int unsigned IC_EN     = 31;
  localparam int unsigned IC_EOT_EN = 30;
  localparam int unsigned IC_RX_EN  = 29;
  localparam int unsigned IC_TX_EN  = 28;

  // INTSTA bits
  localparam int unsigned IS_FLAG = 0;
  localparam int unsigned IS_RX   = 1;
  localparam int unsigned IS_TX   = 2;
  localparam int unsigned IS_EOT  = 3;

  // Command sequence states
  typedef enum logic [2:0] {
    S_IDLE    = 3'd0,
    S_CMD     = 3'd1,
    S_ADDR    = 3'd2,
    S_DUMMY   = 3'd3,
    S_DATA_TX = 3'd4,
    S_DATA_RX = 3'd5,
    S_WAIT_EG = 3'd6
  } seq_state_e;

  // Sequence configuration handed from the register block to control
  typedef struct packed {
    logic [31:0] cmd;        // command value, right aligned
    logic [31:0] addr;       // address value, right aligned
    logic [5:0]  cmd_len;    // command bits, 0..32
    logic [5:0]  addr_len;   // address bits, 0..32
    logic [15:0] data_len;   // data bits
    logic [15:0] dummy_rd;   // dummy clock cycles before read data
    logic [15:0] dummy_wr;   // dummy clock cycles before write data
  } seq_cfg_t;

endpackage
