// flexspi_ctrl - communication control of the FlexSPI controller.
//
// Holds the mode control (standard or quad, read or write, chip select, IO
// direction), the command sequence state machine, and instantiates the clock
// divider and the transmit and receive shift logic.
// A start pulse in IDLE latches the sequence configuration and the mode,
// pulls the selected chip select low and enters the first stage whose length
// is non-zero, in the order CMD, ADDR, DUMMY, DATA (DATA_TX for writes,
// DATA_RX for reads); stages of length zero are skipped, so IDLE can enter
// any stage but WAIT_EG. A start with command, address and data lengths all
// zero is ignored. Each stage starts its shift unit one cycle after it is
// entered and leaves on the unit's done pulse. CMD, ADDR and DATA_TX send on
// IO0 (standard) or IO0..3 (quad); DUMMY counts flash clock cycles with the
// IO lines released; DATA_RX receives, then WAIT_EG waits until the flash
// clock has stopped low and the last word is in the RX FIFO. The return to
// IDLE raises chip select and pulses eot_o.
// A software reset returns to IDLE at once, even in the middle of a flash
// clock high phase (the clock then finishes that phase and stops).
// Flash clock timing is mode 0: clock idles low, outputs change after the
// falling edge, inputs are sampled at the rising edge. Between stages the
// clock pauses low for a few system cycles.
// States and the skip rule follow the document; stage order, IO use per mode,
// the dummy stage's released lines and the pauses are this design's choice.
module flexspi_ctrl
  import flexspi_pkg::*;
#(
  parameter int unsigned NUM_CS = 4
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              srst_i,
  // command from the register block
  input  logic              start_i,
  input  logic              read_i,
  input  logic              quad_i,
  input  logic [NUM_CS-1:0] cs_i,
  input  seq_cfg_t          cfg_i,
  input  logic [7:0]        clk_div_i,
  input  logic              clk_div_valid_i,
  // TX FIFO read side
  input  logic [31:0]       tx_data_i,
  input  logic              tx_valid_i,
  output logic              tx_ready_o,
  // RX FIFO write side
  output logic [31:0]       rx_data_o,
  output logic              rx_valid_o,
  input  logic              rx_ready_i,
  // status
  output logic              busy_o,
  output seq_state_e        state_o,
  output logic              eot_o,
  // flash pins
  output logic              spi_clk_o,
  output logic [NUM_CS-1:0] spi_csn_o,
  output logic [3:0]        spi_sdo_o,
  output logic [3:0]        spi_oe_o,
  input  logic [3:0]        spi_sdi_i
);

  seq_state_e        state, next_stage;
  seq_cfg_t          cfg_q;
  logic              read_q, quad_q, launch;
  logic [NUM_CS-1:0] cs_q;

  // shift unit and clock divider connections
  logic        clk_en, clk_rise, clk_fall, clk_running;
  logic        tx_en, tx_quad, tx_valid, tx_data_ready, tx_clk_en, tx_done;
  logic [15:0] tx_cnt;
  logic [31:0] tx_data;
  logic        rx_en, rx_clk_en, rx_done;
  logic [3:0]  sdo;

  // ---------------------------------------------------------------
  // stage after the current one, skipping stages of zero length
  // ---------------------------------------------------------------
  function automatic seq_state_e first_stage(input seq_state_e after, input seq_cfg_t c,
                                             input logic rd);
    logic [15:0] dummy;
    dummy = rd ? c.dummy_rd : c.dummy_wr;
    first_stage = S_IDLE;
    if (after == S_IDLE && c.cmd_len != '0)
      first_stage = S_CMD;
    else if ((after == S_IDLE || after == S_CMD) && c.addr_len != '0)
      first_stage = S_ADDR;
    else if ((after == S_IDLE || after == S_CMD || after == S_ADDR) && dummy != '0)
      first_stage = S_DUMMY;
    else if (after != S_DATA_TX && after != S_DATA_RX && after != S_WAIT_EG
             && c.data_len != '0)
      first_stage = rd ? S_DATA_RX : S_DATA_TX;
  endfunction

  logic cfg_has_work;
  assign cfg_has_work = (cfg_i.cmd_len != '0) || (cfg_i.addr_len != '0) || (cfg_i.data_len != '0);
  assign next_stage   = first_stage(state, cfg_q, read_q);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state  <= S_IDLE;
      cfg_q  <= '0;
      read_q <= 1'b0;
      quad_q <= 1'b0;
      cs_q   <= '0;
      launch <= 1'b0;
      eot_o  <= 1'b0;
    end else if (srst_i) begin
      state  <= S_IDLE;
      launch <= 1'b0;
      eot_o  <= 1'b0;
    end else begin
      launch <= 1'b0;
      eot_o  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start_i && cfg_has_work) begin
            cfg_q  <= cfg_i;
            read_q <= read_i;
            quad_q <= quad_i;
            cs_q   <= cs_i;
            state  <= first_stage(S_IDLE, cfg_i, read_i);
            launch <= 1'b1;
          end
        end
        S_CMD, S_ADDR, S_DUMMY, S_DATA_TX: begin
          if (tx_done) begin
            state  <= next_stage;
            launch <= (next_stage != S_IDLE);
            eot_o  <= (next_stage == S_IDLE);
          end
        end
        S_DATA_RX: begin
          if (rx_done) state <= S_WAIT_EG;
        end
        S_WAIT_EG: begin
          if (!clk_running && !rx_valid_o) begin
            state <= S_IDLE;
            eot_o <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------
  // mode control: what the transmit unit sends, IO direction
  // ---------------------------------------------------------------
  always_comb begin
    tx_data  = '0;
    tx_valid = 1'b1;
    tx_cnt   = '0;
    tx_quad  = quad_q;
    unique case (state)
      S_CMD:     begin tx_data = cfg_q.cmd;  tx_cnt = {10'd0, cfg_q.cmd_len};  end
      S_ADDR:    begin tx_data = cfg_q.addr; tx_cnt = {10'd0, cfg_q.addr_len}; end
      S_DUMMY:   begin tx_cnt = read_q ? cfg_q.dummy_rd : cfg_q.dummy_wr; tx_quad = 1'b0; end
      S_DATA_TX: begin tx_data = tx_data_i; tx_valid = tx_valid_i; tx_cnt = cfg_q.data_len; end
      default:   ;
    endcase
  end

  assign tx_en      = launch && (state inside {S_CMD, S_ADDR, S_DUMMY, S_DATA_TX});
  assign rx_en      = launch && (state == S_DATA_RX);
  assign tx_ready_o = (state == S_DATA_TX) && tx_data_ready;
  assign clk_en     = tx_clk_en | rx_clk_en;

  always_comb begin
    unique case (state)
      S_CMD, S_ADDR, S_DATA_TX: spi_oe_o = quad_q ? 4'b1111 : 4'b0001;
      default:                  spi_oe_o = 4'b0000;
    endcase
  end

  assign spi_sdo_o = sdo & spi_oe_o;
  assign spi_csn_o = ~(cs_q & {NUM_CS{state != S_IDLE}});
  assign busy_o    = (state != S_IDLE);
  assign state_o   = state;

  flexspi_clkgen #(.DIV_W(8)) u_clkgen (
    .clk_i           (clk_i),
    .rst_ni          (rst_ni),
    .en_i            (clk_en),
    .clk_div_i       (clk_div_i),
    .clk_div_valid_i (clk_div_valid_i),
    .spi_clk_o       (spi_clk_o),
    .spi_rise_o      (clk_rise),
    .spi_fall_o      (clk_fall),
    .running_o       (clk_running)
  );

  flexspi_tx #(.CNT_W(16)) u_tx (
    .clk_i            (clk_i),
    .rst_ni           (rst_ni),
    .clr_i            (srst_i),
    .en_i             (tx_en),
    .en_quad_i        (tx_quad),
    .counter_in_i     (tx_cnt),
    .counter_in_upd_i (1'b0),
    .data_i           (tx_data),
    .data_valid_i     (tx_valid),
    .data_ready_o     (tx_data_ready),
    .tx_edge_i        (clk_fall),
    .sdo_o            (sdo),
    .clk_en_o         (tx_clk_en),
    .done_o           (tx_done)
  );

  flexspi_rx #(.CNT_W(16)) u_rx (
    .clk_i        (clk_i),
    .rst_ni       (rst_ni),
    .clr_i        (srst_i),
    .en_i         (rx_en),
    .en_quad_i    (quad_q),
    .counter_in_i (cfg_q.data_len),
    .rx_edge_i    (clk_rise),
    .sdi_i        (spi_sdi_i),
    .data_o       (rx_data_o),
    .data_valid_o (rx_valid_o),
    .data_ready_i (rx_ready_i),
    .clk_en_o     (rx_clk_en),
    .done_o       (rx_done)
  );

  // chip select only moves while the flash clock is low (a software reset
  // aborts at once and is exempt)
  assert property (@(posedge clk_i) disable iff (!rst_ni)
                   $changed(spi_csn_o) && !$past(srst_i) |-> !spi_clk_o);

endmodule
