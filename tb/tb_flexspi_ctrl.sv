// tb_flexspi_ctrl - self-checking test of the communication control block.
//
// The control block drives the behavioural flash model; simple queues stand
// in for the TX and RX FIFOs (the RX side applies random back-pressure).
// Sequences: standard program (CMD, ADDR, DATA_TX), standard read (CMD, ADDR,
// DATA_RX, WAIT_EG), fast read with dummy cycles and a partial last word,
// quad program and quad read with dummy cycles, a command-only sequence, a
// data-only sequence (IDLE straight to DATA_TX), a start with all lengths
// zero (ignored) and a software reset in the middle of a transfer. Checks the
// flash memory and the received words against values computed here, the chip
// select, the flash clock period (CLKDIV = 4 gives 10 system clocks) and that
// every state of the sequence was visited.
module tb_flexspi_ctrl;
  import flexspi_pkg::*;
  logic clk = 0, rst_ni = 0, srst = 0, start = 0, read = 0, quad = 0;
  logic [3:0] cs = 4'b0010;
  seq_cfg_t cfg;
  logic [7:0] div = 8'd1;
  logic div_valid = 0;
  logic [31:0] tx_data, rx_data;
  logic tx_valid, tx_ready, rx_valid, rx_ready = 0, busy, eot;
  seq_state_e state;
  logic spi_clk;
  logic [3:0] csn, sdo, oe, sdi;
  int checks = 0, failures = 0;
  int visits[7];
  int eots = 0;
  logic [31:0] txq[$], rxq[$];

  always #5 clk = ~clk;

  assign tx_valid = txq.size() > 0;
  assign tx_data  = tx_valid ? txq[0] : 32'h0;

  flexspi_ctrl #(.NUM_CS(4)) dut (
    .clk_i(clk), .rst_ni, .srst_i(srst), .start_i(start), .read_i(read), .quad_i(quad),
    .cs_i(cs), .cfg_i(cfg), .clk_div_i(div), .clk_div_valid_i(div_valid),
    .tx_data_i(tx_data), .tx_valid_i(tx_valid), .tx_ready_o(tx_ready),
    .rx_data_o(rx_data), .rx_valid_o(rx_valid), .rx_ready_i(rx_ready),
    .busy_o(busy), .state_o(state), .eot_o(eot),
    .spi_clk_o(spi_clk), .spi_csn_o(csn), .spi_sdo_o(sdo), .spi_oe_o(oe), .spi_sdi_i(sdi));

  flash_model #(.DUMMY_STD(8), .DUMMY_QUAD(6)) u_flash (
    .sclk_i(spi_clk), .csn_i(csn[1]), .qpi_i(quad), .io_i(sdo & oe), .io_o(sdi));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (tx_valid && tx_ready) void'(txq.pop_front());
    if (rx_valid && rx_ready) rxq.push_back(rx_data);
    rx_ready <= ($urandom % 3) != 0;
    visits[state]++;
    if (eot) eots++;
    if (rst_ni && csn != 4'b1111) check(csn == 4'b1101, "only the selected chip select is low");
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic go(input bit rd, input bit q, input logic [7:0] c, input int alen,
                    input logic [23:0] a, input int dummy, input int dbits);
    int e;
    e = eots;
    cfg = '0;
    cfg.cmd = {24'h0, c}; cfg.cmd_len = 6'd8;
    cfg.addr = {8'h0, a}; cfg.addr_len = 6'(alen);
    cfg.dummy_rd = 16'(dummy); cfg.dummy_wr = 16'(dummy);
    cfg.data_len = 16'(dbits);
    @(negedge clk); start = 1; read = rd; quad = q;
    @(negedge clk); start = 0;
    wait (eots > e);
    @(negedge clk);
    check(!busy && csn == 4'b1111, "back to idle, chip select high");
  endtask

  function automatic logic [7:0] wbyte(input logic [31:0] w[$], input int i);
    return w[i / 4][31 - 8 * (i % 4) -: 8];
  endfunction

  initial begin
    logic [31:0] w[$];
    logic [31:0] exp;
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_ni = 1;
    // flash clock divider 4: period 10 system clocks
    @(negedge clk); div = 8'd4; div_valid = 1; @(negedge clk); div_valid = 0;
    // standard program, 2 words at 0x10
    w = '{32'h1122_3344, 32'hA5C3_0F96};
    txq = w;
    fork
      go(0, 0, 8'h02, 24, 24'h10, 0, 64);
      begin
        time t0, t1;
        @(posedge spi_clk); t0 = $time; @(posedge spi_clk); t1 = $time;
        check((t1 - t0) == 100, $sformatf("flash clock period %0t", t1 - t0));
      end
    join
    for (int i = 0; i < 8; i++) check(u_flash.mem[8'h10 + i] == wbyte(w, i), $sformatf("program byte %0d", i));
    check(txq.size() == 0, "TX words all taken");
    @(negedge clk); div = 8'd1; div_valid = 1; @(negedge clk); div_valid = 0;
    // standard read back
    rxq.delete();
    go(1, 0, 8'h03, 24, 24'h10, 0, 64);
    check(rxq.size() == 2 && rxq[0] == w[0] && rxq[1] == w[1], "standard read data");
    // fast read with dummy, 40 bits from 0x20: last word holds one byte
    rxq.delete();
    go(1, 0, 8'h0B, 24, 24'h20, 8, 40);
    exp = {u_flash.mem[8'h20], u_flash.mem[8'h21], u_flash.mem[8'h22], u_flash.mem[8'h23]};
    check(rxq.size() == 2 && rxq[0] == exp && rxq[1] == {24'h0, u_flash.mem[8'h24]}, "fast read data");
    // quad program 3 words at 0x40, quad read back
    w = '{32'hDEAD_BEEF, 32'h0123_4567, 32'h89AB_CDEF};
    txq = w;
    go(0, 1, 8'h32, 24, 24'h40, 0, 96);
    for (int i = 0; i < 12; i++) check(u_flash.mem[8'h40 + i] == wbyte(w, i), $sformatf("quad program byte %0d", i));
    rxq.delete();
    go(1, 1, 8'hEB, 24, 24'h40, 6, 96);
    check(rxq.size() == 3 && rxq[0] == w[0] && rxq[1] == w[1] && rxq[2] == w[2], "quad read data");
    // command only
    go(0, 0, 8'h06, 0, 24'h0, 0, 0);
    check(u_flash.n_wren == 1, "write enable seen by the flash");
    // data only: IDLE straight to DATA_TX
    txq = '{32'h5A5A_0000};
    cfg = '0; cfg.data_len = 16'd16;
    @(negedge clk); start = 1; read = 0; quad = 0;
    @(negedge clk); start = 0;
    check(state == S_DATA_TX, "IDLE jumps to DATA_TX");
    wait (!busy);
    check(txq.size() == 0, "data-only word sent");
    // all lengths zero: ignored
    cfg = '0; cfg.dummy_rd = 16'd4;
    @(negedge clk); start = 1; read = 1;
    @(negedge clk); start = 0;
    check(!busy, "empty sequence ignored");
    // software reset in the middle of a read
    cfg = '0; cfg.cmd = 32'h03; cfg.cmd_len = 6'd8; cfg.addr_len = 6'd24; cfg.data_len = 16'd256;
    @(negedge clk); start = 1; read = 1; quad = 0;
    @(negedge clk); start = 0;
    repeat (60) @(negedge clk);
    check(busy, "busy before reset");
    srst = 1; @(negedge clk); srst = 0;
    check(!busy && csn == 4'b1111, "software reset returns to idle");
    repeat (20) @(negedge clk);
    check(!spi_clk, "clock stopped after reset");
    foreach (visits[i]) check(visits[i] > 0, $sformatf("state %0d visited", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
