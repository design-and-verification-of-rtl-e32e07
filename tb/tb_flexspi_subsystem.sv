// tb_flexspi_subsystem - end-to-end test of the FlexSPI subsystem at its
// default parameters.
//
// An AXI4 master model programs the controller through the AXI-to-APB bridge
// at register base 0x1A102000; a behavioural flash model answers on the flash
// pins. Software sequences:
//  - CLKDIV = 4: flash clock period must be 10 system clocks
//  - TXFIFO write of 0xFFFFF01A: one element, visible at the FIFO head
//  - write enable (command only), standard page program with a FIXED AXI
//    burst into TXFIFO, standard read back (WAIT_EG), fast read with dummy
//    cycles, quad program and quad read
//  - a program started before its data is in the TX FIFO (clock pauses)
//  - a 24-word read that overfills the RX FIFO (clock pauses, PREADY waits)
//  - a data-only transfer, an empty start, an unmapped offset (SLVERR)
//  - interrupts: end of transfer, RX threshold, TX threshold; software reset
// Every read value is compared with the flash model's memory; each mechanism
// is counted and one that never happened counts as a failure.
module tb_flexspi_subsystem;
  import flexspi_pkg::*;
  localparam logic [31:0] BASE = 32'h1A10_2000;

  logic clk = 0, rst_ni = 0;
  logic [3:0] awid, bid, arid, rid;
  logic [31:0] awaddr, wdata, araddr, rdata;
  logic [7:0] awlen, arlen;
  logic [2:0] awsize, arsize;
  logic [1:0] awburst, arburst, bresp, rresp;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rlast, rvalid, rready;
  logic spi_clk, irq;
  logic [3:0] csn, sdo, oe, sdi;
  logic qpi = 0;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_tx_stall = 0, n_rx_stall = 0, n_apb_wait = 0, n_wait_eg = 0, n_dummy = 0;
  int n_skip_to_data = 0, n_quad = 0, n_irq = 0, n_srst = 0, n_slverr = 0, n_burst = 0;

  always #5 clk = ~clk;

  axi_master_bfm #(.ID_W(4)) bfm (
    .clk_i(clk), .awid, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready,
    .wdata, .wlast, .wvalid, .wready, .bid, .bresp, .bvalid, .bready,
    .arid, .araddr, .arlen, .arsize, .arburst, .arvalid, .arready,
    .rid, .rdata, .rresp, .rlast, .rvalid, .rready);

  flexspi_subsystem dut (
    .clk_i(clk), .rst_ni,
    .s_axi_awid(awid), .s_axi_awaddr(awaddr), .s_axi_awlen(awlen), .s_axi_awsize(awsize),
    .s_axi_awburst(awburst), .s_axi_awlock(1'b0), .s_axi_awcache(4'h2), .s_axi_awprot(3'h0),
    .s_axi_awqos(4'h0), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(4'hF), .s_axi_wlast(wlast), .s_axi_wvalid(wvalid),
    .s_axi_wready(wready), .s_axi_bid(bid), .s_axi_bresp(bresp), .s_axi_bvalid(bvalid),
    .s_axi_bready(bready), .s_axi_arid(arid), .s_axi_araddr(araddr), .s_axi_arlen(arlen),
    .s_axi_arsize(arsize), .s_axi_arburst(arburst), .s_axi_arlock(1'b0), .s_axi_arcache(4'h2),
    .s_axi_arprot(3'h0), .s_axi_arqos(4'h0), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rid(rid), .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rlast(rlast),
    .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .spi_clk_o(spi_clk), .spi_csn_o(csn), .spi_sdo_o(sdo), .spi_oe_o(oe), .spi_sdi_i(sdi),
    .irq_o(irq));

  flash_model #(.DUMMY_STD(8), .DUMMY_QUAD(6)) u_flash (
    .sclk_i(spi_clk), .csn_i(csn[0]), .qpi_i(qpi), .io_i(sdo & oe), .io_o(sdi));

  // observation of internal mechanisms
  seq_state_e st, st_q;
  assign st = dut.u_flexspi.u_ctrl.state;
  always @(posedge clk) begin
    st_q <= st;
    if (st == S_DATA_TX && dut.u_flexspi.u_ctrl.u_tx.active && dut.u_flexspi.u_ctrl.u_tx.wait_data
        && dut.u_flexspi.u_ctrl.u_tx.counter != 0) n_tx_stall++;
    if (dut.u_flexspi.u_ctrl.u_rx.active && !dut.u_flexspi.u_ctrl.u_rx.clk_en_o) n_rx_stall++;
    if (dut.u_flexspi.psel_i && dut.u_flexspi.penable_i && !dut.u_flexspi.pready_o) n_apb_wait++;
    if (st == S_WAIT_EG && st_q != S_WAIT_EG) n_wait_eg++;
    if (st == S_DUMMY && st_q != S_DUMMY) n_dummy++;
    if (st_q == S_IDLE && st == S_DATA_TX) n_skip_to_data++;
    if (st != S_IDLE && dut.u_flexspi.u_ctrl.quad_q && st_q == S_IDLE) n_quad++;
    if (irq) n_irq++;
    if (dut.u_flexspi.srst) n_srst++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [11:0] off, input logic [31:0] d);
    logic [1:0] resp;
    bfm.write(BASE + 32'(off), d, resp);
    check(resp == 2'b00, $sformatf("write %h OKAY", off));
  endtask
  task automatic rd(input logic [11:0] off, output logic [31:0] q);
    logic [1:0] resp;
    bfm.read(BASE + 32'(off), q, resp);
    check(resp == 2'b00, $sformatf("read %h OKAY", off));
  endtask
  task automatic wait_idle();
    logic [31:0] s;
    do rd(REG_STATUS, s); while (s[0]);
  endtask
  // one flash command: cmd, 24-bit address (alen), dummy, data bits
  task automatic seq(input logic [7:0] c, input int alen, input logic [23:0] a,
                     input int dummy, input int dbits, input logic [3:0] mode);
    wr(REG_CMD, {24'h0, c});
    wr(REG_ADR, {8'h0, a});
    wr(REG_LEN, {16'(dbits), 2'b00, 6'(alen), 2'b00, 6'(c == 8'h00 ? 0 : 8)});
    wr(REG_DUM, {16'(dummy), 16'(dummy)});
    qpi = mode[2] | mode[3];
    wr(REG_STATUS, {20'h0, 4'b0001, 4'h0, mode});
  endtask

  function automatic logic [31:0] flash_word(input int a);
    return {u_flash.mem[8'(a)], u_flash.mem[8'(a + 1)], u_flash.mem[8'(a + 2)], u_flash.mem[8'(a + 3)]};
  endfunction

  initial begin
    logic [31:0] q, w[$], r[$];
    logic [1:0] resp;
    int t0, t1;
    repeat (5) @(posedge clk);
    rst_ni = 1;

    // CLKDIV = 4: flash clock is a tenth of the system clock
    wr(REG_CLKDIV, 32'h4);
    rd(REG_CLKDIV, q); check(q == 32'h4, "CLKDIV read back");
    // TXFIFO write of 0xFFFFF01A lands in the FIFO
    wr(REG_TXFIFO, 32'hFFFF_F01A);
    check(dut.u_flexspi.u_tx_fifo.elements_o == 1 && dut.u_flexspi.u_tx_fifo.data_o == 32'hFFFF_F01A,
          "TX FIFO holds the written word");
    rd(REG_STATUS, q); check(q[20:16] == 5'd1, "STATUS shows TX level 1");
    // send it: data-only standard write (IDLE straight to DATA_TX), measure the clock
    wr(REG_LEN, 32'h0020_0000);
    wr(REG_STATUS, 32'h0000_0102);
    @(posedge spi_clk); t0 = $time; @(posedge spi_clk); t1 = $time;
    check(t1 - t0 == 10 * 10, $sformatf("flash clock period %0d system clocks", (t1 - t0) / 10));
    wait_idle();
    check(dut.u_flexspi.u_tx_fifo.elements_o == 0, "word sent");
    wr(REG_CLKDIV, 32'h1);

    // write enable: command only
    seq(8'h06, 0, 0, 0, 0, 4'b0010); wait_idle();
    check(u_flash.n_wren == 1, "write enable");
    // standard page program of 4 words via a FIXED burst into TXFIFO
    w.delete(); for (int i = 0; i < 4; i++) w.push_back($urandom);
    bfm.write_burst(BASE + 32'(REG_TXFIFO), w, 2'b00, 4'd3, resp);
    check(resp == 2'b00, "burst into TXFIFO"); n_burst++;
    seq(8'h02, 24, 24'h10, 0, 128, 4'b0010); wait_idle();
    foreach (w[i]) check(flash_word(16 + 4 * i) == w[i], $sformatf("programmed word %0d", i));
    // standard read back
    seq(8'h03, 24, 24'h10, 0, 128, 4'b0001); wait_idle();
    foreach (w[i]) begin rd(REG_RXFIFO, q); check(q == w[i], $sformatf("read word %0d: %h", i, q)); end
    // fast read with 8 dummy cycles, 48 bits
    seq(8'h0B, 24, 24'h31, 8, 48, 4'b0001); wait_idle();
    rd(REG_RXFIFO, q); check(q == flash_word(8'h31), "fast read word 0");
    rd(REG_RXFIFO, q); check(q == {16'h0, u_flash.mem[8'h35], u_flash.mem[8'h36]}, "fast read short word");
    // quad program, data written after the start: the clock waits for it
    w.delete(); for (int i = 0; i < 6; i++) w.push_back($urandom);
    seq(8'h32, 24, 24'h80, 0, 192, 4'b1000);
    repeat (300) @(posedge clk);
    foreach (w[i]) begin wr(REG_TXFIFO, w[i]); repeat (150) @(posedge clk); end
    wait_idle();
    foreach (w[i]) check(flash_word(8'h80 + 4 * i) == w[i], $sformatf("quad programmed word %0d", i));
    // quad read with 6 dummy cycles
    seq(8'hEB, 24, 24'h80, 6, 192, 4'b0100); wait_idle();
    foreach (w[i]) begin rd(REG_RXFIFO, q); check(q == w[i], $sformatf("quad read word %0d", i)); end

    // interrupts: end of transfer + RX threshold 8
    wr(REG_INTCFG, 32'hE000_0800);
    // 24-word standard read overfills the 16-word RX FIFO: drain while it runs
    seq(8'h03, 24, 24'h00, 0, 24 * 32, 4'b0001);
    repeat (3000) @(posedge clk);
    rd(REG_STATUS, q); check(q[28:24] == 5'd16 && q[0], "RX FIFO full, transfer paused");
    check(irq, "RX threshold interrupt");
    rd(REG_INTSTA, q); check(q[1] && q[0], "INTSTA RX cause");
    wr(REG_INTSTA, 32'h2);
    for (int i = 0; i < 24; i++) begin
      rd(REG_RXFIFO, q); check(q == flash_word(4 * i), $sformatf("long read word %0d", i));
    end
    wait_idle();
    rd(REG_INTSTA, q); check(q[3] && irq, "end-of-transfer interrupt");
    wr(REG_INTSTA, 32'hE);
    check(!irq, "interrupt cleared");
    // TX threshold: fill 10 words, interrupt when level falls to 2
    wr(REG_INTCFG, 32'h9000_0002);
    for (int i = 0; i < 10; i++) wr(REG_TXFIFO, 32'h0);
    seq(8'h02, 24, 24'hC0, 0, 320, 4'b0010); wait_idle();
    rd(REG_INTSTA, q); check(q[2] && q[0], "TX threshold interrupt");
    wr(REG_INTSTA, 32'hE); wr(REG_INTCFG, 32'h0);

    // TX FIFO overfill: 20 writes, PREADY holds the bus until the transfer drains it
    seq(8'h02, 24, 24'h00, 0, 20 * 32, 4'b0010);
    for (int i = 0; i < 20; i++) wr(REG_TXFIFO, 32'h0101_0101 * i);
    wait_idle();
    check(flash_word(4 * 19) == 32'h0101_0101 * 19, "20-word program through a 16-word FIFO");

    // empty start is ignored; unmapped offset gives SLVERR
    wr(REG_LEN, 32'h0); wr(REG_STATUS, 32'h0000_0101);
    rd(REG_STATUS, q); check(!q[0], "empty start ignored");
    bfm.write(BASE + 12'h01C, 32'h0, resp); check(resp == 2'b10, "SLVERR on 0x1C");
    if (resp == 2'b10) n_slverr++;
    // software reset in the middle of a read clears FIFOs and control
    seq(8'h03, 24, 24'h00, 0, 1024, 4'b0001);
    repeat (1500) @(posedge clk);
    wr(REG_STATUS, 32'h0000_0010);
    rd(REG_STATUS, q); check(q[0] == 0 && q[28:24] == 0 && q[20:16] == 0, "software reset");
    check(csn == 4'hF, "chip select released");

    check(bfm.protocol_errors == 0, "AXI IDs and RLAST");
    check(u_flash.n_read == 3 && u_flash.n_fast == 1 && u_flash.n_quad_read == 1 && u_flash.n_prog == 4,
          $sformatf("flash commands %0d %0d %0d %0d", u_flash.n_read, u_flash.n_fast, u_flash.n_quad_read, u_flash.n_prog));
    $display("mechanisms: tx_stall=%0d rx_stall=%0d apb_wait=%0d wait_eg=%0d dummy=%0d skip_to_data=%0d quad=%0d irq=%0d srst=%0d slverr=%0d burst=%0d",
             n_tx_stall, n_rx_stall, n_apb_wait, n_wait_eg, n_dummy, n_skip_to_data, n_quad, n_irq, n_srst, n_slverr, n_burst);
    check(n_tx_stall > 0, "TX stall happened");
    check(n_rx_stall > 0, "RX stall happened");
    check(n_apb_wait > 0, "APB wait states happened");
    check(n_wait_eg > 0, "WAIT_EG happened");
    check(n_dummy > 0, "DUMMY happened");
    check(n_skip_to_data > 0, "IDLE to DATA_TX happened");
    check(n_quad >= 2, "quad transfers happened");
    check(n_irq > 0, "interrupt happened");
    check(n_srst > 0, "software reset happened");
    check(n_slverr > 0, "SLVERR happened");
    check(n_burst > 0, "AXI burst happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
