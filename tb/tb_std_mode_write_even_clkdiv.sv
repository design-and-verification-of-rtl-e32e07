// tb_std_mode_write_even_clkdiv - the standard-mode write with an even clock
// divider, run on the whole subsystem at its default parameters.
//
// Replays the reference register sequence over AXI4 at base 0x1A102000:
//  1. single-beat write (AWID 0, AWLEN 0, INCR, 4-byte) of 0x4 to CLKDIV at
//     0x1A102004, OKAY response expected;
//  2. single-beat write of 0xFFFFF01A to TXFIFO at 0x1A102018: the TX FIFO
//     then holds one element and shows the word at its head;
//  3. a standard-mode page program of that word (command 0x02, 24-bit
//     address) to the flash model.
// Checks: responses, FIFO contents, the divider counter running 0,1,2,3,4 and
// wrapping with the flash clock toggling at each wrap, a flash clock period
// of 10 system clocks (one tenth), the four bytes the flash received, and
// again with CLKDIV = 2 and 6 (periods 6 and 14).
module tb_std_mode_write_even_clkdiv;
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
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  axi_master_bfm #(.ID_W(4)) bfm (
    .clk_i(clk), .awid, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready,
    .wdata, .wlast, .wvalid, .wready, .bid, .bresp, .bvalid, .bready,
    .arid, .araddr, .arlen, .arsize, .arburst, .arvalid, .arready,
    .rid, .rdata, .rresp, .rlast, .rvalid, .rready);

  flexspi_subsystem dut (
    .clk_i(clk), .rst_ni,
    .s_axi_awid(awid), .s_axi_awaddr(awaddr), .s_axi_awlen(awlen), .s_axi_awsize(awsize),
    .s_axi_awburst(awburst), .s_axi_awlock(1'b0), .s_axi_awcache(4'h1), .s_axi_awprot(3'h0),
    .s_axi_awqos(4'h0), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(4'hF), .s_axi_wlast(wlast), .s_axi_wvalid(wvalid),
    .s_axi_wready(wready), .s_axi_bid(bid), .s_axi_bresp(bresp), .s_axi_bvalid(bvalid),
    .s_axi_bready(bready), .s_axi_arid(arid), .s_axi_araddr(araddr), .s_axi_arlen(arlen),
    .s_axi_arsize(arsize), .s_axi_arburst(arburst), .s_axi_arlock(1'b0), .s_axi_arcache(4'h1),
    .s_axi_arprot(3'h0), .s_axi_arqos(4'h0), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rid(rid), .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rlast(rlast),
    .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .spi_clk_o(spi_clk), .spi_csn_o(csn), .spi_sdo_o(sdo), .spi_oe_o(oe), .spi_sdi_i(sdi),
    .irq_o(irq));

  flash_model u_flash (.sclk_i(spi_clk), .csn_i(csn[0]), .qpi_i(1'b0), .io_i(sdo & oe), .io_o(sdi));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axi_wr(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] q[$];
    logic [1:0] resp;
    q.push_back(d);
    bfm.write_burst(a, q, 2'b01, 4'd0, resp);
    check(resp == 2'b00 && bid == 4'd0, $sformatf("OKAY for %h", a));
  endtask

  // divider counter sequence while the flash clock runs
  int cnt_errs = 0, wraps = 0;
  logic [7:0] cnt_q;
  logic sclk_q;
  always @(posedge clk) begin
    cnt_q <= dut.u_flexspi.u_ctrl.u_clkgen.counter;
    sclk_q <= spi_clk;
    if (rst_ni && dut.u_flexspi.u_ctrl.u_clkgen.running && sclk_q != spi_clk) begin
      wraps++;
      if (cnt_q != dut.u_flexspi.u_ctrl.u_clkgen.counter_trgt) cnt_errs++;
    end
  end

  task automatic program_word(input logic [7:0] div, input logic [7:0] a);
    logic [31:0] s;
    time t0, t1;
    logic [31:0] w;
    w = $urandom;
    axi_wr(BASE + 32'(REG_CLKDIV), {24'h0, div});
    axi_wr(BASE + 32'(REG_TXFIFO), w);
    axi_wr(BASE + 32'(REG_CMD), 32'h02);
    axi_wr(BASE + 32'(REG_ADR), {24'h0, a});
    axi_wr(BASE + 32'(REG_LEN), {16'd32, 8'd24, 8'd8});
    axi_wr(BASE + 32'(REG_STATUS), 32'h0000_0102);
    @(posedge spi_clk); t0 = $time; @(posedge spi_clk); t1 = $time;
    check(t1 - t0 == 10 * 2 * (div + 1), $sformatf("CLKDIV %0d: period %0d clocks", div, (t1 - t0) / 10));
    do begin logic [1:0] r; bfm.read(BASE + 32'(REG_STATUS), s, r); end while (s[0]);
    check({u_flash.mem[a], u_flash.mem[8'(a + 1)], u_flash.mem[8'(a + 2)], u_flash.mem[8'(a + 3)]} == w,
          $sformatf("flash received %h", w));
  endtask

  initial begin
    logic [31:0] s;
    repeat (5) @(posedge clk);
    rst_ni = 1;
    // 1. CLKDIV = 4
    axi_wr(32'h1a10_2004, 32'h4);
    check(dut.u_flexspi.u_regs.clkdiv_q == 8'h04, "CLKDIV holds 4");
    // 2. TXFIFO write
    axi_wr(32'h1a10_2018, 32'hffff_f01a);
    check(dut.u_flexspi.u_tx_fifo.elements_o == 5'd1, "one element in the TX FIFO");
    check(dut.u_flexspi.u_tx_fifo.data_o == 32'hffff_f01a, "FIFO head is 0xFFFFF01A");
    // 3. standard-mode write of that word
    axi_wr(BASE + 32'(REG_CMD), 32'h02);
    axi_wr(BASE + 32'(REG_ADR), 32'h000010);
    axi_wr(BASE + 32'(REG_LEN), {16'd32, 8'd24, 8'd8});
    axi_wr(BASE + 32'(REG_STATUS), 32'h0000_0102);
    begin
      time t0, t1;
      @(posedge spi_clk); t0 = $time; @(posedge spi_clk); t1 = $time;
      check(t1 - t0 == 100, "flash clock is a tenth of the system clock");
    end
    do begin logic [1:0] r; bfm.read(BASE + 32'(REG_STATUS), s, r); end while (s[0]);
    check({u_flash.mem[8'h10], u_flash.mem[8'h11], u_flash.mem[8'h12], u_flash.mem[8'h13]} == 32'hffff_f01a,
          "flash received 0xFFFFF01A");
    check(dut.u_flexspi.u_tx_fifo.elements_o == 0, "TX FIFO drained");
    // other even dividers
    program_word(8'd2, 8'h20);
    program_word(8'd6, 8'h30);
    check(wraps > 0 && cnt_errs == 0, $sformatf("clock toggles when the counter wraps at CLKDIV (%0d wraps)", wraps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
