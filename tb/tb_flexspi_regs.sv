// tb_flexspi_regs - self-checking test of the register configuration block.
//
// An APB master task pair drives the block; the control and FIFO sides are
// driven by the testbench. Checks: read-back of CLKDIV, CMD, ADR, LEN, DUM and
// INTCFG; the sequence configuration fields taken from LEN and DUM; the start,
// mode, chip select and software reset pulses of a STATUS write; the STATUS
// read fields; the TXFIFO push and RXFIFO pop handshakes including PREADY
// wait states while the FIFO cannot serve; PSLVERR on an unmapped offset; and
// the three interrupt causes, the INTSTA flag, irq_o and write-1-to-clear.
module tb_flexspi_regs;
  import flexspi_pkg::*;
  logic clk = 0, rst_ni = 0;
  logic [11:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic pwrite = 0, psel = 0, penable = 0, pready, pslverr;
  logic start, read, quad, srst, clk_div_valid, irq;
  logic [3:0] cs;
  seq_cfg_t cfg;
  logic [7:0] clk_div;
  logic busy = 0, eot = 0;
  seq_state_e state = S_ADDR;
  logic [31:0] tx_data, rx_data = 32'hCAFE_F00D;
  logic tx_valid, tx_ready = 1, rx_valid = 1, rx_ready;
  logic [4:0] tx_el = 0, rx_el = 0;
  int checks = 0, failures = 0;
  int starts = 0, srsts = 0, pushes = 0, pops = 0, waits = 0;
  logic last_read, last_quad;
  logic [3:0] last_cs;
  logic [31:0] last_push;

  always #5 clk = ~clk;

  flexspi_regs #(.NUM_CS(4), .LVL_W(5)) dut (
    .clk_i(clk), .rst_ni, .paddr_i(paddr), .pwdata_i(pwdata), .pwrite_i(pwrite), .psel_i(psel),
    .penable_i(penable), .prdata_o(prdata), .pready_o(pready), .pslverr_o(pslverr),
    .start_o(start), .read_o(read), .quad_o(quad), .cs_o(cs), .srst_o(srst), .cfg_o(cfg),
    .clk_div_o(clk_div), .clk_div_valid_o(clk_div_valid), .busy_i(busy), .state_i(state),
    .eot_i(eot), .tx_data_o(tx_data), .tx_valid_o(tx_valid), .tx_ready_i(tx_ready),
    .tx_elements_i(tx_el), .rx_data_i(rx_data), .rx_valid_i(rx_valid), .rx_ready_o(rx_ready),
    .rx_elements_i(rx_el), .irq_o(irq));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (start) begin starts++; last_read = read; last_quad = quad; last_cs = cs; end
    if (srst) srsts++;
    if (tx_valid && tx_ready) begin pushes++; last_push = tx_data; end
    if (rx_valid && rx_ready) pops++;
    if (psel && penable && !pready) waits++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apb(input logic wr, input logic [11:0] a, input logic [31:0] d,
                     output logic [31:0] q, output logic err);
    @(negedge clk); paddr = a; pwrite = wr; pwdata = d; psel = 1; penable = 0;
    @(negedge clk); penable = 1;
    do @(posedge clk); while (!pready);
    q = prdata; err = pslverr;
    #1;
    psel = 0; penable = 0;
  endtask
  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    logic [31:0] q; logic e;
    apb(1, a, d, q, e);
    check(!e, $sformatf("no error writing %h", a));
  endtask
  task automatic rd(input logic [11:0] a, output logic [31:0] q);
    logic e;
    apb(0, a, 0, q, e);
    check(!e, $sformatf("no error reading %h", a));
  endtask

  initial begin
    logic [31:0] q;
    logic e;
    repeat (3) @(posedge clk);
    rst_ni = 1;
    // read-back
    wr(REG_CLKDIV, 32'h0000_0104); rd(REG_CLKDIV, q); check(q == 32'h04, "CLKDIV is 8 bits");
    wr(REG_CMD, 32'h0000_00EB);    rd(REG_CMD, q);    check(q == 32'hEB, "CMD");
    wr(REG_ADR, 32'h0012_3456);    rd(REG_ADR, q);    check(q == 32'h123456, "ADR");
    wr(REG_LEN, 32'h0100_1808);    rd(REG_LEN, q);    check(q == 32'h0100_1808, "LEN");
    wr(REG_DUM, 32'h0003_0006);    rd(REG_DUM, q);    check(q == 32'h0003_0006, "DUM");
    check(cfg.cmd == 32'hEB && cfg.addr == 32'h123456 && cfg.cmd_len == 8 && cfg.addr_len == 24
          && cfg.data_len == 16'h0100 && cfg.dummy_rd == 6 && cfg.dummy_wr == 3, "sequence fields");
    // STATUS: quad read on chip select 2
    wr(REG_STATUS, 32'h0000_0404);
    check(starts == 1 && last_read && last_quad && last_cs == 4'b0100, "quad read start");
    wr(REG_STATUS, 32'h0000_0102);
    check(starts == 2 && !last_read && !last_quad && last_cs == 4'b0001, "standard write start");
    wr(REG_STATUS, 32'h0000_0110);
    check(srsts == 1 && starts == 2, "software reset pulse only");
    busy = 1; tx_el = 5'd3; rx_el = 5'd9;
    rd(REG_STATUS, q);
    check(q == {3'b0, 5'd9, 3'b0, 5'd3, 1'b0, 3'(S_ADDR), 4'b0001, 7'b0, 1'b1}, $sformatf("STATUS read %h", q));
    busy = 0;
    // TX FIFO push with wait states
    tx_ready = 0;
    fork
      wr(REG_TXFIFO, 32'hFFFF_F01A);
      begin repeat (5) @(negedge clk); tx_ready = 1; end
    join
    check(pushes == 1 && last_push == 32'hFFFF_F01A, $sformatf("TXFIFO push %0d %h", pushes, last_push));
    check(waits >= 3, "PREADY held while TX FIFO full");
    // RX FIFO pop with wait states
    rx_valid = 0; waits = 0;
    fork
      rd(REG_RXFIFO, q);
      begin repeat (4) @(negedge clk); rx_valid = 1; end
    join
    check(pops == 1 && q == 32'hCAFE_F00D && waits >= 2, $sformatf("RXFIFO pop %0d %h %0d", pops, q, waits));
    // unmapped offset
    apb(0, 12'h01C, 0, q, e); check(e, "PSLVERR on 0x1C");
    apb(1, 12'h02C, 0, q, e); check(e, "PSLVERR on 0x2C");
    // interrupts
    wr(REG_INTCFG, {1'b1, 1'b1, 1'b1, 1'b1, 15'd0, 5'd4, 3'd0, 5'd2});
    rd(REG_INTCFG, q); check(q == 32'hF000_0402, "INTCFG");
    rd(REG_INTSTA, q); check(q == 0 && !irq, "no interrupt yet");
    rx_el = 5'd3; repeat (2) @(negedge clk); rx_el = 5'd4; repeat (2) @(negedge clk);
    rd(REG_INTSTA, q); check(q == 32'h3 && irq, $sformatf("RX threshold interrupt %h", q));
    wr(REG_INTSTA, 32'h2); rd(REG_INTSTA, q); check(q == 0 && !irq, "write 1 clears");
    tx_el = 5'd5; repeat (2) @(negedge clk); tx_el = 5'd2; repeat (2) @(negedge clk);
    rd(REG_INTSTA, q); check(q == 32'h5 && irq, $sformatf("TX threshold interrupt %h", q));
    @(negedge clk); eot = 1; @(negedge clk); eot = 0;
    rd(REG_INTSTA, q); check(q == 32'hD, $sformatf("end-of-transfer interrupt %h", q));
    wr(REG_INTCFG, 32'h7000_0402); check(!irq, "global enable masks irq");
    wr(REG_INTSTA, 32'hE); rd(REG_INTSTA, q); check(q == 0, "all cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
