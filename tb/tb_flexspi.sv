// tb_flexspi - self-checking test of the FlexSPI controller on its APB port.
//
// An APB master task drives the controller, a behavioural flash model sits on
// the flash pins. Runs a standard program and read back, a fast read with
// dummy cycles and a quad program / quad read, checks the data against the
// flash memory, the flash clock period for CLKDIV = 2 (6 system clocks), the
// end-of-transfer interrupt and that chip select 3 is the one used.
module tb_flexspi;
  import flexspi_pkg::*;
  logic clk = 0, rst_ni = 0;
  logic [11:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic pwrite = 0, psel = 0, penable = 0, pready, pslverr;
  logic spi_clk, irq;
  logic [3:0] csn, sdo, oe, sdi;
  logic qpi = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  flexspi #(.FIFO_DEPTH(16), .NUM_CS(4)) dut (
    .clk_i(clk), .rst_ni, .paddr_i(paddr), .pwdata_i(pwdata), .pwrite_i(pwrite),
    .psel_i(psel), .penable_i(penable), .prdata_o(prdata), .pready_o(pready), .pslverr_o(pslverr),
    .spi_clk_o(spi_clk), .spi_csn_o(csn), .spi_sdo_o(sdo), .spi_oe_o(oe), .spi_sdi_i(sdi),
    .irq_o(irq));

  flash_model #(.DUMMY_STD(8), .DUMMY_QUAD(6)) u_flash (
    .sclk_i(spi_clk), .csn_i(csn[3]), .qpi_i(qpi), .io_i(sdo & oe), .io_o(sdi));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_ni && csn[2:0] != 3'b111) check(0, "wrong chip select");

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apb(input logic w, input logic [11:0] a, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk); paddr = a; pwrite = w; pwdata = d; psel = 1; penable = 0;
    @(negedge clk); penable = 1;
    do @(posedge clk); while (!pready);
    q = prdata;
    check(!pslverr, $sformatf("no PSLVERR at %h", a));
    #1 psel = 0; penable = 0;
  endtask
  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    logic [31:0] q; apb(1, a, d, q);
  endtask
  task automatic rd(input logic [11:0] a, output logic [31:0] q);
    apb(0, a, 0, q);
  endtask
  task automatic run(input logic [7:0] c, input logic [23:0] a, input int dummy, input int dbits,
                     input logic [3:0] mode);
    logic [31:0] s;
    wr(REG_CMD, {24'h0, c}); wr(REG_ADR, {8'h0, a});
    wr(REG_LEN, {16'(dbits), 8'd24, 8'd8}); wr(REG_DUM, {16'(dummy), 16'(dummy)});
    qpi = mode[2] | mode[3];
    wr(REG_STATUS, {20'h0, 4'b1000, 4'h0, mode});
    do rd(REG_STATUS, s); while (s[0]);
  endtask
  function automatic logic [31:0] fw(input int a);
    return {u_flash.mem[8'(a)], u_flash.mem[8'(a + 1)], u_flash.mem[8'(a + 2)], u_flash.mem[8'(a + 3)]};
  endfunction

  initial begin
    logic [31:0] q, w[$];
    time t0, t1;
    repeat (3) @(posedge clk);
    rst_ni = 1;
    wr(REG_CLKDIV, 32'd2);
    wr(REG_INTCFG, 32'hC000_0000);
    w.delete(); for (int i = 0; i < 3; i++) w.push_back($urandom);
    foreach (w[i]) wr(REG_TXFIFO, w[i]);
    fork
      run(8'h02, 24'h20, 0, 96, 4'b0010);
      begin @(posedge spi_clk); t0 = $time; @(posedge spi_clk); t1 = $time; end
    join
    check(t1 - t0 == 60, $sformatf("flash clock period %0t", t1 - t0));
    foreach (w[i]) check(fw(8'h20 + 4 * i) == w[i], $sformatf("programmed word %0d", i));
    check(irq, "end-of-transfer interrupt");
    rd(REG_INTSTA, q); check(q == 32'h9, "INTSTA end of transfer");
    wr(REG_INTSTA, 32'h8); check(!irq, "interrupt cleared");
    run(8'h03, 24'h20, 0, 96, 4'b0001);
    foreach (w[i]) begin rd(REG_RXFIFO, q); check(q == w[i], $sformatf("read word %0d", i)); end
    run(8'h0B, 24'h05, 8, 64, 4'b0001);
    rd(REG_RXFIFO, q); check(q == fw(5), "fast read word 0");
    rd(REG_RXFIFO, q); check(q == fw(9), "fast read word 1");
    w.delete(); for (int i = 0; i < 5; i++) w.push_back($urandom);
    foreach (w[i]) wr(REG_TXFIFO, w[i]);
    run(8'h32, 24'h60, 0, 160, 4'b1000);
    foreach (w[i]) check(fw(8'h60 + 4 * i) == w[i], $sformatf("quad programmed word %0d", i));
    run(8'hEB, 24'h60, 6, 160, 4'b0100);
    foreach (w[i]) begin rd(REG_RXFIFO, q); check(q == w[i], $sformatf("quad read word %0d", i)); end
    rd(REG_STATUS, q); check(q[28:24] == 0 && q[20:16] == 0, "FIFOs empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
