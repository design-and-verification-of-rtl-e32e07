// tb_flexspi_axi2apb - self-checking test of the AXI4 to APB bridge.
//
// An AXI master model drives the bridge; an APB slave model behind it holds
// 64 words, inserts random wait states and answers PSLVERR at one address.
// Checks: single writes and reads, INCR bursts (address steps by 4) and FIXED
// bursts (address kept), one APB transfer per beat, SLVERR responses, IDs,
// RLAST and that every APB transfer had a setup cycle before its access.
module tb_flexspi_axi2apb;
  logic clk = 0, rst_ni = 0;
  logic [3:0] awid, bid, arid, rid;
  logic [31:0] awaddr, wdata, araddr, rdata;
  logic [7:0] awlen, arlen;
  logic [2:0] awsize, arsize;
  logic [1:0] awburst, arburst, bresp, rresp;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rlast, rvalid, rready;
  logic [11:0] paddr;
  logic [31:0] pwdata, prdata;
  logic pwrite, psel, penable, pready, pslverr;
  logic [31:0] apb_mem[64];
  int checks = 0, failures = 0, apb_xfers = 0, setup_errs = 0, fixed_writes = 0;
  logic psel_q = 0;

  always #5 clk = ~clk;

  axi_master_bfm #(.ID_W(4)) bfm (
    .clk_i(clk), .awid, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready,
    .wdata, .wlast, .wvalid, .wready, .bid, .bresp, .bvalid, .bready,
    .arid, .araddr, .arlen, .arsize, .arburst, .arvalid, .arready,
    .rid, .rdata, .rresp, .rlast, .rvalid, .rready);

  flexspi_axi2apb #(.ID_W(4), .APB_AW(12)) dut (
    .clk_i(clk), .rst_ni,
    .s_axi_awid(awid), .s_axi_awaddr(awaddr), .s_axi_awlen(awlen), .s_axi_awsize(awsize),
    .s_axi_awburst(awburst), .s_axi_awlock(1'b0), .s_axi_awcache(4'h0), .s_axi_awprot(3'h0),
    .s_axi_awqos(4'h0), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(4'hF), .s_axi_wlast(wlast), .s_axi_wvalid(wvalid),
    .s_axi_wready(wready), .s_axi_bid(bid), .s_axi_bresp(bresp), .s_axi_bvalid(bvalid),
    .s_axi_bready(bready), .s_axi_arid(arid), .s_axi_araddr(araddr), .s_axi_arlen(arlen),
    .s_axi_arsize(arsize), .s_axi_arburst(arburst), .s_axi_arlock(1'b0), .s_axi_arcache(4'h0),
    .s_axi_arprot(3'h0), .s_axi_arqos(4'h0), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rid(rid), .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rlast(rlast),
    .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .paddr_o(paddr), .pwdata_o(pwdata), .pwrite_o(pwrite), .psel_o(psel), .penable_o(penable),
    .prdata_i(prdata), .pready_i(pready), .pslverr_i(pslverr));

  // APB slave model: random wait states, error at 0xFFC
  logic wait_done;
  assign pready  = wait_done;
  assign pslverr = psel && penable && (paddr == 12'hFFC);
  assign prdata  = apb_mem[paddr[7:2]];
  always @(posedge clk) begin
    wait_done <= psel && penable ? 1'b0 : 1'b0;
    if (psel && !penable) wait_done <= ($urandom % 3) == 0;
    else if (psel && penable && !wait_done) wait_done <= ($urandom % 2) == 0;
    if (psel && penable && pready) begin
      apb_xfers++;
      if (pwrite && paddr != 12'hFFC) apb_mem[paddr[7:2]] <= pwdata;
      if (pwrite && paddr == 12'h040) fixed_writes++;
    end
    if (penable && !psel_q) setup_errs++;
    psel_q <= psel && !penable;
    if (psel && penable && !pready) psel_q <= 1'b1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] resp;
    logic [31:0] q, d[$], r[$];
    foreach (apb_mem[i]) apb_mem[i] = 0;
    wait_done = 0;
    repeat (3) @(posedge clk);
    rst_ni = 1;
    // single write/read, as the CLKDIV write of the example (base 0x1A102000)
    bfm.write(32'h1a10_2004, 32'h4, resp);
    check(resp == 2'b00 && apb_mem[1] == 32'h4, "single write");
    bfm.read(32'h1a10_2004, q, resp);
    check(resp == 2'b00 && q == 32'h4, "single read");
    check(apb_xfers == 2, "one APB transfer per beat");
    // INCR burst of 8
    d.delete();
    for (int i = 0; i < 8; i++) d.push_back($urandom);
    bfm.write_burst(32'h1a10_2080, d, 2'b01, 4'd5, resp);
    check(resp == 2'b00, "burst write response");
    foreach (d[i]) check(apb_mem[32 + i] == d[i], $sformatf("INCR beat %0d", i));
    bfm.read_burst(32'h1a10_2080, 8, 2'b01, 4'd6, r, resp);
    foreach (d[i]) check(r[i] == d[i], $sformatf("INCR read beat %0d", i));
    // FIXED burst of 4 to one address
    d = '{32'h11, 32'h22, 32'h33, 32'h44};
    bfm.write_burst(32'h1a10_2040, d, 2'b00, 4'd7, resp);
    check(fixed_writes == 4 && apb_mem[16] == 32'h44, "FIXED burst stays on one address");
    // error response
    bfm.write(32'h1a10_2ffc, 32'h1, resp);
    check(resp == 2'b10, "SLVERR on write");
    bfm.read(32'h1a10_2ffc, q, resp);
    check(resp == 2'b10, "SLVERR on read");
    check(bfm.protocol_errors == 0, "IDs and RLAST");
    check(setup_errs == 0, "setup cycle before every access");
    check(apb_xfers == 2 + 8 + 8 + 4 + 2, $sformatf("APB transfer count %0d", apb_xfers));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
