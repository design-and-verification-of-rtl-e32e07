// tb_flexspi_rx - self-checking test of the receive shift logic.
//
// The unit is driven by the clock divider as in the controller. A flash-side
// model puts random bits on sdi (IO1 in standard mode, IO0..3 in quad mode),
// the first before the first rising edge and each next one after a falling
// edge. The receiver of the words applies random back-pressure on
// data_ready. Checks: every word (32 bits, the last one right aligned), the
// number of flash clocks, one done pulse, and that back-pressure pauses the
// clock (counted) without losing data.
module tb_flexspi_rx;
  logic clk = 0, rst_ni = 0;
  logic en = 0, quad = 0, rdy = 0, edge_fall, edge_rise, clk_en, done, spi_clk, running, dvalid;
  logic [15:0] cnt = 0;
  logic [31:0] dout;
  logic [3:0]  sdi = 0;
  int checks = 0, failures = 0, stalls = 0;
  int rises, dones;
  logic [3:0] stream[$];
  int sp;

  always #5 clk = ~clk;

  flexspi_clkgen #(.DIV_W(8)) u_clk (
    .clk_i(clk), .rst_ni, .en_i(clk_en), .clk_div_i(8'd1), .clk_div_valid_i(1'b1),
    .spi_clk_o(spi_clk), .spi_rise_o(edge_rise), .spi_fall_o(edge_fall), .running_o(running));

  flexspi_rx #(.CNT_W(16)) dut (
    .clk_i(clk), .rst_ni, .clr_i(1'b0), .en_i(en), .en_quad_i(quad), .counter_in_i(cnt),
    .rx_edge_i(edge_rise), .sdi_i(sdi), .data_o(dout), .data_valid_o(dvalid),
    .data_ready_i(rdy), .clk_en_o(clk_en), .done_o(done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge spi_clk) rises++;
  always @(negedge spi_clk) begin
    sp++;
    sdi = (sp < stream.size()) ? stream[sp] : 4'h0;
  end
  always @(posedge clk) if (done) dones++;
  // a transfer runs from the start pulse to its done pulse
  logic in_xfer = 0;
  always @(posedge clk) begin
    if (en) in_xfer <= 1'b1;
    else if (done) in_xfer <= 1'b0;
    if (in_xfer && !en && !done && !clk_en) stalls++;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int bits, input bit q);
    logic [31:0] exp[$], got[$];
    logic [31:0] w;
    int units, k, per;
    units = q ? bits / 4 : bits;
    per = q ? 8 : 32;
    stream.delete();
    for (int i = 0; i < units; i++) stream.push_back(q ? 4'($urandom) : {2'b00, 1'($urandom), 1'b0});
    // expected words
    w = 0; k = 0;
    foreach (stream[i]) begin
      w = q ? {w[27:0], stream[i]} : {w[30:0], stream[i][1]};
      k++;
      if (k == per || i == units - 1) begin exp.push_back(w); w = 0; k = 0; end
    end
    sp = 0; sdi = stream[0]; rises = 0; dones = 0;
    @(negedge clk); en = 1; quad = q; cnt = 16'(bits);
    @(negedge clk); en = 0;
    while (got.size() < exp.size()) begin
      rdy = ($urandom % 4) == 0;
      @(posedge clk);
      if (dvalid && rdy) got.push_back(dout);
      @(negedge clk);
    end
    rdy = 0;
    repeat (10) @(negedge clk);
    check(rises == units, $sformatf("%0d bits quad=%0d: %0d clocks, want %0d", bits, q, rises, units));
    check(dones == 1, "one done pulse");
    foreach (exp[i]) check(got[i] == exp[i], $sformatf("word %0d: %h vs %h", i, got[i], exp[i]));
    check(!spi_clk && !running, "clock stopped low");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_ni = 1;
    run(8, 0);
    run(32, 0);
    run(100, 0);
    run(8, 1);
    run(64, 1);
    run(44, 1);
    run(256, 0);
    check(stalls > 0, "clock paused by back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
