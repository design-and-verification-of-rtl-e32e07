// tb_flexspi_tx - self-checking test of the transmit shift logic.
//
// The unit is driven by the clock divider as in the controller. For standard
// and quad mode and several lengths (full words, a partial last word, a
// single group) the testbench feeds random words with random gaps in
// data_valid, samples sdo at every rising flash clock edge and compares the
// bit stream with the words sent MSB first (a shorter last word sends its low
// bits). It also checks that the number of flash clocks equals the bit count
// (divided by four in quad mode), that done pulses once, and that a missing
// word pauses the clock (counted).
module tb_flexspi_tx;
  logic clk = 0, rst_ni = 0;
  logic en = 0, quad = 0, valid = 0, ready, edge_fall, edge_rise, clk_en, done, spi_clk, running;
  logic [15:0] cnt = 0;
  logic [31:0] data = 0;
  logic [3:0]  sdo;
  int checks = 0, failures = 0, stalls = 0;
  int rises, dones;
  logic [3:0] got[$];

  always #5 clk = ~clk;

  flexspi_clkgen #(.DIV_W(8)) u_clk (
    .clk_i(clk), .rst_ni, .en_i(clk_en), .clk_div_i(8'd2), .clk_div_valid_i(1'b1),
    .spi_clk_o(spi_clk), .spi_rise_o(edge_rise), .spi_fall_o(edge_fall), .running_o(running));

  flexspi_tx #(.CNT_W(16)) dut (
    .clk_i(clk), .rst_ni, .clr_i(1'b0), .en_i(en), .en_quad_i(quad), .counter_in_i(cnt),
    .counter_in_upd_i(1'b0), .data_i(data), .data_valid_i(valid), .data_ready_o(ready),
    .tx_edge_i(edge_fall), .sdo_o(sdo), .clk_en_o(clk_en), .done_o(done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge spi_clk) begin rises++; got.push_back(sdo); end
  always @(posedge clk) if (done) dones++;
  // a transfer runs from the start pulse to its done pulse
  logic in_xfer = 0;
  always @(posedge clk) begin
    if (en) in_xfer <= 1'b1;
    else if (done) in_xfer <= 1'b0;
    if (in_xfer && !en && !done && !clk_en) stalls++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int bits, input bit q);
    logic [31:0] words[$];
    logic [3:0]  exp[$];
    int nw, units, left;
    nw = (bits + 31) / 32;
    for (int i = 0; i < nw; i++) words.push_back($urandom);
    // expected stream
    left = bits;
    foreach (words[i]) begin
      int r;
      r = left >= 32 ? 32 : left;
      for (int b = r - 1; b >= 0; b -= (q ? 4 : 1))
        exp.push_back(q ? words[i][b -: 4] : {3'b000, words[i][b]});
      left -= r;
    end
    units = q ? bits / 4 : bits;
    got.delete(); rises = 0; dones = 0;
    @(negedge clk); en = 1; quad = q; cnt = 16'(bits);
    @(negedge clk); en = 0;
    fork
      begin : feeder
        foreach (words[i]) begin
          repeat ($urandom % 40) @(negedge clk);
          valid = 1; data = words[i];
          do @(posedge clk); while (!ready);
          @(negedge clk); valid = 0;
        end
      end
      begin
        wait (dones > 0);
      end
    join
    repeat (10) @(negedge clk);
    check(rises == units, $sformatf("%0d bits quad=%0d: %0d clocks, want %0d", bits, q, rises, units));
    check(dones == 1, "one done pulse");
    check(got.size() == exp.size(), "stream length");
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      check(got[i] == (q ? exp[i] : {3'b000, exp[i][0]}), $sformatf("unit %0d: %h vs %h", i, got[i], exp[i]));
    check(!spi_clk, "clock rests low");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_ni = 1;
    run(8, 0);
    run(32, 0);
    run(40, 0);
    run(100, 0);
    run(8, 1);
    run(32, 1);
    run(72, 1);
    run(4, 1);
    run(1, 0);
    check(stalls > 0, "clock paused for a missing word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
