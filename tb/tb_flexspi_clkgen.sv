// tb_flexspi_clkgen - self-checking test of the flash clock divider.
//
// For several divider values (4 as in the document's example, 0, 1, 7, 255)
// it measures the flash clock period in system clocks and checks it against
// 2*(CLKDIV+1), checks that each rise/fall strobe is followed by the matching
// clock edge, that the clock stops low when the enable drops in either phase,
// and that the divider is only reloaded while stopped.
module tb_flexspi_clkgen;
  logic clk = 0, rst_ni = 0, en = 0, div_valid = 0;
  logic [7:0] div = 0;
  logic spi_clk, rise, fall, running;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  logic rise_q, fall_q;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  flexspi_clkgen #(.DIV_W(8)) dut (
    .clk_i(clk), .rst_ni, .en_i(en), .clk_div_i(div), .clk_div_valid_i(div_valid),
    .spi_clk_o(spi_clk), .spi_rise_o(rise), .spi_fall_o(fall), .running_o(running));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // strobe followed by the edge
  always @(posedge clk) begin
    rise_q <= rise; fall_q <= fall;
  end
  always @(negedge clk) if (rst_ni) begin
    if (rise_q) check(spi_clk == 1'b1, "clock high after rise strobe");
    if (fall_q) check(spi_clk == 1'b0, "clock low after fall strobe");
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input logic [7:0] d);
    int unsigned t0, t1, t2;
    @(negedge clk); div = d; div_valid = 1;
    @(negedge clk); div_valid = 0; en = 1;
    // two consecutive rising edges of the flash clock
    @(posedge spi_clk); t0 = cyc;
    @(posedge spi_clk); t1 = cyc;
    @(negedge spi_clk); t2 = cyc;
    check(t1 - t0 == 2 * (d + 1), $sformatf("period for div %0d: %0d", d, t1 - t0));
    check(t2 - t1 == d + 1, $sformatf("high phase for div %0d: %0d", d, t2 - t1));
    @(negedge clk); en = 0;
    repeat (2 * (d + 2)) @(negedge clk);
    check(!running && !spi_clk, "stopped low");
  endtask

  initial begin
    rise_q = 0; fall_q = 0;
    repeat (3) @(posedge clk);
    rst_ni = 1;
    measure(8'd4);   // clk / 10
    measure(8'd0);
    measure(8'd1);
    measure(8'd7);
    measure(8'd255);
    // enable dropped in the high phase: clock finishes the phase, then stops
    @(negedge clk); div = 3; div_valid = 1;
    @(negedge clk); div_valid = 0; en = 1;
    @(posedge spi_clk); @(negedge clk); en = 0;
    check(running && spi_clk, "high phase continues");
    repeat (6) @(negedge clk);
    check(!running && !spi_clk, "stopped after finishing high phase");
    // divider change while running is not taken
    @(negedge clk); en = 1;
    repeat (3) @(negedge clk);
    div = 9; div_valid = 1; @(negedge clk); div_valid = 0;
    begin
      int unsigned a, b;
      @(posedge spi_clk); a = cyc; @(posedge spi_clk); b = cyc;
      check(b - a == 8, "divider kept while running");
    end
    @(negedge clk); en = 0;
    repeat (12) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
