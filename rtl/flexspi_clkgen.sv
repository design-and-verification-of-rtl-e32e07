// flexspi_clkgen - clock divider management for the flash clock.
//
// A counter runs from 0 to counter_trgt (the CLKDIV value) and toggles the
// serial clock each time it wraps, so one flash clock period is
// 2*(CLKDIV+1) system clocks: FlexSPI_CLK = clk / (2*(CLKDIV+1)).
// spi_rise_o / spi_fall_o are one-cycle strobes in the system cycle whose
// clock edge makes spi_clk_o rise or fall; the shift units act on them.
// The divider runs while en_i is high. When en_i drops during the low phase
// the clock stops at once; during the high phase it finishes that phase first,
// so spi_clk_o always rests low (mode 0). running_o is high while the divider
// is active. A new divider value (clk_div_valid_i) is taken while the clock is
// stopped. The counter/target structure and the divide formula follow the
// document; the stop rule and the divider load rule are this design's choice.
module flexspi_clkgen #(
  parameter int unsigned DIV_W = 8
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             en_i,
  input  logic [DIV_W-1:0] clk_div_i,
  input  logic             clk_div_valid_i,
  output logic             spi_clk_o,
  output logic             spi_rise_o,
  output logic             spi_fall_o,
  output logic             running_o
);

  logic [DIV_W-1:0] counter_trgt, counter;
  logic             spi_clk, running, wrap;

  assign wrap       = running & (counter == counter_trgt);
  assign spi_rise_o = wrap & ~spi_clk & en_i;
  assign spi_fall_o = wrap &  spi_clk;
  assign spi_clk_o  = spi_clk;
  assign running_o  = running;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      counter_trgt <= '0;
      counter      <= '0;
      spi_clk      <= 1'b0;
      running      <= 1'b0;
    end else if (!running) begin
      counter <= '0;
      spi_clk <= 1'b0;
      running <= en_i;
      if (clk_div_valid_i) counter_trgt <= clk_div_i;
    end else if (!spi_clk && !en_i) begin
      // stop request during the low phase: stop now
      counter <= '0;
      running <= 1'b0;
    end else if (wrap) begin
      counter <= '0;
      spi_clk <= ~spi_clk;
      if (spi_clk && !en_i) running <= 1'b0;  // high phase finished, stop low
    end else begin
      counter <= counter + 1'b1;
    end
  end

  assert property (@(posedge clk_i) disable iff (!rst_ni) !running |-> !spi_clk);

endmodule
