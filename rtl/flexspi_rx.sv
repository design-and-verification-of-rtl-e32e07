// flexspi_rx - receive shift logic (serial to parallel).
//
// A start pulse on en_i takes the number of bits to receive from counter_in_i;
// as on the transmit side the counter counts shifts, counter_in_i[15:2] of
// them in quad mode. Every rx_edge_i strobe (rising flash clock edge) shifts
// in sdi_i[3:0] (quad mode) or sdi_i[1] (standard mode, IO1 carries the
// flash output) at the LSB end. Each 32 received bits, and the last, shorter
// word of a transfer (right aligned, upper bits zero), are latched into data_o
// with data_valid_o, held until data_ready_i. While a word waits, clk_en_o is
// low so the flash clock pauses instead of overrunning it. done_o pulses for
// one cycle after the rising edge of the last bit; the word it ends may still
// be waiting in data_o.
// Mirror of the transmit shift logic; the sampling edge, alignment and stall
// rules are this design's choice.
module flexspi_rx #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             clr_i,
  input  logic             en_i,
  input  logic             en_quad_i,
  input  logic [CNT_W-1:0] counter_in_i,
  input  logic             rx_edge_i,
  input  logic [3:0]       sdi_i,
  output logic [31:0]      data_o,
  output logic             data_valid_o,
  input  logic             data_ready_i,
  output logic             clk_en_o,
  output logic             done_o
);

  logic [CNT_W-1:0] counter_trgt, counter_trgt_next, counter;
  logic [5:0]       pos, per_word;
  logic [31:0]      sr, sr_next;
  logic             active, quad, sample, stall;

  assign counter_trgt_next = en_quad_i ? {2'b00, counter_in_i[CNT_W-1:2]} : counter_in_i;
  assign per_word = quad ? 6'd8 : 6'd32;
  assign sr_next  = quad ? {sr[27:0], sdi_i} : {sr[30:0], sdi_i[1]};
  assign stall    = data_valid_o & ~data_ready_i;
  assign clk_en_o = active & ~stall;
  assign sample   = active & rx_edge_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      counter_trgt <= '0;
      counter      <= '0;
      pos          <= '0;
      sr           <= '0;
      data_o       <= '0;
      data_valid_o <= 1'b0;
      active       <= 1'b0;
      quad         <= 1'b0;
      done_o       <= 1'b0;
    end else if (clr_i) begin
      counter      <= '0;
      pos          <= '0;
      sr           <= '0;
      data_valid_o <= 1'b0;
      active       <= 1'b0;
      done_o       <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (data_valid_o && data_ready_i) data_valid_o <= 1'b0;
      if (en_i) begin
        counter_trgt <= counter_trgt_next;
        counter      <= '0;
        pos          <= '0;
        sr           <= '0;
        quad         <= en_quad_i;
        active       <= (counter_trgt_next != '0);
        done_o       <= (counter_trgt_next == '0);
      end else if (sample) begin
        counter <= counter + 1'b1;
        if (counter + 1'b1 == counter_trgt || pos + 1'b1 == per_word) begin
          data_o       <= sr_next;
          data_valid_o <= 1'b1;
          sr           <= '0;
          pos          <= '0;
        end else begin
          sr  <= sr_next;
          pos <= pos + 1'b1;
        end
        if (counter + 1'b1 == counter_trgt) begin
          active <= 1'b0;
          done_o <= 1'b1;
        end
      end
    end
  end

  // a word is never overwritten before the FIFO took it
  assert property (@(posedge clk_i) disable iff (!rst_ni) sample |-> !stall);

endmodule
