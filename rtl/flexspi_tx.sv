// flexspi_tx - transmit shift logic (parallel to serial).
//
// A start pulse on en_i takes the number of bits to send from counter_in_i.
// The counter unit counts shifts, not bits: in quad mode (en_quad_i) four bits
// leave per flash clock, so the target is counter_in_i[15:2], otherwise it is
// counter_in_i. The control unit latches a 32-bit word from data_i into the
// data latch/shift register when data_valid_i is high (data_ready_o marks the
// cycle the word is taken), then every tx_edge_i strobe (falling flash clock
// edge) moves the register by 1 or 4 bits, MSB first. After 32 bits a new word
// is fetched. The first bit is on sdo_o before the first rising edge.
// A last word shorter than 32 bits sends its low bits: it is shifted up when
// latched. While a word is missing clk_en_o is low, so the flash clock pauses
// low until data_valid_i comes. done_o pulses for one cycle after the falling
// edge that ends the last bit. counter_in_upd_i reloads the target during a
// transfer. Standard mode drives IO0 only (sdo_o[0]).
// The block structure (control unit, counter unit with the quad divide, data
// latch, shift logic) follows the document; fetch, alignment and stall rules
// are this design's choice.
module flexspi_tx #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             clr_i,
  input  logic             en_i,
  input  logic             en_quad_i,
  input  logic [CNT_W-1:0] counter_in_i,
  input  logic             counter_in_upd_i,
  input  logic [31:0]      data_i,
  input  logic             data_valid_i,
  output logic             data_ready_o,
  input  logic             tx_edge_i,
  output logic [3:0]       sdo_o,
  output logic             clk_en_o,
  output logic             done_o
);

  logic [CNT_W-1:0] counter_trgt, counter_trgt_next, counter;
  logic [5:0]       pos;          // shifts done inside the current word
  logic [31:0]      sr;           // data latch / shift register
  logic             active, wait_data, quad, load, shift;
  logic [CNT_W-1:0] rem;          // shifts still to do
  logic [CNT_W+1:0] rem_bits;
  logic [31:0]      aligned;
  logic [5:0]       per_word;

  // counter unit input multiplexer: quad mode counts groups of four bits
  assign counter_trgt_next = en_quad_i ? {2'b00, counter_in_i[CNT_W-1:2]} : counter_in_i;

  assign per_word = quad ? 6'd8 : 6'd32;
  assign rem      = counter_trgt - counter;
  assign rem_bits = quad ? {rem, 2'b00} : {2'b00, rem};

  always_comb begin
    if (rem_bits >= (CNT_W+2)'(32)) aligned = data_i;
    else                              aligned = data_i << (6'd32 - 6'(rem_bits));
  end

  assign load         = active & wait_data & data_valid_i;
  assign data_ready_o = load;
  assign shift        = active & ~wait_data & tx_edge_i;
  assign clk_en_o     = active & ~wait_data;
  assign sdo_o        = quad ? sr[31:28] : {3'b000, sr[31]};

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      counter_trgt <= '0;
      counter      <= '0;
      pos          <= '0;
      sr           <= '0;
      active       <= 1'b0;
      wait_data    <= 1'b0;
      quad         <= 1'b0;
      done_o       <= 1'b0;
    end else if (clr_i) begin
      counter      <= '0;
      pos          <= '0;
      sr           <= '0;
      active       <= 1'b0;
      wait_data    <= 1'b0;
      done_o       <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (en_i) begin
        counter_trgt <= counter_trgt_next;
        counter      <= '0;
        pos          <= '0;
        quad         <= en_quad_i;
        active       <= (counter_trgt_next != '0);
        wait_data    <= (counter_trgt_next != '0);
        done_o       <= (counter_trgt_next == '0);
      end else begin
        if (counter_in_upd_i && active) counter_trgt <= counter_trgt_next;
        if (load) begin
          sr        <= aligned;
          pos       <= '0;
          wait_data <= 1'b0;
        end
        if (shift) begin
          counter <= counter + 1'b1;
          if (counter + 1'b1 == counter_trgt) begin
            active <= 1'b0;
            done_o <= 1'b1;
          end else if (pos + 1'b1 == per_word) begin
            wait_data <= 1'b1;
          end else begin
            pos <= pos + 1'b1;
            sr  <= quad ? {sr[27:0], 4'b0000} : {sr[30:0], 1'b0};
          end
        end
      end
    end
  end

  // the flash clock is held while a word is missing, so no edge can arrive then
  assert property (@(posedge clk_i) disable iff (!rst_ni) active && wait_data |-> !tx_edge_i);

endmodule
