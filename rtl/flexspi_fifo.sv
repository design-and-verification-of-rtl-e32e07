// flexspi_fifo - data storage FIFO used as TX FIFO and RX FIFO.
//
// A circular buffer of DEPTH words with a write pointer, a read pointer and an
// element counter. Both sides use a valid/ready handshake: a word is written
// in a cycle where valid_i and ready_o are high, and read in a cycle where
// valid_o and ready_i are high. data_o always shows the oldest word without a
// register stage, so a word written at clock edge t is visible at data_o right
// after t. Writing and reading in the same cycle is allowed, also when full.
// clr_i empties the FIFO synchronously (software reset).
// Port names and the 32-bit width follow the controller's FIFO waveform; the
// depth of 16 follows from its 4-bit pointers and 5-bit element count.
module flexspi_fifo #(
  parameter int unsigned DATA_WIDTH = 32,
  parameter int unsigned DEPTH      = 16,
  localparam int unsigned PTR_W     = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CNT_W     = $clog2(DEPTH + 1)
) (
  input  logic                  clk_i,
  input  logic                  rst_ni,
  input  logic                  clr_i,
  output logic [CNT_W-1:0]      elements_o,
  // read side
  output logic [DATA_WIDTH-1:0] data_o,
  output logic                  valid_o,
  input  logic                  ready_i,
  // write side
  input  logic                  valid_i,
  input  logic [DATA_WIDTH-1:0] data_i,
  output logic                  ready_o
);

  logic [DATA_WIDTH-1:0] buffer [DEPTH];
  logic [PTR_W-1:0]      pointer_in, pointer_out;
  logic [CNT_W-1:0]      elements;
  logic                  full, push, pop;

  assign full       = (elements == CNT_W'(DEPTH));
  assign ready_o    = ~full | ready_i;
  assign valid_o    = (elements != '0);
  assign push       = valid_i & ready_o;
  assign pop        = valid_o & ready_i;
  assign data_o     = buffer[pointer_out];
  assign elements_o = elements;

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      pointer_in  <= '0;
      pointer_out <= '0;
      elements    <= '0;
    end else if (clr_i) begin
      pointer_in  <= '0;
      pointer_out <= '0;
      elements    <= '0;
    end else begin
      if (push) pointer_in  <= next_ptr(pointer_in);
      if (pop)  pointer_out <= next_ptr(pointer_out);
      case ({push, pop})
        2'b10:   elements <= elements + 1'b1;
        2'b01:   elements <= elements - 1'b1;
        default: ;
      endcase
    end
  end

  // storage: no reset needed, a word is only read after it was written
  always_ff @(posedge clk_i) begin
    if (push) buffer[pointer_in] <= data_i;
  end

  // a push is never lost and a pop never reads an empty buffer
  assert property (@(posedge clk_i) disable iff (!rst_ni) valid_i && !ready_o |-> full);
  assert property (@(posedge clk_i) disable iff (!rst_ni) elements <= CNT_W'(DEPTH));

endmodule
