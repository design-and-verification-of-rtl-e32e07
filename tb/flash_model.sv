// flash_model - behavioural model of a serial NOR flash for the testbenches.
//
// Not synthesizable logic: a testbench model of the external device. SPI mode
// 0, one 256-byte page of memory (address bits 7:0 select the byte). In
// standard mode (qpi_i = 0) command, address and data in arrive on IO0 and
// read data leaves on IO1; in quad mode (qpi_i = 1) everything moves on
// IO0..IO3, four bits per clock. Commands: 0x03 read (no dummy), 0x0B fast
// read (DUMMY_STD dummy clocks), 0xEB quad read (DUMMY_QUAD dummy clocks),
// 0x02 / 0x32 program (bytes are stored as received), 0x06 write enable
// (counted only). Address is 24 bits. Read data leaves MSB first, changing
// after each falling clock edge. Counters report what was seen.
module flash_model #(
  parameter int DUMMY_STD  = 8,
  parameter int DUMMY_QUAD = 6
) (
  input  logic       sclk_i,
  input  logic       csn_i,
  input  logic       qpi_i,
  input  logic [3:0] io_i,     // lines driven by the controller
  output logic [3:0] io_o      // lines driven by the flash
);
  logic [7:0]  mem [256];
  logic [7:0]  cmd;
  logic [23:0] addr;
  logic [7:0]  byte_sr;
  int rises, bits_per, cmd_clks, addr_clks, dummy, nbits;
  int n_read = 0, n_fast = 0, n_quad_read = 0, n_prog = 0, n_wren = 0;
  int bytes_written = 0, bytes_read = 0;

  initial begin
    foreach (mem[i]) mem[i] = 8'(i * 7 + 3);
    io_o = 4'h0;
    cmd = 8'h00; rises = 0; cmd_clks = 8;
  end

  function automatic bit is_read(input logic [7:0] c);
    return c == 8'h03 || c == 8'h0B || c == 8'hEB;
  endfunction

  always @(negedge csn_i) begin
    rises = 0; nbits = 0; cmd = 0; addr = 0; byte_sr = 0;
    bits_per  = qpi_i ? 4 : 1;
    cmd_clks  = 8 / bits_per;
    addr_clks = 24 / bits_per;
  end

  always @(posedge csn_i) begin
    io_o = 4'h0;
    if (rises >= cmd_clks) case (cmd)
      8'h03: n_read++;
      8'h0B: n_fast++;
      8'hEB: n_quad_read++;
      8'h02, 8'h32: n_prog++;
      8'h06: n_wren++;
      default: ;
    endcase
  end

  always @(posedge sclk_i) if (!csn_i) begin
    if (rises < cmd_clks) begin
      cmd = qpi_i ? {cmd[3:0], io_i} : {cmd[6:0], io_i[0]};
      if (rises == cmd_clks - 1)
        dummy = (cmd == 8'h0B) ? DUMMY_STD : (cmd == 8'hEB) ? DUMMY_QUAD : 0;
    end else if (rises < cmd_clks + addr_clks) begin
      addr = qpi_i ? {addr[19:0], io_i} : {addr[22:0], io_i[0]};
    end else if (!is_read(cmd)) begin
      byte_sr = qpi_i ? {byte_sr[3:0], io_i} : {byte_sr[6:0], io_i[0]};
      nbits += bits_per;
      if (nbits % 8 == 0) begin
        mem[addr[7:0]] = byte_sr;
        addr = addr + 1;
        bytes_written++;
      end
    end
    rises++;
  end

  always @(negedge sclk_i) if (!csn_i && is_read(cmd) && rises >= cmd_clks + addr_clks + dummy) begin
    int u, b, bit_in_byte;
    logic [7:0] d;
    u = rises - (cmd_clks + addr_clks + dummy);          // unit index of the next output
    b = (u * bits_per) / 8;
    bit_in_byte = (u * bits_per) % 8;
    d = mem[8'(addr[7:0] + b)];
    if (bit_in_byte == 0) bytes_read++;
    io_o = qpi_i ? d[7 - bit_in_byte -: 4] : {2'b00, d[7 - bit_in_byte], 1'b0};
  end
endmodule
