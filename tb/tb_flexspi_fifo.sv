// tb_flexspi_fifo - self-checking test of the data storage FIFO.
//
// Writes the word 0xFFFFF01A into an empty FIFO and checks that it appears at
// data_o with elements_o = 1 one clock later (no read latency). Then runs
// random pushes and pops against a queue model, checking data order, the
// element count, the full flag (ready_o) and simultaneous push/pop when full,
// and finally the synchronous clear.
module tb_flexspi_fifo;
  localparam int DEPTH = 16;
  logic        clk = 0, rst_ni = 0, clr = 0;
  logic [4:0]  elements;
  logic [31:0] data_o, data_i;
  logic        valid_o, ready_i, valid_i, ready_o;
  int checks = 0, failures = 0, full_seen = 0;
  logic [31:0] model[$];

  always #5 clk = ~clk;

  flexspi_fifo #(.DATA_WIDTH(32), .DEPTH(DEPTH)) dut (
    .clk_i(clk), .rst_ni, .clr_i(clr), .elements_o(elements),
    .data_o, .valid_o, .ready_i, .valid_i, .data_i, .ready_o);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid_i = 0; ready_i = 0; data_i = 0;
    repeat (3) @(posedge clk);
    rst_ni = 1;
    @(negedge clk);
    check(elements == 0 && !valid_o && ready_o, "empty after reset");
    // one word, visible at once
    valid_i = 1; data_i = 32'hffff_f01a;
    @(negedge clk);
    valid_i = 0;
    check(elements == 1 && valid_o && data_o == 32'hffff_f01a, "single word at head");
    ready_i = 1;
    @(negedge clk);
    ready_i = 0;
    check(elements == 0 && !valid_o, "empty after pop");
    // random traffic
    for (int i = 0; i < 4000; i++) begin
      bit p, q;
      p = ($urandom % 100) < ((i / 500) % 2 ? 70 : 35);
      q = ($urandom % 100) < ((i / 500) % 2 ? 35 : 70);
      valid_i = p; ready_i = q; data_i = $urandom;
      #1;
      check(ready_o == (model.size() < DEPTH || q), "ready_o");
      check(valid_o == (model.size() > 0), "valid_o");
      if (valid_o && ready_i) begin
        check(data_o == model[0], $sformatf("data order %h vs %h", data_o, model[0]));
      end
      if (model.size() == DEPTH) full_seen++;
      @(negedge clk);
      if (q && model.size() > 0) void'(model.pop_front());
      if (p && (model.size() < DEPTH || q)) model.push_back(data_i);
      check(elements == model.size(), $sformatf("elements %0d vs %0d", elements, model.size()));
    end
    valid_i = 0; ready_i = 0;
    check(full_seen > 0, "FIFO reached full");
    // clear
    clr = 1; @(negedge clk); clr = 0;
    check(elements == 0 && !valid_o, "clear empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
