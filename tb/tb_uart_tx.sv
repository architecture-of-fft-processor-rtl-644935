// tb_uart_tx: sends random bytes and decodes the line in the testbench,
// checking the start bit, 8 data bits LSB first, the stop bit, the bit time
// (16 clocks) and that busy lasts exactly 10 bit times.
module tb_uart_tx;
  localparam int CPB = 16;
  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] data = '0;
  logic       txd, busy;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .data, .start, .txd, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b, got;
    int busy_cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (txd !== 1'b1 || busy) begin failures++; $display("FAIL line not idle after reset"); end
    for (int t = 0; t < 100; t++) begin
      b = 8'($urandom);
      @(negedge clk); data = b; start = 1;
      @(negedge clk); start = 0; data = ~b;   // data may change once sent
      // now half a clock after the edge that took start: start bit is on
      busy_cyc = 1;
      // sample in the middle of each bit
      repeat (CPB / 2 - 1) begin @(negedge clk); busy_cyc += busy; end
      checks++;
      if (txd !== 1'b0) begin failures++; $display("FAIL no start bit"); end
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) begin @(negedge clk); busy_cyc += busy; end
        got[i] = txd;
      end
      repeat (CPB) begin @(negedge clk); busy_cyc += busy; end
      checks++;
      if (txd !== 1'b1) begin failures++; $display("FAIL no stop bit"); end
      checks++;
      if (got !== b) begin failures++; $display("FAIL sent %h, line carried %h", b, got); end
      while (busy) begin @(negedge clk); busy_cyc += busy; end
      checks++;
      if (busy_cyc != 10 * CPB) begin failures++; $display("FAIL busy for %0d clocks, expected %0d", busy_cyc, 10 * CPB); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
