// tb_uart_rx: sends random bytes as 8N1 frames (16 clocks per bit) and checks
// each received byte, the valid pulse, a frame with a missing stop bit
// (frame_err, no valid), and that a short low glitch starts no frame.
module tb_uart_rx;
  localparam int CPB = 16;
  logic       clk = 1'b0, rst_n = 1'b0, rxd = 1'b1;
  logic [7:0] data;
  logic       valid, frame_err;
  int checks = 0, failures = 0;
  int n_valid = 0, n_ferr = 0;
  logic [7:0] last;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rxd, .data, .valid, .frame_err);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (valid) begin n_valid++; last = data; end
    if (frame_err) n_ferr++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [7:0] b, input logic stop);
    rxd = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(negedge clk); end
    rxd = stop; repeat (CPB) @(negedge clk);
    rxd = 1; repeat (CPB) @(negedge clk);
  endtask

  initial begin
    int v0, e0;
    logic [7:0] b;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (CPB) @(negedge clk);
    for (int t = 0; t < 200; t++) begin
      b = 8'($urandom);
      v0 = n_valid;
      send(b, 1'b1);
      checks++;
      if (n_valid != v0 + 1 || last !== b) begin
        failures++; $display("FAIL byte %h received as %h (%0d pulses)", b, last, n_valid - v0);
      end
    end
    v0 = n_valid; e0 = n_ferr;
    send(8'h5a, 1'b0);
    checks++;
    if (n_valid != v0 || n_ferr != e0 + 1) begin failures++; $display("FAIL bad stop bit not flagged"); end
    // glitch shorter than half a bit
    v0 = n_valid; e0 = n_ferr;
    rxd = 0; repeat (CPB / 4) @(negedge clk); rxd = 1;
    repeat (12 * CPB) @(negedge clk);
    checks++;
    if (n_valid != v0 || n_ferr != e0) begin failures++; $display("FAIL glitch taken as a frame"); end
    send(8'hc3, 1'b1);
    checks++;
    if (last !== 8'hc3) begin failures++; $display("FAIL byte after glitch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
