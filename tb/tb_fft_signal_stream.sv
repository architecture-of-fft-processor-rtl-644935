// tb_fft_signal_stream: streams two sensor-like signals through the serial
// FFT processor at its default parameters, four samples per frame, and checks
// every frame's 4-point transform against a direct DFT computed here.
// The first signal has 96 samples (one slow sine period with noise, peak about
// 2.2), the second 300 samples (a baseline near 0.5 with one sharp pulse).
// Samples are coded as unsigned bytes with four fraction bits (code =
// floor(value * 16)). The host waits for each 16-byte reply before sending
// the next frame.
module tb_fft_signal_stream;
  localparam int CPB = 50_000_000 / 9600;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst_n = 1'b0, uart_rxd = 1'b1;
  logic uart_txd, busy, overrun, frame_err;
  int checks = 0, failures = 0, frames = 0;

  fft_uart_top dut (.clk, .rst_n, .uart_rxd, .uart_txd, .busy, .overrun, .frame_err);

  always #10 clk = ~clk;

  initial begin
    repeat (100 * 220 * CPB) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d frames", frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] rxq [$];
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      repeat (CPB + CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin b[i] = uart_txd; repeat (CPB) @(posedge clk); end
      rxq.push_back(b);
    end
  end

  task automatic send_byte(input logic [7:0] b);
    uart_rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (CPB) @(posedge clk); end
    uart_rxd = 1; repeat (2 * CPB) @(posedge clk);
  endtask

  task automatic frame(input logic [7:0] s [4]);
    int er, ei, xr;
    logic [15:0] gr, gi;
    rxq.delete();
    for (int n = 0; n < 4; n++) send_byte(s[n]);
    while (rxq.size() < 16) @(posedge clk);
    repeat (CPB) @(posedge clk);
    for (int k = 0; k < 4; k++) begin
      er = 0; ei = 0;
      for (int n = 0; n < 4; n++) begin
        xr = int'(s[n]);
        unique case ((n * k) % 4)
          0: er += xr;
          1: ei -= xr;
          2: er -= xr;
          3: ei += xr;
        endcase
      end
      gr = {rxq[4*k+1], rxq[4*k]};
      gi = {rxq[4*k+3], rxq[4*k+2]};
      checks++;
      if ($signed(gr) != er || $signed(gi) != ei) begin
        failures++;
        $display("FAIL frame %0d X[%0d] = (%0d, %0d), expected (%0d, %0d)", frames, k,
                 $signed(gr), $signed(gi), er, ei);
      end
    end
    frames++;
  endtask

  function automatic logic [7:0] code(input real v);
    int c;
    c = int'($floor(v * 16.0));
    if (c < 0) c = 0;
    if (c > 255) c = 255;
    return 8'(c);
  endfunction

  initial begin
    logic [7:0] s [4];
    real v, noise;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (2 * CPB) @(posedge clk);
    // 96-sample signal: 1.1 + 1.0 * sin(2 pi (n - 4) / 96) plus noise
    for (int f = 0; f < 96 / 4; f++) begin
      for (int n = 0; n < 4; n++) begin
        noise = (real'($urandom_range(100)) - 50.0) / 500.0;
        v = 1.1 + 1.0 * $sin(2.0 * PI * real'(4 * f + n - 4) / 96.0) + noise;
        s[n] = code(v);
      end
      frame(s);
    end
    // 300-sample signal: baseline with a sharp pulse near sample 105
    for (int f = 0; f < 300 / 4; f++) begin
      for (int n = 0; n < 4; n++) begin
        v = real'(4 * f + n);
        noise = (real'($urandom_range(100)) - 50.0) / 1000.0;
        v = 0.5 - 0.1 * $sin(2.0 * PI * v / 300.0) + 0.5 * $exp(-((v - 105.0) ** 2) / 50.0) + noise;
        s[n] = code(v);
      end
      frame(s);
    end
    checks++;
    if (frames != 24 + 75) begin failures++; $display("FAIL %0d frames", frames); end
    checks++;
    if (overrun || frame_err) begin failures++; $display("FAIL error flag set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
