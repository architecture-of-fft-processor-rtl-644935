// tb_fft_uart_top: end-to-end test of the serial FFT processor at its default
// parameters (50 MHz clock, 9600 baud). The testbench acts as the host PC:
// it sends frames of four sample bytes as 8N1 serial frames, decodes the 16
// reply bytes from the transmit line, and compares Re/Im X[0..3] with a
// direct 4-point DFT computed here. It counts how often each mechanism of the
// design happened (frames, first-stage and second-stage butterflies,
// butterflies using the non-trivial twiddle -j, a dropped byte flagged as
// overrun, a bad stop bit flagged as frame_err) and counts a failure for any
// that never happened. It also checks that each transform takes 4 butterfly
// clocks.
module tb_fft_uart_top;
  localparam int CPB = 50_000_000 / 9600;
  logic clk = 1'b0, rst_n = 1'b0, uart_rxd = 1'b1;
  logic uart_txd, busy, overrun, frame_err;
  int checks = 0, failures = 0;

  fft_uart_top dut (.clk, .rst_n, .uart_rxd, .uart_txd, .busy, .overrun, .frame_err);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (1500 * CPB) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, from the core's butterfly schedule
  int n_frames = 0, n_stage1 = 0, n_stage2 = 0, n_minus_j = 0, n_overrun = 0, n_ferr = 0;
  int bf_run = 0;
  always @(posedge clk) begin
    if (dut.u_fft.bf_en) begin
      bf_run++;
      if (dut.u_fft.u_ctrl.stage == 0) n_stage1++; else n_stage2++;
      if (dut.u_fft.tw_idx) n_minus_j++;
    end
    if (dut.u_fft.done) begin
      checks++;
      if (bf_run != 4) begin failures++; $display("FAIL transform took %0d butterfly clocks", bf_run); end
      bf_run = 0;
    end
  end

  // host receiver: decodes bytes from the transmit line
  logic [7:0] rxq [$];
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      repeat (CPB + CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        b[i] = uart_txd;
        repeat (CPB) @(posedge clk);
      end
      if (uart_txd !== 1'b1) begin failures++; $display("FAIL reply byte without stop bit"); end
      rxq.push_back(b);
    end
  end

  task automatic send_byte(input logic [7:0] b, input logic stop);
    uart_rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (CPB) @(posedge clk); end
    uart_rxd = stop; repeat (CPB) @(posedge clk);
    uart_rxd = 1; repeat (CPB) @(posedge clk);
  endtask

  task automatic frame(input logic [7:0] s [4], input bit poke);
    int er, ei, xr;
    logic [15:0] gr, gi;
    rxq.delete();
    for (int n = 0; n < 4; n++) send_byte(s[n], 1'b1);
    if (poke) begin
      // a byte sent while the reply is going out is dropped and flagged
      while (rxq.size() < 1) @(posedge clk);
      send_byte(8'h77, 1'b1);
    end
    while (rxq.size() < 16) @(posedge clk);
    repeat (4 * CPB) @(posedge clk);
    checks++;
    if (rxq.size() != 16) begin failures++; $display("FAIL %0d reply bytes", rxq.size()); end
    for (int k = 0; k < 4; k++) begin
      er = 0; ei = 0;
      for (int n = 0; n < 4; n++) begin
        xr = int'(s[n]);
        unique case ((n * k) % 4)   // x[n] * (-j)^(nk), x[n] real
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
        $display("FAIL X[%0d] = (%0d, %0d), expected (%0d, %0d)", k, $signed(gr), $signed(gi), er, ei);
      end
    end
    n_frames++;
    checks++;
    if (busy) begin failures++; $display("FAIL busy after the reply"); end
  endtask

  initial begin
    logic [7:0] s [4];
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (2 * CPB) @(posedge clk);
    checks++;
    if (busy || overrun || frame_err || uart_txd !== 1'b1) begin failures++; $display("FAIL state after reset"); end
    // sample codes 0x12, 0x08, 0x06 (1.1551, 0.5277, 0.4061 with four fraction bits)
    s = '{8'h12, 8'h08, 8'h06, 8'hff};
    frame(s, 0);
    for (int f = 0; f < 2; f++) begin
      for (int n = 0; n < 4; n++) s[n] = 8'($urandom);
      frame(s, 0);
    end
    checks++;
    if (overrun || frame_err) begin failures++; $display("FAIL flag set without cause"); end
    for (int n = 0; n < 4; n++) s[n] = 8'($urandom);
    frame(s, 1);
    checks++;
    if (overrun) n_overrun++; else begin failures++; $display("FAIL dropped byte not flagged"); end
    // bad stop bit: byte dropped, flag set, the next frame is unaffected
    send_byte(8'h3c, 1'b0);
    repeat (2 * CPB) @(posedge clk);
    checks++;
    if (frame_err) n_ferr++; else begin failures++; $display("FAIL bad stop bit not flagged"); end
    for (int n = 0; n < 4; n++) s[n] = 8'($urandom);
    frame(s, 0);

    $display("mechanisms: frames=%0d stage1_bf=%0d stage2_bf=%0d minus_j_bf=%0d overrun=%0d frame_err=%0d",
             n_frames, n_stage1, n_stage2, n_minus_j, n_overrun, n_ferr);
    checks++; if (n_frames   == 0) begin failures++; $display("FAIL no frame"); end
    checks++; if (n_stage1   == 0) begin failures++; $display("FAIL no first-stage butterfly"); end
    checks++; if (n_stage2   == 0) begin failures++; $display("FAIL no second-stage butterfly"); end
    checks++; if (n_minus_j  == 0) begin failures++; $display("FAIL no -j twiddle"); end
    checks++; if (n_overrun  == 0) begin failures++; $display("FAIL no overrun"); end
    checks++; if (n_ferr     == 0) begin failures++; $display("FAIL no frame error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
