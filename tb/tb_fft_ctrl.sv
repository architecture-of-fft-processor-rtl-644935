// tb_fft_ctrl: checks the butterfly schedule of the 4-point controller:
// exactly (N/2) log2 N = 4 butterfly cycles per start, the in-place DIT
// address pairs (0,1) (2,3) (0,2) (1,3) with twiddle exponents 0 0 0 1, the
// done pulse right after the last butterfly, busy, and that a start while
// busy is ignored.
module tb_fft_ctrl;
  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic       busy, done, bf_en;
  logic [1:0] addr_a, addr_b;
  logic       tw_idx;
  int checks = 0, failures = 0;

  fft_ctrl #(.N(4)) dut (.clk, .rst_n, .start, .busy, .done, .bf_en, .addr_a, .addr_b, .tw_idx);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int EXP_A [4] = '{0, 2, 0, 1};
  localparam int EXP_B [4] = '{1, 3, 2, 3};
  localparam int EXP_W [4] = '{0, 0, 0, 1};

  task automatic run_one(input bit poke_start);
    int n;
    @(negedge clk); start = 1;
    @(negedge clk); start = poke_start;   // extra start while busy must be ignored
    n = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL busy not set after start"); end
    while (bf_en) begin
      checks++;
      if (n >= 4 || 32'(addr_a) != EXP_A[n] || 32'(addr_b) != EXP_B[n] || 32'(tw_idx) != EXP_W[n]) begin
        failures++;
        $display("FAIL butterfly %0d: a=%0d b=%0d w=%0d", n, addr_a, addr_b, tw_idx);
      end
      n++;
      @(negedge clk); start = 0;
    end
    checks++;
    if (n != 4) begin failures++; $display("FAIL %0d butterfly cycles, expected 4", n); end
    checks++;
    if (!done) begin failures++; $display("FAIL done not right after last butterfly"); end
    @(negedge clk);
    checks++;
    if (done || busy || bf_en) begin failures++; $display("FAIL not idle after done"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (busy || done || bf_en) begin failures++; $display("FAIL not idle after reset"); end
    run_one(0);
    run_one(1);
    repeat (3) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL restarted by a start while busy"); end
    run_one(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
