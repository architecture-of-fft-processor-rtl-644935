// tb_twiddle_rom: checks the two twiddle factors of the 4-point FFT,
// W^0 = 1 and W^1 = -j, with six fraction bits.
module tb_twiddle_rom;
  import fft_pkg::*;
  logic     idx;
  twiddle_t w;
  int checks = 0, failures = 0;

  twiddle_rom dut (.idx, .w);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idx = 1'b0; #1;
    checks++; if (w.re !== 8'sd64 || w.im !== 8'sd0) begin failures++; $display("FAIL W0"); end
    idx = 1'b1; #1;
    checks++; if (w.re !== 8'sd0 || w.im !== -8'sd64) begin failures++; $display("FAIL W1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
