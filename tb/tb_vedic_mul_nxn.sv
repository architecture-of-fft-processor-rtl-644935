// tb_vedic_mul_nxn: checks the 16 x 16 Vedic multiplier (default size)
// against the integer product for corner operands and 5000 random pairs.
module tb_vedic_mul_nxn;
  localparam int unsigned N = 16;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  vedic_mul_nxn dut (.a, .b, .p);

  task automatic check(input logic [N-1:0] x, input logic [N-1:0] y);
    longint unsigned ref_p;
    a = x; b = y;
    #1;
    ref_p = longint'(x) * longint'(y);
    checks++;
    if (64'(p) != ref_p) begin
      failures++;
      $display("FAIL %0d * %0d gave %0d, expected %0d", x, y, p, ref_p);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, 16'd1);
    check(16'h8000, 16'h8000);
    check(16'h00ff, 16'hff00);
    check(16'h0f0f, 16'hf0f0);
    for (int i = 0; i < 5000; i++) check(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
