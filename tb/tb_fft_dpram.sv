// tb_fft_dpram: checks both ports of the dual-port data memory: writes
// through either port, asynchronous read on both, read of the old word in
// the cycle of a write, two writes in one cycle, and the port-B-wins rule.
module tb_fft_dpram;
  import fft_pkg::*;
  logic              clk = 1'b0;
  logic [ADDR_W-1:0] a_addr, b_addr;
  logic              a_we, b_we;
  cplx_t             a_wdata, b_wdata, a_rdata, b_rdata;
  cplx_t             model [4];
  int checks = 0, failures = 0;

  fft_dpram dut (.clk, .a_addr, .a_we, .a_wdata, .a_rdata, .b_addr, .b_we, .b_wdata, .b_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cplx_t rnd();
    return '{re: data_t'($urandom), im: data_t'($urandom)};
  endfunction

  task automatic check_reads();
    checks++;
    if (a_rdata !== model[a_addr] || b_rdata !== model[b_addr]) begin
      failures++;
      $display("FAIL read a[%0d]=%h b[%0d]=%h", a_addr, a_rdata, b_addr, b_rdata);
    end
  endtask

  initial begin
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = '0; b_wdata = '0;
    // fill through port A
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      a_addr = ADDR_W'(i); a_we = 1; a_wdata = rnd();
      @(posedge clk); model[i] = a_wdata;
    end
    @(negedge clk); a_we = 0;
    for (int i = 0; i < 4; i++) begin
      a_addr = ADDR_W'(i); b_addr = ADDR_W'(3 - i); #1; check_reads();
    end
    // random traffic, both ports
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      a_addr = ADDR_W'($urandom); b_addr = ADDR_W'($urandom);
      a_we = 1'($urandom); b_we = 1'($urandom);
      a_wdata = rnd(); b_wdata = rnd();
      #1; check_reads();   // old contents before the edge
      @(posedge clk);
      if (a_we) model[a_addr] = a_wdata;
      if (b_we) model[b_addr] = b_wdata;
      #1; check_reads();   // new contents after the edge
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
