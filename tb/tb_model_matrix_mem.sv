// tb_model_matrix_mem: writes random shift values to random addresses of the
// model-matrix store, checks the reset value (-1, zero block) and that every
// registered read returns the last value written, against a shadow array.
module tb_model_matrix_mem;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic we = 0, re = 0;
  logic [MM_AW-1:0] waddr = '0, raddr = '0;
  model_t wdata = '0, rdata;
  model_t shadow [MM_DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  model_matrix_mem dut (.clk, .rst_n, .we, .waddr, .wdata, .re, .raddr, .rdata);

  task automatic check_read(int a);
    @(negedge clk); re = 1; raddr = MM_AW'(a);
    @(negedge clk); re = 0;
    checks++;
    if (rdata != shadow[a]) begin
      failures++;
      $display("addr %0d read %0d expected %0d", a, rdata, shadow[a]);
    end
  endtask

  initial begin
    foreach (shadow[a]) shadow[a] = -8'sd1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < int'(MM_DEPTH); a += 7) check_read(a);
    for (int n = 0; n < 600; n++) begin
      int a;
      a = $urandom_range(MM_DEPTH - 1);
      @(negedge clk);
      we = 1; waddr = MM_AW'(a);
      wdata = ($urandom_range(3) == 0) ? -8'sd1 : model_t'($urandom_range(95));
      shadow[a] = wdata;
      @(negedge clk); we = 0;
      if (n % 3 == 0) check_read($urandom_range(MM_DEPTH - 1));
    end
    for (int a = 0; a < int'(MM_DEPTH); a++) check_read(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
