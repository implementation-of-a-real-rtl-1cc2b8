// tb_forward_subst: solves T y = x for random x with the forward-substitution
// unit for zf from 24 to 96 and 1 to 11 block rows, and checks y and the rest
// of the memory against y_i = x_i (i < zf), y_i = y_(i-zf) xor x_i computed
// here. Also checks that y really satisfies the bidiagonal system
// (x_i = y_i xor y_(i-zf)) and the latency nwords+2.
module tb_forward_subst;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  vwaddr_t x_base = '0, y_base = '0, zwords = '0, nwords = '0;
  vrd_req_t rd_a, rd_b;
  vwr_req_t wr;
  logic [LANES-1:0] rdata_a, rdata_b;
  logic busy, done;
  logic ref_bits [VBITS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  forward_subst dut (.clk, .rst_n, .start, .x_base, .y_base, .zwords, .nwords,
                     .rd_a, .rd_b, .rdata_a, .rdata_b, .wr, .busy, .done);
  tb_vmem_model mem (.clk, .rd_a, .rd_b, .wr, .rdata_a, .rdata_b);

  task automatic run(int z, int blocks, int xb, int yb);
    int cyc, len;
    len = z * blocks;
    for (int i = 0; i < len; i++)
      ref_bits[yb * LANES + i] = (i < z) ? ref_bits[xb * LANES + i]
                               : ref_bits[yb * LANES + i - z] ^ ref_bits[xb * LANES + i];
    @(negedge clk);
    x_base = vwaddr_t'(xb); y_base = vwaddr_t'(yb);
    zwords = vwaddr_t'(z / LANES); nwords = vwaddr_t'(len / LANES); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != len / LANES + 2) begin
      failures++;
      $display("latency %0d expected %0d", cyc, len / LANES + 2);
    end
    @(negedge clk);
    checks++;
    for (int i = 0; i < int'(VBITS); i++)
      if (mem.bits[i] != ref_bits[i]) begin
        failures++;
        $display("bit %0d is %0d expected %0d (z=%0d blocks=%0d)", i, mem.bits[i], ref_bits[i], z, blocks);
        break;
      end
    checks++;
    for (int i = 0; i < len; i++)
      if ((mem.bits[yb * LANES + i] ^ (i >= z ? mem.bits[yb * LANES + i - z] : 1'b0))
          != mem.bits[xb * LANES + i]) begin
        failures++;
        $display("T y != x at row %0d", i);
        break;
      end
  endtask

  initial begin
    for (int i = 0; i < int'(VBITS); i++) begin
      ref_bits[i] = 1'($urandom);
      mem.bits[i] = ref_bits[i];
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(96, 11, 576, 864);   // rate 1/2, n = 2304
    run(24, 3, 576, 864);
    for (int n = 0; n < 20; n++) begin
      int z, b;
      z = 4 * $urandom_range(6, 24);
      b = $urandom_range(1, 11);
      run(z, b, 576, 864);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
