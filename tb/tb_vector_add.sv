// tb_vector_add: runs the four-lane modulo-2 vector adder on random vectors of
// random length and placement (separate, in place, clear) and compares every
// bit of the memory with a reference computed here, so writes outside the
// destination are caught too. Checks start-to-done latency nwords+2.
module tb_vector_add;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, op_clear = 0;
  vwaddr_t a_base = '0, b_base = '0, d_base = '0, nwords = '0;
  vrd_req_t rd_a, rd_b;
  vwr_req_t wr;
  logic [LANES-1:0] rdata_a, rdata_b;
  logic busy, done;
  logic ref_bits [VBITS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vector_add dut (.clk, .rst_n, .start, .op_clear, .a_base, .b_base, .d_base, .nwords,
                  .rd_a, .rd_b, .rdata_a, .rdata_b, .wr, .busy, .done);
  tb_vmem_model mem (.clk, .rd_a, .rd_b, .wr, .rdata_a, .rdata_b);

  task automatic run(int a, int b, int d, int n, bit clr);
    int cyc;
    logic tmp [VBITS];
    for (int i = 0; i < int'(VBITS); i++) tmp[i] = ref_bits[i];
    for (int w = 0; w < n; w++)
      for (int l = 0; l < int'(LANES); l++)
        tmp[(d + w) * LANES + l] = clr ? 1'b0 :
          ref_bits[(a + w) * LANES + l] ^ ref_bits[(b + w) * LANES + l];
    ref_bits = tmp;
    @(negedge clk);
    a_base = vwaddr_t'(a); b_base = vwaddr_t'(b); d_base = vwaddr_t'(d);
    nwords = vwaddr_t'(n); op_clear = clr; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != n + 2) begin
      failures++;
      $display("latency %0d expected %0d", cyc, n + 2);
    end
    @(negedge clk);
    checks++;
    for (int i = 0; i < int'(VBITS); i++)
      if (mem.bits[i] != ref_bits[i]) begin
        failures++;
        $display("bit %0d is %0d expected %0d (a=%0d b=%0d d=%0d n=%0d clr=%0d)",
                 i, mem.bits[i], ref_bits[i], a, b, d, n, clr);
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
    // operand and destination regions of a zf = 96 block
    run(0, 300, 600, 24, 0);
    // in place, as used for A s + B p1
    run(864, 576, 864, 264, 0);
    // clearing a vector
    run(0, 0, 100, 57, 1);
    for (int n = 0; n < 30; n++) begin
      int len;
      len = $urandom_range(1, 200);
      run($urandom_range(400), $urandom_range(400),
          $urandom_range(600, 950), len, ($urandom_range(5) == 0));
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
