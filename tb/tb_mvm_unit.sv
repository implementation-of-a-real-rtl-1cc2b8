// tb_mvm_unit: random sparse GF(2) matrices (0 to 5 ones per row, rows of no
// one coded as a null entry) are written as index lists and multiplied with a
// random source vector. Every bit of the memory is compared with the product
// computed here, which also catches writes to wrong bits of a word. Checks the
// row count and the latency nentries+3.
module tb_mvm_unit;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  iaddr_t  idx_base = '0;
  icount_t nentries = '0;
  vbaddr_t src_base = '0, dst_base = '0, rows_done;
  ird_req_t ird;
  idx_entry_t irdata;
  vrd_req_t rd, rd_b_unused;
  vwr_req_t wr;
  logic [LANES-1:0] rdata, rdata_b_unused;
  logic busy, done;
  logic ref_bits [VBITS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign rd_b_unused = '0;

  mvm_unit dut (.clk, .rst_n, .start, .idx_base, .nentries, .src_base, .dst_base,
                .ird, .irdata, .rd, .rdata, .wr, .busy, .done, .rows_done);
  tb_vmem_model mem (.clk, .rd_a(rd), .rd_b(rd_b_unused), .wr, .rdata_a(rdata), .rdata_b(rdata_b_unused));
  tb_imem_model imem (.clk, .rd(ird), .rdata(irdata));

  task automatic run(int rows, int cols, int src, int dst, int ibase, int maxw);
    int cyc, ne;
    ne = ibase;
    for (int r = 0; r < rows; r++) begin
      int w;
      logic acc;
      w = $urandom_range(0, maxw);
      acc = 0;
      if (w == 0) begin
        imem.mem[ne] = '{last: 1'b1, nul: 1'b1, col: '0};
        ne++;
      end
      for (int e = 0; e < w; e++) begin
        int c;
        c = $urandom_range(cols - 1);
        acc ^= ref_bits[src + c];
        imem.mem[ne] = '{last: (e == w - 1), nul: 1'b0, col: COL_W'(c)};
        ne++;
      end
      ref_bits[dst + r] = acc;
    end
    ne -= ibase;
    @(negedge clk);
    idx_base = iaddr_t'(ibase); nentries = icount_t'(ne);
    src_base = vbaddr_t'(src); dst_base = vbaddr_t'(dst); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != ne + 3) begin
      failures++;
      $display("latency %0d expected %0d", cyc, ne + 3);
    end
    checks++;
    if (int'(rows_done) != rows) begin
      failures++;
      $display("rows %0d expected %0d", rows_done, rows);
    end
    @(negedge clk);
    checks++;
    for (int i = 0; i < int'(VBITS); i++)
      if (mem.bits[i] != ref_bits[i]) begin
        failures++;
        $display("bit %0d is %0d expected %0d", i, mem.bits[i], ref_bits[i]);
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
    run(1152, 1152, 0, 2304, 0, 5);     // info part of a rate-1/2 frame
    run(1056, 96, 1152, 3456, 5000, 1); // B p1: one or no one per row
    for (int n = 0; n < 15; n++)
      run($urandom_range(1, 300), $urandom_range(1, 1000), $urandom_range(0, 1000),
          $urandom_range(2304, 4000), $urandom_range(0, 4000), 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
