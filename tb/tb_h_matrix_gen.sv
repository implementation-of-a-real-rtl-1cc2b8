// tb_h_matrix_gen: generates the sparse-H index lists for random model
// matrices with the IEEE 802.16e structure at the four block-row counts
// (mb = 12, 8, 6, 4: rates 1/2, 2/3, 3/4, 5/6), several zf and both scaling
// modes, and compares the written index memory entry by entry with lists built
// here from the definition of the circulant expansion. Model rows whose final
// info block is zero exercise the row-end rewrite; rows of B without a one
// exercise null entries. A second instance with a tiny index memory must
// raise overflow. Also checks list lengths and the run time.
module tb_h_matrix_gen;
  import ldpc_pkg::*;
  localparam int unsigned SMALL = 100;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  zf_t zf = zf_t'(96);
  mb_t mb = mb_t'(12);
  kb_t kb = kb_t'(12);
  scale_mode_e mode = SCALE_FLOOR;
  logic mm_re, mm_re2;
  logic [MM_AW-1:0] mm_raddr, mm_raddr2;
  model_t mm_rdata, mm_rdata2;
  iwr_req_t iwr, iwr2;
  logic busy, done, overflow, busy2, done2, overflow2;
  icount_t info_len, b_len, info_len2, b_len2;
  iaddr_t b_base, b_base2;

  model_t     model [MM_DEPTH];
  idx_entry_t got   [IDX_DEPTH];
  idx_entry_t exp_q [$];
  int checks = 0, failures = 0;
  int n_fixup = 0, n_null = 0;

  always #5 clk = ~clk;

  h_matrix_gen dut (.clk, .rst_n, .start, .zf, .mb, .kb, .mode,
                    .mm_re, .mm_raddr, .mm_rdata, .iwr, .busy, .done,
                    .info_len, .b_base, .b_len, .overflow);
  h_matrix_gen #(.DEPTH(SMALL)) dut_small (.clk, .rst_n, .start, .zf, .mb, .kb, .mode,
                    .mm_re(mm_re2), .mm_raddr(mm_raddr2), .mm_rdata(mm_rdata2), .iwr(iwr2),
                    .busy(busy2), .done(done2), .info_len(info_len2), .b_base(b_base2),
                    .b_len(b_len2), .overflow(overflow2));

  always @(posedge clk) begin
    if (mm_re)  mm_rdata  <= model[mm_raddr];
    if (mm_re2) mm_rdata2 <= model[mm_raddr2];
    if (iwr.en) got[iwr.addr] <= iwr.data;
  end

  function automatic int scale(int p, int z, bit m);
    return m ? p % z : (p * z) / 96;
  endfunction

  // 802.16e-like model matrix: random info part, first parity column with
  // equal shifts in rows 0 and mb-1 and shift 0 in one row between, and the
  // dual diagonal.
  task automatic make_model(int nmb, int density);
    int x, h;
    int nkb;
    nkb = NB - nmb;
    foreach (model[a]) model[a] = -8'sd1;
    for (int i = 0; i < nmb; i++)
      for (int j = 0; j < nkb; j++)
        if ($urandom_range(99) < density) model[i * NB + j] = model_t'($urandom_range(95));
    x = $urandom_range(1, nmb - 2);
    h = $urandom_range(1, 95);
    model[0 * NB + nkb]         = model_t'(h);
    model[x * NB + nkb]         = 8'sd0;
    model[(nmb - 1) * NB + nkb] = model_t'(h);
    for (int j = 0; j < nmb - 1; j++) begin
      model[j * NB + nkb + 1 + j]       = 8'sd0;
      model[(j + 1) * NB + nkb + 1 + j] = 8'sd0;
    end
  endtask

  task automatic build_ref(int z, int nmb, bit m, output int ilen, output int blen);
    int nkb;
    nkb = NB - nmb;
    exp_q.delete();
    for (int i = 0; i < nmb; i++) begin
      if (model[i * NB + nkb - 1] < 0) n_fixup++;
      for (int r = 0; r < z; r++) begin
        int first, lastj;
        lastj = -1;
        for (int j = 0; j < nkb; j++) if (model[i * NB + j] >= 0) lastj = j;
        if (lastj < 0) exp_q.push_back('{last: 1'b1, nul: 1'b1, col: '0});
        for (int j = 0; j <= lastj; j++)
          if (model[i * NB + j] >= 0)
            exp_q.push_back('{last: (j == lastj), nul: 1'b0,
                              col: COL_W'(j * z + (r + scale(int'(model[i * NB + j]), z, m)) % z)});
      end
    end
    ilen = exp_q.size();
    for (int i = 0; i < nmb - 1; i++)
      for (int r = 0; r < z; r++)
        if (model[i * NB + nkb] >= 0)
          exp_q.push_back('{last: 1'b1, nul: 1'b0,
                            col: COL_W'((r + scale(int'(model[i * NB + nkb]), z, m)) % z)});
        else begin
          exp_q.push_back('{last: 1'b1, nul: 1'b1, col: '0});
          n_null++;
        end
    blen = exp_q.size() - ilen;
  endtask

  task automatic run(int z, int nmb, bit m, int density);
    int ilen, blen, cyc, exp_cyc;
    // draw again until the lists fit the index memory
    do begin
      make_model(nmb, density);
      build_ref(z, nmb, m, ilen, blen);
    end while (ilen + blen > int'(IDX_DEPTH));
    @(negedge clk);
    zf = zf_t'(z); mb = mb_t'(nmb); kb = kb_t'(NB - nmb); mode = scale_mode_e'(m);
    start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    exp_cyc = nmb * z * (NB - nmb) + (nmb - 1) * z + 2;
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("run time %0d expected %0d", cyc, exp_cyc);
    end
    checks++;
    if (int'(info_len) != ilen || int'(b_len) != blen || int'(b_base) != ilen || overflow) begin
      failures++;
      $display("lengths info %0d/%0d b %0d/%0d base %0d overflow %0d",
               info_len, ilen, b_len, blen, b_base, overflow);
    end
    checks++;
    for (int e = 0; e < exp_q.size(); e++)
      if (got[e] != exp_q[e]) begin
        failures++;
        $display("entry %0d: %p expected %p (z=%0d mb=%0d mode=%0d)", e, got[e], exp_q[e], z, nmb, m);
        break;
      end
    // the small instance overflows on any of these codes
    while (busy2) @(negedge clk);
    checks++;
    if (!overflow2) begin
      failures++;
      $display("overflow not raised");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(96, 12, 0, 40);
    run(96, 6, 0, 70);
    run(24, 8, 1, 60);
    run(52, 4, 0, 90);
    for (int n = 0; n < 6; n++) begin
      int z, nmb, dmax;
      z    = 4 * $urandom_range(6, 24);
      nmb  = 4 + 2 * $urandom_range(0, 4);
      dmax = 700000 / (nmb * (NB - nmb) * z);   // keep the list inside 8192 entries
      run(z, nmb, 1'($urandom), $urandom_range(10, dmax > 90 ? 90 : dmax));
    end
    checks++;
    if (n_fixup == 0 || n_null == 0) begin
      failures++;
      $display("row-end rewrite %0d or null entries %0d never exercised", n_fixup, n_null);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
