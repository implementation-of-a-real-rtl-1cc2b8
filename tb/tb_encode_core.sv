// tb_encode_core: encodes random frames with the encoding engine alone. The
// index lists of H are built here from random 802.16e-structured model
// matrices (rates 1/2, 2/3, 3/4, 5/6, several zf), the info bits are random,
// and each codeword [s p1 p2] is checked against every parity check of the
// full H (including the dual-diagonal part, which the engine never reads).
// Also checks that the info bits are untouched and the encoding time.
module tb_encode_core;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  zf_t zf = '0;
  mb_t mb = '0;
  kb_t kb = '0;
  icount_t info_len = '0, b_len = '0;
  iaddr_t b_base = '0;
  ird_req_t ird;
  idx_entry_t irdata;
  vrd_req_t vrd_a, vrd_b;
  vwr_req_t vwr;
  logic [LANES-1:0] vrdata_a, vrdata_b;
  logic busy, done;

  model_t model [MM_DEPTH];
  logic   info  [N_MAX];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  encode_core dut (.clk, .rst_n, .start, .zf, .mb, .kb, .info_len, .b_base, .b_len,
                   .ird, .irdata, .vrd_a, .vrd_b, .vrdata_a, .vrdata_b, .vwr, .busy, .done);
  tb_vmem_model mem (.clk, .rd_a(vrd_a), .rd_b(vrd_b), .wr(vwr), .rdata_a(vrdata_a), .rdata_b(vrdata_b));
  tb_imem_model imem (.clk, .rd(ird), .rdata(irdata));

  function automatic int shift_of(int p, int z, bit m);
    return m ? p % z : (p * z) / 96;
  endfunction

  task automatic make_model(int nmb, int density);
    int x, h, nkb;
    nkb = NB - nmb;
    foreach (model[a]) model[a] = -8'sd1;
    for (int i = 0; i < nmb; i++)
      for (int j = 0; j < nkb; j++)
        if ($urandom_range(99) < density) model[i * NB + j] = model_t'($urandom_range(95));
    x = $urandom_range(1, nmb - 2);
    h = $urandom_range(1, 95);
    model[nkb] = model_t'(h);
    model[x * NB + nkb] = 8'sd0;
    model[(nmb - 1) * NB + nkb] = model_t'(h);
    for (int j = 0; j < nmb - 1; j++) begin
      model[j * NB + nkb + 1 + j] = 8'sd0;
      model[(j + 1) * NB + nkb + 1 + j] = 8'sd0;
    end
  endtask

  // index lists: info part (rows 0 .. m-1), then B (rows 0 .. m-zf-1)
  task automatic load_lists(int z, int nmb, bit m, output int ilen, output int blen);
    int ne, nkb;
    nkb = NB - nmb;
    ne = 0;
    for (int i = 0; i < nmb; i++)
      for (int r = 0; r < z; r++) begin
        int lastj;
        lastj = -1;
        for (int j = 0; j < nkb; j++) if (model[i * NB + j] >= 0) lastj = j;
        if (lastj < 0) begin imem.mem[ne] = '{last: 1'b1, nul: 1'b1, col: '0}; ne++; end
        for (int j = 0; j <= lastj; j++)
          if (model[i * NB + j] >= 0) begin
            imem.mem[ne] = '{last: (j == lastj), nul: 1'b0,
                             col: COL_W'(j * z + (r + shift_of(int'(model[i * NB + j]), z, m)) % z)};
            ne++;
          end
      end
    ilen = ne;
    for (int i = 0; i < nmb - 1; i++)
      for (int r = 0; r < z; r++) begin
        if (model[i * NB + nkb] >= 0)
          imem.mem[ne] = '{last: 1'b1, nul: 1'b0,
                           col: COL_W'((r + shift_of(int'(model[i * NB + nkb]), z, m)) % z)};
        else
          imem.mem[ne] = '{last: 1'b1, nul: 1'b1, col: '0};
        ne++;
      end
    blen = ne - ilen;
  endtask

  task automatic run(int z, int nmb, bit m, int density);
    int ilen, blen, cyc, exp_cyc, k, n, bad;
    do begin
      make_model(nmb, density);
      load_lists(z, nmb, m, ilen, blen);
    end while (ilen + blen > int'(IDX_DEPTH));
    k = (NB - nmb) * z;
    n = NB * z;
    for (int i = 0; i < int'(VBITS); i++) mem.bits[i] = 1'($urandom);
    for (int i = 0; i < k; i++) info[i] = mem.bits[i];
    @(negedge clk);
    zf = zf_t'(z); mb = mb_t'(nmb); kb = kb_t'(NB - nmb);
    info_len = icount_t'(ilen); b_base = iaddr_t'(ilen); b_len = icount_t'(blen);
    start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    exp_cyc = ilen + blen + 3 * (nmb - 1) * z / 4 + z / 4 + 21;
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("encoding time %0d expected %0d", cyc, exp_cyc);
    end
    checks++;
    bad = 0;
    for (int i = 0; i < k; i++) if (mem.bits[i] != info[i]) bad++;
    if (bad != 0) begin
      failures++;
      $display("%0d info bits changed", bad);
    end
    // every parity check of the full H
    checks++;
    bad = 0;
    for (int i = 0; i < nmb; i++)
      for (int r = 0; r < z; r++) begin
        logic s;
        s = 0;
        for (int j = 0; j < int'(NB); j++)
          if (model[i * NB + j] >= 0)
            s ^= mem.bits[j * z + (r + shift_of(int'(model[i * NB + j]), z, m)) % z];
        if (s) bad++;
      end
    if (bad != 0) begin
      failures++;
      $display("%0d of %0d parity checks fail (z=%0d mb=%0d mode=%0d)", bad, nmb * z, z, nmb, m);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(96, 12, 0, 40);  // rate 1/2, 2304 bits
    run(96, 8, 1, 50);   // rate 2/3
    run(96, 6, 0, 60);   // rate 3/4
    run(96, 4, 0, 80);   // rate 5/6
    for (int t = 0; t < 6; t++)
      run(4 * $urandom_range(6, 24), 4 + 2 * $urandom_range(0, 4), 1'($urandom), $urandom_range(20, 70));
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
