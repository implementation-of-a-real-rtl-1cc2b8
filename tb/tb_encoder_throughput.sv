// tb_encoder_throughput: throughput of the full-size encoder on the two
// 2304-bit codes whose real-time rate matters most, rate 1/2 (12 x 24 base
// matrix, 76 non-zero blocks) and rate 3/4 (6 x 24, 88 non-zero blocks). The
// model matrices have the block counts and parity shape of the IEEE 802.16e
// codes with random shifts and positions. For each code it generates H,
// encodes four frames, checks every codeword against H, checks that each
// frame takes the predicted number of cycles, and reports info bits per cycle
// and the resulting rate at a 100 MHz clock. The higher-rate code must give the
// higher throughput.
module tb_encoder_throughput;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic mm_we = 0;
  logic [MM_AW-1:0] mm_waddr = '0;
  model_t mm_wdata = '0;
  zf_t cfg_zf = '0;
  mb_t cfg_mb = '0;
  kb_t cfg_kb = '0;
  scale_mode_e cfg_mode = SCALE_FLOOR;
  logic cmd_valid = 0, cmd_encode = 0, cmd_ready;
  logic gen_done, enc_done, h_overflow;
  logic hv_we = 0, hv_re = 0;
  vwaddr_t hv_waddr = '0, hv_raddr = '0;
  logic [LANES-1:0] hv_wdata = '0, hv_rdata;

  model_t model [MM_DEPTH];
  logic   cw    [N_MAX];
  logic   info  [N_MAX];
  int checks = 0, failures = 0;
  // mechanism counters
  int n_gen = 0, n_enc = 0, n_rate_switch = 0, n_size_switch = 0, n_mod = 0;
  int n_fixup_rows = 0, n_null_b = 0, n_overflow = 0, n_reuse = 0;
  int last_mb = -1, last_zf = -1;
  int ilen, blen;

  always #5 clk = ~clk;

  ldpc_encoder_top dut (.*);

  function automatic int shift_of(int p, int z, bit m);
    return m ? p % z : (p * z) / 96;
  endfunction

  // exactly nblk non-zero info blocks, at least one per row
  task automatic make_model_blocks(int nmb, int nblk);
    int nkb, placed;
    nkb = NB - nmb;
    make_model(nmb, 0);
    placed = 0;
    for (int i = 0; i < nmb; i++) begin
      model[i * NB + $urandom_range(nkb - 1)] = model_t'($urandom_range(95));
    end
    for (int i = 0; i < nmb; i++) for (int j = 0; j < nkb; j++) if (model[i * NB + j] >= 0) placed++;
    while (placed < nblk) begin
      int a;
      a = $urandom_range(nmb - 1) * NB + $urandom_range(nkb - 1);
      if (model[a] < 0) begin
        model[a] = model_t'($urandom_range(95));
        placed++;
      end
    end
  endtask

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

  // number of index entries the code needs
  function automatic void list_sizes(int z, int nmb, output int il, output int bl);
    int nkb;
    nkb = NB - nmb;
    il = 0;
    for (int i = 0; i < nmb; i++) begin
      int w;
      w = 0;
      for (int j = 0; j < nkb; j++) if (model[i * NB + j] >= 0) w++;
      il += z * ((w == 0) ? 1 : w);
    end
    bl = (nmb - 1) * z;
  endfunction

  task automatic program_and_generate(int z, int nmb, bit m, bit expect_overflow);
    int cyc, exp_cyc, nkb;
    nkb = NB - nmb;
    for (int a = 0; a < int'(MM_DEPTH); a++) begin
      @(negedge clk);
      mm_we = 1; mm_waddr = MM_AW'(a); mm_wdata = model[a];
    end
    @(negedge clk); mm_we = 0;
    for (int i = 0; i < nmb; i++) if (model[i * NB + nkb - 1] < 0) n_fixup_rows++;
    for (int i = 0; i < nmb - 1; i++) if (model[i * NB + nkb] < 0) n_null_b++;
    if (last_mb >= 0 && last_mb != nmb) n_rate_switch++;
    if (last_zf >= 0 && last_zf != z) n_size_switch++;
    if (m) n_mod++;
    last_mb = nmb; last_zf = z;
    while (!cmd_ready) @(negedge clk);
    cfg_zf = zf_t'(z); cfg_mb = mb_t'(nmb); cfg_kb = kb_t'(nkb); cfg_mode = scale_mode_e'(m);
    cmd_valid = 1; cmd_encode = 0;
    @(negedge clk); cmd_valid = 0;
    cyc = 1;
    while (!gen_done) begin @(negedge clk); cyc++; end
    n_gen++;
    exp_cyc = nmb * z * nkb + (nmb - 1) * z + 3;
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("generation time %0d expected %0d", cyc, exp_cyc);
    end
    checks++;
    if (h_overflow != expect_overflow) begin
      failures++;
      $display("h_overflow %0d expected %0d", h_overflow, expect_overflow);
    end
    if (h_overflow) n_overflow++;
  endtask

  task automatic encode_frame(int z, int nmb, bit m);
    int k, n, cyc, exp_cyc, bad;
    k = (NB - nmb) * z;
    n = NB * z;
    for (int i = 0; i < k; i++) info[i] = 1'($urandom);
    for (int w = 0; w < k / int'(LANES); w++) begin
      @(negedge clk);
      hv_we = 1; hv_waddr = vwaddr_t'(w);
      for (int l = 0; l < int'(LANES); l++) hv_wdata[l] = info[w * LANES + l];
    end
    @(negedge clk); hv_we = 0;
    cmd_valid = 1; cmd_encode = 1;
    @(negedge clk); cmd_valid = 0;
    cyc = 1;
    while (!enc_done) begin @(negedge clk); cyc++; end
    n_enc++;
    list_sizes(z, nmb, ilen, blen);
    exp_cyc = ilen + blen + 3 * (nmb - 1) * z / 4 + z / 4 + 21;
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("encoding time %0d expected %0d", cyc, exp_cyc);
    end
    // read the codeword back
    for (int w = 0; w < n / int'(LANES); w++) begin
      hv_re = 1; hv_raddr = vwaddr_t'(w);
      @(negedge clk);
      for (int l = 0; l < int'(LANES); l++) cw[w * LANES + l] = hv_rdata[l];
    end
    hv_re = 0;
    checks++;
    bad = 0;
    for (int i = 0; i < k; i++) if (cw[i] != info[i]) bad++;
    if (bad != 0) begin
      failures++;
      $display("%0d info bits wrong", bad);
    end
    checks++;
    bad = 0;
    for (int i = 0; i < nmb; i++)
      for (int r = 0; r < z; r++) begin
        logic s;
        s = 0;
        for (int j = 0; j < int'(NB); j++)
          if (model[i * NB + j] >= 0)
            s ^= cw[j * z + (r + shift_of(int'(model[i * NB + j]), z, m)) % z];
        if (s) bad++;
      end
    if (bad != 0) begin
      failures++;
      $display("%0d of %0d parity checks fail (z=%0d mb=%0d mode=%0d)", bad, nmb * z, z, nmb, m);
    end
  endtask

  real bpc [2];

  task automatic workload(int idx, int nmb, int nblk, string name);
    int k, cyc;
    make_model_blocks(nmb, nblk);
    program_and_generate(96, nmb, 0, 1'b0);
    k = (NB - nmb) * 96;
    for (int f = 0; f < 4; f++) encode_frame(96, nmb, 0);
    list_sizes(96, nmb, ilen, blen);
    cyc = ilen + blen + 3 * (nmb - 1) * 96 / 4 + 96 / 4 + 21;
    bpc[idx] = real'(k) / real'(cyc);
    $display("%s: %0d info bits, %0d index entries, %0d cycles per frame, %0.3f info bits/cycle, %0.1f Mbps at 100 MHz",
             name, k, ilen + blen, cyc, bpc[idx], bpc[idx] * 100.0);
  endtask

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // non-zero info blocks: 76 - 25 (rate 1/2) and 88 - 13 (rate 3/4)
    workload(0, 12, 51, "rate 1/2, n = 2304");
    workload(1, 6, 75, "rate 3/4, n = 2304");
    checks++;
    if (!(bpc[1] > bpc[0])) begin
      failures++;
      $display("rate 3/4 is not faster than rate 1/2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
