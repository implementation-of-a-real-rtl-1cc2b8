// tb_ldpc_encoder_top: end-to-end test of the programmable encoder at its
// full size (no parameter changed). For a sequence of codes it programs the
// model matrix through the host port, issues CMD_GENERATE, loads random info
// bits, issues CMD_ENCODE and reads the codeword back, then checks the info
// bits and every parity check of the full H built here from the model matrix.
// The sequence switches code rate (mb = 12, 8, 6, 4), frame size (zf) and
// scaling mode between frames, encodes several frames per generated H, and
// includes one model matrix too dense for the 16 Kbyte index memory, which
// must raise h_overflow. Generation and encoding times are checked, and each
// mechanism is counted: a failure is counted for one that never happened.
module tb_ldpc_encoder_top;
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

  task automatic code(int z, int nmb, bit m, int density, int frames);
    int il, bl;
    do begin
      make_model(nmb, density);
      list_sizes(z, nmb, il, bl);
    end while (il + bl > int'(IDX_DEPTH));
    // make sure some info row ends in a zero block
    if (model[NB - nmb - 1] >= 0) begin
      model[NB - nmb - 1] = -8'sd1;
      if (model[0] < 0) model[0] = 8'sd5;
    end
    program_and_generate(z, nmb, m, 1'b0);
    for (int f = 0; f < frames; f++) begin
      if (f > 0) n_reuse++;
      encode_frame(z, nmb, m);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    code(96, 12, 0, 40, 2);   // rate 1/2, n = 2304
    code(96, 8, 1, 50, 1);    // rate 2/3 with modulo scaling
    code(96, 6, 0, 60, 1);    // rate 3/4
    code(96, 4, 0, 80, 1);    // rate 5/6
    code(24, 12, 0, 40, 1);   // rate 1/2, n = 576
    // a code too dense for the index memory
    make_model(12, 100);
    program_and_generate(96, 12, 0, 1'b1);
    code(48, 6, 0, 60, 2);    // recovers: rate 3/4, n = 1152
    code(4 * $urandom_range(6, 24), 8, 1'($urandom), 50, 1);
    checks++;
    if (n_gen == 0 || n_enc == 0 || n_rate_switch == 0 || n_size_switch == 0 || n_mod == 0 ||
        n_fixup_rows == 0 || n_null_b == 0 || n_overflow == 0 || n_reuse == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("generations %0d, frames %0d, rate switches %0d, size switches %0d, modulo-scaled codes %0d",
             n_gen, n_enc, n_rate_switch, n_size_switch, n_mod);
    $display("rows ending in a zero block %0d, null B rows %0d, overflows %0d, frames reusing H %0d",
             n_fixup_rows, n_null_b, n_overflow, n_reuse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
