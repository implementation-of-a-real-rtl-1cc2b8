// ldpc_encoder_top: real-time programmable LDPC encoder for IEEE 802.16e-style
// quasi-cyclic codes.
//
// Two blocks work on the shared memories:
//   - H matrix generation (h_matrix_gen): on CMD_GENERATE the configuration
//     (zf, mb, kb, scaling mode) is latched and the model matrix is expanded
//     into the sparse index list of H (index_mem). This is repeated whenever
//     the frame size or code rate changes, between frames.
//   - Actual encoding (encode_core): on CMD_ENCODE the info bits in the vector
//     memory are encoded with the latched code; p1 and p2 are written behind
//     them so the codeword [s p1 p2] sits at vector-memory bits 0 .. n-1.
// Host side: mm_* writes model-matrix entries (address i*24 + j); hv_* writes
// and reads the vector memory, LANES bits per word, while the encoder is idle
// (read data one cycle after hv_re). cmd_valid is taken when cmd_ready is
// high. gen_done / enc_done pulse at the end of a command. h_overflow reports
// that the index list did not fit the 16 Kbyte index memory. The memory sizes
// are those of the largest code (rate 1/2, 2304 bits). The split into H
// generation and actual encoding follows the original description; the host
// interface and command protocol are this design's own.
module ldpc_encoder_top
  import ldpc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // model matrix programming
  input  logic             mm_we,
  input  logic [MM_AW-1:0] mm_waddr,
  input  model_t           mm_wdata,
  // code configuration, latched by CMD_GENERATE
  input  zf_t              cfg_zf,
  input  mb_t              cfg_mb,
  input  kb_t              cfg_kb,
  input  scale_mode_e      cfg_mode,
  // commands
  input  logic             cmd_valid,
  input  logic             cmd_encode,   // 0: generate H, 1: encode a frame
  output logic             cmd_ready,
  output logic             gen_done,
  output logic             enc_done,
  output logic             h_overflow,
  // host access to the vector memory
  input  logic             hv_we,
  input  vwaddr_t          hv_waddr,
  input  logic [LANES-1:0] hv_wdata,
  input  logic             hv_re,
  input  vwaddr_t          hv_raddr,
  output logic [LANES-1:0] hv_rdata
);
  // active code
  zf_t         zf;
  mb_t         mb;
  kb_t         kb;
  scale_mode_e mode;

  logic gen_busy, enc_busy;
  logic gen_start, enc_start;

  assign cmd_ready = !gen_busy && !enc_busy;
  assign gen_start = cmd_valid && cmd_ready && !cmd_encode;
  assign enc_start = cmd_valid && cmd_ready &&  cmd_encode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zf   <= zf_t'(ZF_MAX);
      mb   <= mb_t'(MB_MAX);
      kb   <= kb_t'(NB - MB_MAX);
      mode <= SCALE_FLOOR;
    end else if (gen_start) begin
      zf   <= cfg_zf;
      mb   <= cfg_mb;
      kb   <= cfg_kb;
      mode <= cfg_mode;
    end
  end

  // model matrix
  logic             mm_re;
  logic [MM_AW-1:0] mm_raddr;
  model_t           mm_rdata;

  model_matrix_mem u_mm (
    .clk, .rst_n,
    .we    (mm_we),
    .waddr (mm_waddr),
    .wdata (mm_wdata),
    .re    (mm_re),
    .raddr (mm_raddr),
    .rdata (mm_rdata)
  );

  // H matrix generation. The generator starts one cycle after the command so
  // that it sees the latched configuration.
  iwr_req_t iwr;
  icount_t  info_len, b_len;
  iaddr_t   b_base;
  logic     gen_go, gen_run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gen_go <= 1'b0;
    else        gen_go <= gen_start;
  end

  h_matrix_gen u_hgen (
    .clk, .rst_n,
    .start    (gen_go),
    .zf, .mb, .kb, .mode,
    .mm_re    (mm_re),
    .mm_raddr (mm_raddr),
    .mm_rdata (mm_rdata),
    .iwr      (iwr),
    .busy     (gen_run),
    .done     (gen_done),
    .info_len (info_len),
    .b_base   (b_base),
    .b_len    (b_len),
    .overflow (h_overflow)
  );
  assign gen_busy = gen_go || gen_run;

  // index memory
  ird_req_t   ird;
  idx_entry_t irdata;

  index_mem u_idx (
    .clk,
    .wr    (iwr),
    .rd    (ird),
    .rdata (irdata)
  );

  // actual encoding
  vrd_req_t         c_rd_a, c_rd_b;
  vwr_req_t         c_wr;
  logic [LANES-1:0] vrdata_a, vrdata_b;

  encode_core u_enc (
    .clk, .rst_n,
    .start    (enc_start),
    .zf, .mb, .kb,
    .info_len (info_len),
    .b_base   (b_base),
    .b_len    (b_len),
    .ird      (ird),
    .irdata   (irdata),
    .vrd_a    (c_rd_a),
    .vrd_b    (c_rd_b),
    .vrdata_a (vrdata_a),
    .vrdata_b (vrdata_b),
    .vwr      (c_wr),
    .busy     (enc_busy),
    .done     (enc_done)
  );

  // vector memory, shared between the host and the encoder
  vrd_req_t m_rd_a;
  vwr_req_t m_wr;

  always_comb begin
    if (enc_busy) begin
      m_rd_a = c_rd_a;
      m_wr   = c_wr;
    end else begin
      m_rd_a = '{en: hv_re, addr: hv_raddr};
      m_wr   = '{en: hv_we, addr: hv_waddr, data: hv_wdata, mask: '1};
    end
  end

  vector_mem u_vmem (
    .clk,
    .rd_a    (m_rd_a),
    .rd_b    (c_rd_b),
    .wr      (m_wr),
    .rdata_a (vrdata_a),
    .rdata_b (vrdata_b)
  );
  assign hv_rdata = vrdata_a;

  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n)
    !(enc_busy && (hv_we || hv_re)));
endmodule
