// encode_core: the actual encoding of one frame.
//
// With H = [A B T; C D E] (A, C: info columns; B, D: first parity block
// column; T: block lower-bidiagonal identities; E = [0 .. 0 I]) the parity
// bits p1 (zf bits) and p2 (m-zf bits) of the info bits s follow from six
// steps run one after the other on the shared vector memory:
//   1. MVM   lambda = [A;C] s                     (info list of the index memory)
//   2. FS    tmp    = T^-1 (A s)
//   3. ADD   p1     = E tmp + C s = last block of tmp xor last block of lambda
//   4. MVM   tmp    = B p1                        (B list of the index memory)
//   5. ADD   tmp    = tmp xor A s
//   6. FS    p2     = T^-1 tmp
// Step 3 uses phi = E T^-1 B + D = I, which holds when the first parity column
// has equal shifts in its first and last block rows and shift 0 in between, as
// in the IEEE 802.16e codes, so neither D nor phi^-1 is needed.
// Info bits are at bit 0 of the vector memory, p1 at bit k = kb*zf and p2 at
// k+zf, so the codeword [s p1 p2] is contiguous. zf must be a multiple of
// LANES. Each step costs the latency of its unit plus two cycles of
// sequencing: in all info_len + b_len + 3*(m-zf)/LANES + zf/LANES + 21 cycles
// from start to done (see the per-unit latencies).
module encode_core
  import ldpc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  zf_t              zf,
  input  mb_t              mb,
  input  kb_t              kb,
  input  icount_t          info_len,
  input  iaddr_t           b_base,
  input  icount_t          b_len,
  // index memory read port
  output ird_req_t         ird,
  input  idx_entry_t       irdata,
  // vector memory ports
  output vrd_req_t         vrd_a,
  output vrd_req_t         vrd_b,
  input  logic [LANES-1:0] vrdata_a,
  input  logic [LANES-1:0] vrdata_b,
  output vwr_req_t         vwr,
  output logic             busy,
  output logic             done
);
  typedef enum logic [2:0] {
    E_IDLE, E_MVM_AC, E_FS_1, E_ADD_P1, E_MVM_B, E_ADD_X, E_FS_P2
  } estate_e;

  localparam vwaddr_t LAM_W = vwaddr_t'(LAMBDA_BASE / LANES);
  localparam vwaddr_t TMP_W = vwaddr_t'(TMP_BASE / LANES);

  estate_e state;
  logic    launched;

  // frame geometry, in bits and words
  vbaddr_t k_bits, m_bits;
  vwaddr_t zw, mw, kw, pw;   // zf, m, k, m-zf in words

  always_comb begin
    k_bits = vbaddr_t'(kb) * vbaddr_t'(zf);
    m_bits = vbaddr_t'(mb) * vbaddr_t'(zf);
    zw     = vwaddr_t'(zf) >> 2;
    mw     = vwaddr_t'(m_bits >> 2);
    kw     = vwaddr_t'(k_bits >> 2);
    pw     = mw - zw;
  end

  // unit controls
  logic mvm_start, add_start, fs_start;
  logic mvm_done, add_done, fs_done;
  logic mvm_busy, add_busy, fs_busy;
  iaddr_t  mvm_idx;
  icount_t mvm_n;
  vbaddr_t mvm_src, mvm_dst;
  vwaddr_t add_a, add_b, add_d, add_n;
  vwaddr_t fs_x, fs_y, fs_n;
  vbaddr_t mvm_rows;

  vrd_req_t mvm_rd, add_rd_a, add_rd_b, fs_rd_a, fs_rd_b;
  vwr_req_t mvm_wr, add_wr, fs_wr;

  always_comb begin
    mvm_idx = '0;
    mvm_n   = info_len;
    mvm_src = '0;
    mvm_dst = vbaddr_t'(LAMBDA_BASE);
    add_a   = TMP_W + pw - zw;
    add_b   = LAM_W + pw;
    add_d   = kw;
    add_n   = zw;
    fs_x    = LAM_W;
    fs_y    = TMP_W;
    fs_n    = pw;
    unique case (state)
      E_MVM_B: begin
        mvm_idx = b_base;
        mvm_n   = b_len;
        mvm_src = k_bits;
        mvm_dst = vbaddr_t'(TMP_BASE);
      end
      E_ADD_X: begin
        add_a = TMP_W;
        add_b = LAM_W;
        add_d = TMP_W;
        add_n = pw;
      end
      E_FS_P2: begin
        fs_x = TMP_W;
        fs_y = kw + zw;
      end
      default: ;
    endcase
    mvm_start = !launched && (state == E_MVM_AC || state == E_MVM_B);
    add_start = !launched && (state == E_ADD_P1 || state == E_ADD_X);
    fs_start  = !launched && (state == E_FS_1   || state == E_FS_P2);
  end

  mvm_unit u_mvm (
    .clk, .rst_n,
    .start     (mvm_start),
    .idx_base  (mvm_idx),
    .nentries  (mvm_n),
    .src_base  (mvm_src),
    .dst_base  (mvm_dst),
    .ird       (ird),
    .irdata    (irdata),
    .rd        (mvm_rd),
    .rdata     (vrdata_a),
    .wr        (mvm_wr),
    .busy      (mvm_busy),
    .done      (mvm_done),
    .rows_done (mvm_rows)
  );

  vector_add u_add (
    .clk, .rst_n,
    .start    (add_start),
    .op_clear (1'b0),
    .a_base   (add_a),
    .b_base   (add_b),
    .d_base   (add_d),
    .nwords   (add_n),
    .rd_a     (add_rd_a),
    .rd_b     (add_rd_b),
    .rdata_a  (vrdata_a),
    .rdata_b  (vrdata_b),
    .wr       (add_wr),
    .busy     (add_busy),
    .done     (add_done)
  );

  forward_subst u_fs (
    .clk, .rst_n,
    .start    (fs_start),
    .x_base   (fs_x),
    .y_base   (fs_y),
    .zwords   (zw),
    .nwords   (fs_n),
    .rd_a     (fs_rd_a),
    .rd_b     (fs_rd_b),
    .rdata_a  (vrdata_a),
    .rdata_b  (vrdata_b),
    .wr       (fs_wr),
    .busy     (fs_busy),
    .done     (fs_done)
  );

  // the active unit owns the vector memory ports
  always_comb begin
    vrd_a = '0;
    vrd_b = '0;
    vwr   = '0;
    unique case (state)
      E_MVM_AC, E_MVM_B: begin vrd_a = mvm_rd;   vwr = mvm_wr; end
      E_ADD_P1, E_ADD_X: begin vrd_a = add_rd_a; vrd_b = add_rd_b; vwr = add_wr; end
      E_FS_1, E_FS_P2:   begin vrd_a = fs_rd_a;  vrd_b = fs_rd_b;  vwr = fs_wr;  end
      default: ;
    endcase
  end

  logic unit_done;
  assign unit_done = mvm_done || add_done || fs_done;
  assign busy      = (state != E_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= E_IDLE;
      launched <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state == E_IDLE) begin
        launched <= 1'b0;
        if (start) state <= E_MVM_AC;
      end else if (!launched) begin
        launched <= 1'b1;
      end else if (unit_done) begin
        launched <= 1'b0;
        unique case (state)
          E_MVM_AC: state <= E_FS_1;
          E_FS_1:   state <= E_ADD_P1;
          E_ADD_P1: state <= E_MVM_B;
          E_MVM_B:  state <= E_ADD_X;
          E_ADD_X:  state <= E_FS_P2;
          default: begin
            state <= E_IDLE;
            done  <= 1'b1;
          end
        endcase
      end
    end
  end

  // a unit reports done only in its own step, and the units never overlap
  a_done_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    mvm_done |-> (state inside {E_MVM_AC, E_MVM_B}));
  a_one_unit: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({mvm_busy, add_busy, fs_busy}));
  // each MVM step produces one bit per row: m rows for [A;C] s, m-zf for B p1
  a_mvm_rows: assert property (@(posedge clk) disable iff (!rst_n)
    mvm_done |-> (mvm_rows == ((state == E_MVM_AC) ? m_bits : m_bits - vbaddr_t'(zf))));
endmodule
