// h_matrix_gen: real-time generation of the sparse parity-check matrix.
//
// From the model matrix (read from model_matrix_mem) and the configuration
// (zf, mb block rows, kb info block columns, scaling mode) it writes the
// column indices of the ones of H into the index memory, row by row:
//   1. info part, rows 0 .. mb*zf-1, block columns 0 .. kb-1 (child matrices
//      A above C). Column of the one in row r of block (i,j) with shift s:
//      j*zf + (r + s) mod zf.
//   2. B part, rows 0 .. (mb-1)*zf-1 of block column kb (first parity
//      column). Column relative to p1: (r + s) mod zf. A row of B without a one
//      gets a null entry, so every row of B has exactly one entry.
// The last entry of each row carries the row-end flag. The dual-diagonal
// parity part (child matrices T and E) is fixed by the code family and is not
// stored.
//
// Pipeline: one base-matrix entry is visited per cycle. Cycle 0 issues the
// model-memory read, cycle 1 scales the value and writes an index entry. When
// the final block of a row is zero, the row-end flag is set by rewriting the
// row's previous entry in that (otherwise idle) cycle. A run takes
// mb*zf*kb + (mb-1)*zf + 2 cycles after start. If the list would not fit,
// overflow is set and further entries are dropped.
// Ports: start (pulse) begins a run; done pulses when the lists are complete;
// info_len, b_base and b_len describe the two lists. mb must be at least 2.
module h_matrix_gen
  import ldpc_pkg::*;
#(
  parameter int unsigned DEPTH = IDX_DEPTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  zf_t              zf,
  input  mb_t              mb,
  input  kb_t              kb,
  input  scale_mode_e      mode,
  // model matrix read port (registered read)
  output logic             mm_re,
  output logic [MM_AW-1:0] mm_raddr,
  input  model_t           mm_rdata,
  // index memory write port
  output iwr_req_t         iwr,
  // results
  output logic             busy,
  output logic             done,
  output icount_t          info_len,
  output iaddr_t           b_base,
  output icount_t          b_len,
  output logic             overflow
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  typedef enum logic {PH_INFO, PH_B} phase_e;

  state_e  state;
  phase_e  phase;
  mb_t     i;
  zf_t     r;
  kb_t     j;

  // stage-1 registers
  logic    s1_valid;
  phase_e  s1_phase;
  zf_t     s1_r;
  kb_t     s1_j;
  logic    s1_row_end;     // last block column of this row
  logic    s1_phase_end;   // last element of this phase

  // stage-1 state
  icount_t     wptr;
  logic        row_has;      // an entry of the current row is written
  logic [COL_W:0] last_entry;   // nul and col of the most recent entry written

  kb_t jstart, jend;
  mb_t iend;
  logic last_issue_row, last_issue;

  always_comb begin
    jstart         = (phase == PH_INFO) ? kb_t'(0) : kb;
    jend           = (phase == PH_INFO) ? kb - 1'b1 : kb;
    iend           = (phase == PH_INFO) ? mb - 1'b1 : mb - 4'd2;
    last_issue_row = (j == jend);
    last_issue     = last_issue_row && (r == zf - 1'b1) && (i == iend);
  end

  assign mm_re    = (state == S_RUN);
  assign mm_raddr = MM_AW'(i) * MM_AW'(NB) + MM_AW'(j);
  assign busy     = (state != S_IDLE);

  // stage 0: walk the base matrix
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      phase        <= PH_INFO;
      i            <= '0;
      r            <= '0;
      j            <= '0;
      s1_valid     <= 1'b0;
      s1_phase     <= PH_INFO;
      s1_r         <= '0;
      s1_j         <= '0;
      s1_row_end   <= 1'b0;
      s1_phase_end <= 1'b0;
    end else begin
      s1_valid <= (state == S_RUN);
      if (state == S_RUN) begin
        s1_phase     <= phase;
        s1_r         <= r;
        s1_j         <= j;
        s1_row_end   <= last_issue_row;
        s1_phase_end <= last_issue;
      end
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          phase <= PH_INFO;
          i     <= '0;
          r     <= '0;
          j     <= '0;
        end
        S_RUN: begin
          if (last_issue_row) begin
            j <= jstart;
            if (r == zf - 1'b1) begin
              r <= '0;
              if (i == iend) begin
                i <= '0;
                if (phase == PH_INFO) begin
                  phase <= PH_B;
                  j     <= kb;
                end else begin
                  state <= S_DRAIN;
                end
              end else begin
                i <= i + 1'b1;
              end
            end else begin
              r <= r + 1'b1;
            end
          end else begin
            j <= j + 1'b1;
          end
        end
        S_DRAIN: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // stage 1: scale, form the entry, write it
  logic        nz;
  zf_t         shift;
  logic [7:0]  rsum;
  zf_t         rot;
  logic [COL_W-1:0] col;
  idx_entry_t  entry;

  base_matrix_gen u_scale (
    .model_val (mm_rdata),
    .zf        (zf),
    .mode      (mode),
    .nz        (nz),
    .shift     (shift)
  );

  always_comb begin
    rsum  = 8'(s1_r) + 8'(shift);
    rot   = (rsum >= 8'(zf)) ? zf_t'(rsum - 8'(zf)) : zf_t'(rsum);
    col   = (s1_phase == PH_INFO) ? (COL_W'(s1_j) * COL_W'(zf) + COL_W'(rot)) : COL_W'(rot);
    entry = '{last: s1_row_end, nul: 1'b0, col: col};
    iwr   = '{en: 1'b0, addr: iaddr_t'(wptr), data: entry};
    if (s1_valid) begin
      if (nz || (s1_row_end && !row_has)) begin
        // a new entry: a one, or a null entry for a row with no one
        if (!nz) entry = '{last: 1'b1, nul: 1'b1, col: '0};
        iwr = '{en: (int'(wptr) < int'(DEPTH)), addr: iaddr_t'(wptr), data: entry};
      end else if (s1_row_end) begin
        // final block of the row is zero: flag the previous entry as row end
        iwr = '{en: 1'b1, addr: iaddr_t'(wptr - 1'b1),
                data: '{last: 1'b1, nul: last_entry[COL_W], col: last_entry[COL_W-1:0]}};
      end
    end
  end

  logic    new_entry, fits;
  icount_t wnext;
  assign new_entry = s1_valid && (nz || (s1_row_end && !row_has));
  assign fits      = int'(wptr) < int'(DEPTH);
  assign wnext     = (new_entry && fits) ? wptr + 1'b1 : wptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr       <= '0;
      row_has    <= 1'b0;
      last_entry <= '0;
      info_len   <= '0;
      b_base     <= '0;
      b_len      <= '0;
      overflow   <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state == S_IDLE && start) begin
        wptr     <= '0;
        row_has  <= 1'b0;
        overflow <= 1'b0;
      end else if (s1_valid) begin
        if (new_entry) begin
          if (fits) last_entry <= {iwr.data.nul, iwr.data.col};
          else      overflow   <= 1'b1;
        end
        wptr    <= wnext;
        row_has <= s1_row_end ? 1'b0 : (row_has || new_entry);
        if (s1_phase_end) begin
          if (s1_phase == PH_INFO) begin
            info_len <= wnext;
            b_base   <= iaddr_t'(wnext);
          end else begin
            b_len <= wnext - icount_t'(b_base);
            done  <= 1'b1;
          end
        end
      end
    end
  end
endmodule
