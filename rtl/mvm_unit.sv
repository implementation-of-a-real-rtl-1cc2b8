// mvm_unit: sparse matrix-vector product over GF(2).
//
// Streams nentries index entries from the index memory starting at idx_base.
// Each entry names one column of a one in the current row; the addressed bit
// of the source vector (bit address src_base + col) is XOR-accumulated. On an
// entry with the row-end flag the row's result is written as one bit to
// dst_base + row and the next row begins. A null entry adds 0 (a row with no
// one gives 0).
// Read, compute and write are pipelined over three stages, one entry per
// cycle: stage 0 reads the index memory, stage 1 reads the vector-memory word
// holding the source bit, stage 2 accumulates and writes. The accumulator is
// kept in a register, so each operand is read once. Start to done:
// nentries + 3 cycles. src and dst must not overlap. The row-end and null
// conventions and the register accumulator follow the original software
// loop; one entry per cycle and the three-stage pipeline are this design's own.
module mvm_unit
  import ldpc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  iaddr_t           idx_base,
  input  icount_t          nentries,
  input  vbaddr_t          src_base,
  input  vbaddr_t          dst_base,
  // index memory read port
  output ird_req_t         ird,
  input  idx_entry_t       irdata,
  // vector memory: source read, result write
  output vrd_req_t         rd,
  input  logic [LANES-1:0] rdata,
  output vwr_req_t         wr,
  output logic             busy,
  output logic             done,
  output vbaddr_t          rows_done
);
  localparam int unsigned LW = $clog2(LANES);

  logic     run;
  icount_t  cnt;
  // stage 1
  logic     s1_valid;
  // stage 2
  logic     s2_valid;
  logic     s2_last;
  logic     s2_nul;
  logic [LW-1:0] s2_lane;
  logic     acc;
  vbaddr_t  row;
  vbaddr_t  src_addr;
  vbaddr_t  dst_addr;
  logic     bit_in, acc_next;

  assign busy = run || s1_valid || s2_valid;
  assign ird  = '{en: run, addr: idx_base + iaddr_t'(cnt)};

  always_comb begin
    src_addr = src_base + vbaddr_t'(irdata.col);
    rd       = '{en: s1_valid && !irdata.nul, addr: src_addr[VBA_W-1:LW]};
    bit_in   = s2_nul ? 1'b0 : rdata[s2_lane];
    acc_next = acc ^ bit_in;
    dst_addr = dst_base + row;
    wr       = '{en:   s2_valid && s2_last,
                 addr: dst_addr[VBA_W-1:LW],
                 data: {LANES{acc_next}},
                 mask: LANES'(1) << dst_addr[LW-1:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run      <= 1'b0;
      cnt      <= '0;
      s1_valid <= 1'b0;
      s2_valid <= 1'b0;
      s2_last  <= 1'b0;
      s2_nul   <= 1'b0;
      s2_lane  <= '0;
      acc      <= 1'b0;
      row      <= '0;
      done     <= 1'b0;
    end else begin
      s1_valid <= run;
      s2_valid <= s1_valid;
      if (s1_valid) begin
        s2_last <= irdata.last;
        s2_nul  <= irdata.nul;
        s2_lane <= src_addr[LW-1:0];
      end
      done <= s2_valid && !s1_valid && !run;
      if (!busy && start) begin
        run <= (nentries != '0);
        cnt <= '0;
        acc <= 1'b0;
        row <= '0;
      end else begin
        if (run) begin
          if (cnt == nentries - 1'b1) run <= 1'b0;
          cnt <= cnt + 1'b1;
        end
        if (s2_valid) begin
          acc <= s2_last ? 1'b0 : acc_next;
          if (s2_last) row <= row + 1'b1;
        end
      end
    end
  end

  assign rows_done = row;
endmodule
