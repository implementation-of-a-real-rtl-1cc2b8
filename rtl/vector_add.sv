// vector_add: modulo-2 addition of two bit vectors, LANES bits per cycle.
//
// d[w] = a[w] xor b[w] for nwords vector-memory words (or d[w] = 0 when
// op_clear is set, used to initialise a vector). The loop is unrolled across
// the LANES memory banks: per word one read of each operand and one write, so a
// zf-bit vector takes zf/LANES cycles instead of 3*zf single-bit accesses.
// Two-stage pipeline: cycle t requests words a_base+t and b_base+t, cycle t+1
// writes d_base+t. d may equal a or b (in place); otherwise d must not overlap
// them. done pulses one cycle after
// the last write is issued; a run of nwords takes nwords+2 cycles from start
// to done. Four-wide unrolling over the banks follows the original
// description; the pipeline and start/done handshake are this design's own.
module vector_add
  import ldpc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             op_clear,
  input  vwaddr_t          a_base,
  input  vwaddr_t          b_base,
  input  vwaddr_t          d_base,
  input  vwaddr_t          nwords,
  output vrd_req_t         rd_a,
  output vrd_req_t         rd_b,
  input  logic [LANES-1:0] rdata_a,
  input  logic [LANES-1:0] rdata_b,
  output vwr_req_t         wr,
  output logic             busy,
  output logic             done
);
  logic    run;
  vwaddr_t cnt;
  logic    s1_valid;
  vwaddr_t s1_cnt;
  logic    clr;

  assign busy = run || s1_valid;
  assign rd_a = '{en: run, addr: a_base + cnt};
  assign rd_b = '{en: run, addr: b_base + cnt};
  assign wr   = '{en:   s1_valid,
                  addr: d_base + s1_cnt,
                  data: clr ? '0 : (rdata_a ^ rdata_b),
                  mask: '1};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run      <= 1'b0;
      cnt      <= '0;
      s1_valid <= 1'b0;
      s1_cnt   <= '0;
      clr      <= 1'b0;
      done     <= 1'b0;
    end else begin
      s1_valid <= run;
      s1_cnt   <= cnt;
      done     <= s1_valid && !run;
      if (!run && !s1_valid && start) begin
        run <= (nwords != '0);
        cnt <= '0;
        clr <= op_clear;
      end else if (run) begin
        if (cnt == nwords - 1'b1) run <= 1'b0;
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
