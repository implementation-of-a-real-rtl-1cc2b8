// forward_subst: y = T^-1 x by forward substitution, LANES bits per cycle.
//
// T is the block lower-bidiagonal matrix of zf x zf identities of the parity
// part of H, so T y = x gives y_i = x_i for the first zf bits and
// y_i = y_(i-zf) xor x_i after. No entry of T is stored or read. Per word:
// one read of x (port a), one read of y zwords words back (port b, the output
// vector itself) and one write. Two-stage pipeline: cycle t reads, cycle t+1
// writes word t; since zwords >= 2 every y word is written before it is read
// back. Start to done: nwords+2 cycles. zwords = zf/LANES, nwords = (m-zf)/LANES.
// The recurrence and the four-wide unrolling follow the original description;
// the pipeline and handshake are this design's own.
module forward_subst
  import ldpc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  vwaddr_t          x_base,
  input  vwaddr_t          y_base,
  input  vwaddr_t          zwords,
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
  logic    s1_first;     // word lies in the first block: copy
  vwaddr_t s1_cnt;

  assign busy = run || s1_valid;
  assign rd_a = '{en: run, addr: x_base + cnt};
  assign rd_b = '{en: run && (cnt >= zwords), addr: y_base + cnt - zwords};
  assign wr   = '{en:   s1_valid,
                  addr: y_base + s1_cnt,
                  data: s1_first ? rdata_a : (rdata_a ^ rdata_b),
                  mask: '1};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run      <= 1'b0;
      cnt      <= '0;
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_cnt   <= '0;
      done     <= 1'b0;
    end else begin
      s1_valid <= run;
      s1_cnt   <= cnt;
      s1_first <= (cnt < zwords);
      done     <= s1_valid && !run;
      if (!run && !s1_valid && start) begin
        run <= (nwords != '0);
        cnt <= '0;
      end else if (run) begin
        if (cnt == nwords - 1'b1) run <= 1'b0;
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
