// index_mem: storage of the sparse parity-check matrix as a list of indices.
//
// Instead of the 2.5 Mbit dense H of a rate-1/2, 2304-bit code, only the
// column index of every one is kept: DEPTH 16-bit entries (idx_entry_t: row-end
// flag, null flag, 14-bit column), 8192 x 16 bit = 16 Kbyte by default. One
// write port (from the H generator) and one read port with a registered output
// (data valid the cycle after the request). Keeping H as indices and the
// 16 Kbyte size follow the encoder's original description; the entry layout
// with its two flags is this design's own.
module index_mem
  import ldpc_pkg::*;
#(
  parameter int unsigned DEPTH = IDX_DEPTH
) (
  input  logic       clk,
  input  iwr_req_t   wr,
  input  ird_req_t   rd,
  output idx_entry_t rdata
);
  idx_entry_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr.en && (int'(wr.addr) < int'(DEPTH))) mem[wr.addr] <= wr.data;
    if (rd.en) rdata <= mem[rd.addr];
  end
endmodule
