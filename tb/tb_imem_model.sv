// tb_imem_model: behavioural index memory for unit testbenches: an array of
// index entries with a synchronous read port. Testbenches fill `mem` directly.
module tb_imem_model
  import ldpc_pkg::*;
(
  input  logic       clk,
  input  ird_req_t   rd,
  output idx_entry_t rdata
);
  idx_entry_t mem [IDX_DEPTH];

  always @(posedge clk) if (rd.en) rdata <= mem[rd.addr];
endmodule
