// tb_vmem_model: behavioural vector memory for unit testbenches. One bit per
// element of `bits`, LANES bits per word, two synchronous read ports and one
// masked write port, reads returning the data from before a same-cycle write.
// Testbenches read and write `bits` directly.
module tb_vmem_model
  import ldpc_pkg::*;
(
  input  logic             clk,
  input  vrd_req_t         rd_a,
  input  vrd_req_t         rd_b,
  input  vwr_req_t         wr,
  output logic [LANES-1:0] rdata_a,
  output logic [LANES-1:0] rdata_b
);
  logic bits [VBITS];
  int   writes = 0;

  always @(posedge clk) begin
    for (int l = 0; l < int'(LANES); l++) begin
      if (rd_a.en) rdata_a[l] <= bits[int'(rd_a.addr) * LANES + l];
      if (rd_b.en) rdata_b[l] <= bits[int'(rd_b.addr) * LANES + l];
    end
    if (wr.en) begin
      writes <= writes + 1;
      for (int l = 0; l < int'(LANES); l++)
        if (wr.mask[l]) bits[int'(wr.addr) * LANES + l] <= wr.data[l];
    end
  end
endmodule
