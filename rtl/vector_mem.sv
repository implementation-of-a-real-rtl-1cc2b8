// vector_mem: bit-vector memory built from LANES parallel one-bit banks.
//
// Bit b of a vector lives in bank b mod LANES at word b / LANES, so one word
// access moves LANES consecutive bits. Two read ports and one write port let a
// vector operation read both operands and write its result in the same cycle.
// Reads are synchronous: data appears the cycle after the request and shows
// the memory before any write of that same cycle. The write port has one
// enable per bank so a single bit can be written without touching its
// neighbours. The four banks follow the encoder's original description;
// the size, port count and memory map (ldpc_pkg) are this design's own.
module vector_mem
  import ldpc_pkg::*;
#(
  parameter int unsigned WORDS = VWORDS
) (
  input  logic             clk,
  input  vrd_req_t         rd_a,
  input  vrd_req_t         rd_b,
  input  vwr_req_t         wr,
  output logic [LANES-1:0] rdata_a,
  output logic [LANES-1:0] rdata_b
);
  for (genvar l = 0; l < LANES; l++) begin : g_bank
    logic bank [WORDS];

    always_ff @(posedge clk) begin
      if (wr.en && wr.mask[l] && (int'(wr.addr) < int'(WORDS))) bank[wr.addr] <= wr.data[l];
      if (rd_a.en) rdata_a[l] <= bank[rd_a.addr];
      if (rd_b.en) rdata_b[l] <= bank[rd_b.addr];
    end
  end
endmodule
