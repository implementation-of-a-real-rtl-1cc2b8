// model_matrix_mem: programmable store of the model matrix.
//
// Holds MB_MAX x NB signed shift values (-1 marks an all-zero block). The host
// writes it when the code rate changes; the H generator reads it. Entry (i,j)
// lives at address i*NB + j. One write port; one read port with a registered
// output (data appears the cycle after the address). Reset clears the store to
// -1 (all blocks zero) so that an unprogrammed entry reads as a zero block; the
// reset value is this design's choice.
module model_matrix_mem
  import ldpc_pkg::*;
#(
  parameter int unsigned DEPTH = MM_DEPTH
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   we,
  input  logic [MM_AW-1:0]       waddr,
  input  model_t                 wdata,
  input  logic                   re,
  input  logic [MM_AW-1:0]       raddr,
  output model_t                 rdata
);
  model_t mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned a = 0; a < DEPTH; a++) mem[a] <= model_t'(-1);
    end else if (we && (int'(waddr) < int'(DEPTH))) begin
      mem[waddr] <= wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= (int'(raddr) < int'(DEPTH)) ? mem[raddr] : model_t'(-1);
  end
endmodule
