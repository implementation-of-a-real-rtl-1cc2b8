// base_matrix_gen: adapts one model-matrix entry to the current expansion
// factor.
//
// The model matrix is given for zf = Z0 = 96. For a smaller frame the shift of
// each non-zero block is scaled: floor(p * zf / 96) for SCALE_FLOOR, or
// p mod zf for SCALE_MOD. A negative entry is an all-zero block and gives
// nz = 0. Purely combinational. The scaling rule is the one of IEEE 802.16e;
// it is not spelled out beyond "the model matrix generates the base matrix".
module base_matrix_gen
  import ldpc_pkg::*;
(
  input  model_t      model_val,
  input  zf_t         zf,
  input  scale_mode_e mode,
  output logic        nz,       // block is a circulant, not zero
  output zf_t         shift     // right circular shift, 0 .. zf-1
);
  logic [13:0] prod;
  logic [6:0]  p;

  always_comb begin
    p     = model_val[6:0];
    nz    = !model_val[7];
    prod  = 14'(p) * 14'(zf);
    shift = '0;
    if (nz) begin
      if (mode == SCALE_FLOOR) shift = zf_t'(prod / 14'(Z0));
      else if (zf != '0)       shift = zf_t'(p % zf);
    end
  end
endmodule
