// tb_base_matrix_gen: exhaustive check of the model-to-base shift scaling.
// Every model value from -1 to 95 is scaled for every zf from 24 to 96 in
// steps of 4, in both modes, and compared with floor(p*zf/96) or p mod zf
// computed here in integer arithmetic.
module tb_base_matrix_gen;
  import ldpc_pkg::*;
  model_t      mv;
  zf_t         zf;
  scale_mode_e mode;
  logic        nz;
  zf_t         shift;
  int checks = 0, failures = 0;

  base_matrix_gen dut (.model_val(mv), .zf, .mode, .nz, .shift);

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int z = 24; z <= 96; z += 4) begin
        for (int p = -1; p < 96; p++) begin
          int exp_s;
          mv   = model_t'(p);
          zf   = zf_t'(z);
          mode = scale_mode_e'(m);
          #1;
          exp_s = (p < 0) ? 0 : (m == 0 ? (p * z) / 96 : p % z);
          checks++;
          if (nz != (p >= 0) || (p >= 0 && int'(shift) != exp_s)) begin
            failures++;
            if (failures < 10) $display("mismatch p=%0d z=%0d mode=%0d: nz=%0d shift=%0d exp=%0d",
                                        p, z, m, nz, shift, exp_s);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
