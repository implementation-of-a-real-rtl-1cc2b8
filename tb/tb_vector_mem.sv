// tb_vector_mem: random masked writes and dual-port reads of the four-bank
// vector memory against a bit-level shadow. Checks that a masked write leaves
// the other banks alone, that both read ports return the right word one cycle
// later, and that a read in the cycle of a write returns the old data.
module tb_vector_mem;
  import ldpc_pkg::*;
  logic clk = 0;
  vrd_req_t rd_a = '0, rd_b = '0;
  vwr_req_t wr = '0;
  logic [LANES-1:0] rdata_a, rdata_b;
  logic [LANES-1:0] shadow [VWORDS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vector_mem dut (.clk, .rd_a, .rd_b, .wr, .rdata_a, .rdata_b);

  initial begin
    // full initialisation
    for (int a = 0; a < int'(VWORDS); a++) begin
      @(negedge clk);
      shadow[a] = LANES'($urandom);
      wr = '{en: 1'b1, addr: vwaddr_t'(a), data: shadow[a], mask: '1};
    end
    for (int n = 0; n < 4000; n++) begin
      int wa, ra, rb;
      logic [LANES-1:0] d, m, exp_a, exp_b;
      wa = $urandom_range(VWORDS - 1);
      ra = ($urandom_range(3) == 0) ? wa : $urandom_range(VWORDS - 1);
      rb = $urandom_range(VWORDS - 1);
      d  = LANES'($urandom);
      m  = LANES'($urandom);
      @(negedge clk);
      wr   = '{en: 1'b1, addr: vwaddr_t'(wa), data: d, mask: m};
      rd_a = '{en: 1'b1, addr: vwaddr_t'(ra)};
      rd_b = '{en: 1'b1, addr: vwaddr_t'(rb)};
      exp_a = shadow[ra];
      exp_b = shadow[rb];
      shadow[wa] = (shadow[wa] & ~m) | (d & m);
      @(negedge clk);
      wr = '0; rd_a = '0; rd_b = '0;
      checks += 2;
      if (rdata_a != exp_a) begin
        failures++;
        if (failures < 10) $display("port a word %0d: %b expected %b", ra, rdata_a, exp_a);
      end
      if (rdata_b != exp_b) begin
        failures++;
        if (failures < 10) $display("port b word %0d: %b expected %b", rb, rdata_b, exp_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
