// tb_index_mem: fills the whole 8192-entry index memory with a pattern built
// from the address, overwrites random entries, and reads everything back
// through the registered read port, comparing with a shadow copy.
module tb_index_mem;
  import ldpc_pkg::*;
  logic clk = 0;
  iwr_req_t wr = '0;
  ird_req_t rd = '0;
  idx_entry_t rdata;
  idx_entry_t shadow [IDX_DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  index_mem dut (.clk, .wr, .rd, .rdata);

  initial begin
    for (int a = 0; a < int'(IDX_DEPTH); a++) begin
      @(negedge clk);
      shadow[a] = idx_entry_t'(16'(a * 40503 + 17));
      wr = '{en: 1'b1, addr: iaddr_t'(a), data: shadow[a]};
    end
    for (int n = 0; n < 500; n++) begin
      int a;
      a = $urandom_range(IDX_DEPTH - 1);
      @(negedge clk);
      shadow[a] = idx_entry_t'(16'($urandom));
      wr = '{en: 1'b1, addr: iaddr_t'(a), data: shadow[a]};
    end
    @(negedge clk); wr = '0;
    for (int a = 0; a < int'(IDX_DEPTH); a++) begin
      rd = '{en: 1'b1, addr: iaddr_t'(a)};
      @(negedge clk);
      checks++;
      if (rdata != shadow[a]) begin
        failures++;
        if (failures < 10) $display("addr %0d read %h expected %h", a, rdata, shadow[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
