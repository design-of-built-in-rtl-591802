// tb_sram: random reads and writes against a reference array. Checks that a
// write needs cs = 1 and rwbar = 0, that read data appear in the same cycle
// the address is applied, and that all words are independent.
module tb_sram;
  logic clk = 0, cs, rwbar;
  logic [5:0] addr;
  logic [7:0] din, dout;
  logic [7:0] ref_mem [64];
  int checks = 0, failures = 0;

  sram dut (.clk, .cs, .rwbar, .addr, .din, .dout);
  always #5 clk = ~clk;

  initial begin
    // fill every word
    cs = 1; rwbar = 0;
    for (int a = 0; a < 64; a++) begin
      addr = 6'(a); din = 8'($urandom); ref_mem[a] = din;
      @(negedge clk);
    end
    for (int i = 0; i < 5000; i++) begin
      cs = 1'($urandom); rwbar = 1'($urandom);
      addr = 6'($urandom); din = 8'($urandom);
      #1;
      checks++;
      if (dout !== ref_mem[addr]) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d: %h exp %h", addr, dout, ref_mem[addr]);
      end
      if (cs && !rwbar) ref_mem[addr] = din;
      @(negedge clk);
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
