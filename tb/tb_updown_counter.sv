// tb_updown_counter: random en/u_d stimulus against a reference count;
// checks the all-ones reset value, wrap-around both ways and hold.
module tb_updown_counter;
  logic clk = 0, reset, en, u_d;
  logic [3:0] count;
  int model;
  int checks = 0, failures = 0;
  int wraps_up = 0, wraps_dn = 0;

  updown_counter dut (.clk, .reset, .en, .u_d, .count);
  always #5 clk = ~clk;

  initial begin
    reset = 1; en = 0; u_d = 0;
    @(negedge clk);
    checks++;
    if (count !== 4'hF) begin failures++; $display("FAIL reset value %h", count); end
    reset = 0; model = 15;
    for (int i = 0; i < 3000; i++) begin
      en = ($urandom % 4) != 0;
      u_d = (i / 100) % 2;      // long runs in each direction
      @(negedge clk);
      if (en) begin
        if (u_d && model == 15) wraps_up++;
        if (!u_d && model == 0) wraps_dn++;
        model = u_d ? (model + 1) % 16 : (model + 15) % 16;
      end
      checks++;
      if (count !== 4'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: %h exp %h", i, count, model);
      end
    end
    checks++;
    if (wraps_up == 0 || wraps_dn == 0) begin failures++; $display("FAIL no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
