// tb_mbist_controller: drives rst, start and cout and checks NbarT and ld:
// idle after reset, test after start, idle again after cout, start ignored
// while testing, reset from test mode.
module tb_mbist_controller;
  logic clk = 0, rst, start, cout, NbarT, ld;
  int checks = 0, failures = 0;

  mbist_controller dut (.clk, .rst, .start, .cout, .NbarT, .ld);
  always #5 clk = ~clk;

  task automatic expect_mode(bit test, string what);
    checks++;
    if (NbarT !== test || ld !== !test) begin
      failures++;
      $display("FAIL %s: NbarT %b ld %b", what, NbarT, ld);
    end
  endtask

  initial begin
    rst = 1; start = 0; cout = 0;
    @(negedge clk); @(negedge clk);
    expect_mode(0, "after reset");
    rst = 0;
    repeat (3) @(negedge clk);
    expect_mode(0, "idle without start");
    start = 1; @(negedge clk); start = 0;
    expect_mode(1, "after start");
    repeat (5) begin @(negedge clk); expect_mode(1, "waiting for cout"); end
    start = 1; @(negedge clk); start = 0;
    expect_mode(1, "start while testing");
    cout = 1; @(negedge clk); cout = 0;
    expect_mode(0, "after cout");
    cout = 1; @(negedge clk); cout = 0;
    expect_mode(0, "cout while idle");
    start = 1; @(negedge clk); start = 0;
    expect_mode(1, "second start");
    rst = 1; @(negedge clk); rst = 0;
    expect_mode(0, "reset during test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
