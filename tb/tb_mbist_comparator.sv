// tb_mbist_comparator: equal words, words differing in one bit, and random
// pairs; eq must be high exactly when the two words match.
module tb_mbist_comparator;
  logic [7:0] ramout, compare_val;
  logic eq;
  int checks = 0, failures = 0;

  mbist_comparator dut (.ramout, .compare_val, .eq);

  task automatic try(logic [7:0] a, logic [7:0] b);
    ramout = a; compare_val = b; #1;
    checks++;
    if (eq !== (a == b)) begin
      failures++;
      $display("FAIL %h vs %h: eq %b", a, b, eq);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) try(8'(i), 8'(i));
    for (int i = 0; i < 256; i++)
      for (int b = 0; b < 8; b++) try(8'(i), 8'(i) ^ 8'(1 << b));
    for (int i = 0; i < 1000; i++) try(8'($urandom), 8'($urandom));
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
