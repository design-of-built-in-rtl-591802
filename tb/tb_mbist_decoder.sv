// tb_mbist_decoder: exhaustive check of the test data decoder. For every
// {bit, op} input the expected word holds, at the selected bit, the March C-
// value of the operation (w0 r0 w1 r1 w0 r0 w1 r1 w0 r0 for ops 0..9) and 0
// elsewhere; unused operation codes give 0.
module tb_mbist_decoder;
  logic [6:0] sel;
  logic [7:0] data_t, compare_val;
  int checks = 0, failures = 0;
  // op values, written out from the March C- element list
  localparam bit VAL [10] = '{0, 0, 1, 1, 0, 0, 1, 1, 0, 0};

  mbist_decoder dut (.sel, .data_t, .compare_val);

  initial begin
    for (int b = 0; b < 8; b++)
      for (int op = 0; op < 16; op++) begin
        logic [7:0] exp;
        sel = 7'((b << 4) | op);
        exp = (op < 10 && VAL[op]) ? 8'(1 << b) : 8'h00;
        #1;
        checks++;
        if (data_t !== exp || compare_val !== exp) begin
          failures++;
          $display("FAIL bit %0d op %0d: data_t %h compare_val %h exp %h", b, op, data_t, compare_val, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
