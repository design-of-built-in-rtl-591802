// tb_mbist_counter_seq: checks the counter-sequencer against a March C-
// address/operation sequence built independently in the testbench from the
// element list M0 dn(w0), M1 up(r0,w1), M2 up(r1,w0), M3 dn(r0,w1),
// M4 dn(r1,w0), M5 up(r0), repeated for every bit of the word. Checks q, u_d
// and cout every cycle, that the sequence takes 10 * words * bits cycles,
// that cen low holds the count and that ld reloads it.
module tb_mbist_counter_seq;
  localparam int ADDR_W = 6, DATA_W = 8, BIT_W = 3, Q_W = 13;
  localparam int WORDS = 2**ADDR_W;
  localparam int TOTAL = 10 * WORDS * DATA_W;

  logic clk = 0, cen, ld;
  logic [Q_W-1:0] q;
  logic u_d, cout;
  int checks = 0, failures = 0;

  mbist_counter_seq dut (.clk, .cen, .ld, .q, .u_d, .cout);

  always #5 clk = ~clk;

  // expected sequence
  logic [Q_W-1:0] exp_q [TOTAL];
  logic           exp_up[TOTAL];
  int n;

  task automatic push(int b, int op, int a, bit up);
    exp_q[n]  = Q_W'((b << 10) | (op << 6) | a);
    exp_up[n] = up;
    n++;
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    n = 0;
    for (int b = 0; b < DATA_W; b++) begin
      for (int a = WORDS-1; a >= 0; a--) push(b, 0, a, 0);
      for (int a = 0; a < WORDS; a++) begin push(b, 1, a, 1); push(b, 2, a, 1); end
      for (int a = 0; a < WORDS; a++) begin push(b, 3, a, 1); push(b, 4, a, 1); end
      for (int a = WORDS-1; a >= 0; a--) begin push(b, 5, a, 0); push(b, 6, a, 0); end
      for (int a = WORDS-1; a >= 0; a--) begin push(b, 7, a, 0); push(b, 8, a, 0); end
      for (int a = 0; a < WORDS; a++) push(b, 9, a, 1);
    end
    check(n == TOTAL, "sequence length");

    cen = 0; ld = 1;
    @(negedge clk); @(negedge clk);
    ld = 0; cen = 1;
    for (int i = 0; i < TOTAL; i++) begin
      check(q == exp_q[i], $sformatf("q step %0d got %h exp %h", i, q, exp_q[i]));
      check(u_d == exp_up[i], $sformatf("u_d step %0d", i));
      check(cout == (i == TOTAL-1), $sformatf("cout step %0d", i));
      // hold test in the middle of the run
      if (i == 1000) begin
        cen = 0;
        @(negedge clk);
        check(q == exp_q[i] && !cout, "hold with cen low");
        cen = 1;
      end
      @(negedge clk);
    end
    // after the terminal step the count is back at its start value
    check(q == exp_q[0], "wrap to initial value after cout");
    repeat (37) @(negedge clk);
    ld = 1; @(negedge clk); ld = 0; cen = 0;
    check(q == exp_q[0], "ld reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (TOTAL + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
