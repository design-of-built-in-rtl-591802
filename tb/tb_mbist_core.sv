// tb_mbist_core: runs the word-oriented MBIST against a behavioural memory,
// first fault free and then with one injected fault of each kind (stuck-at 0
// and 1, up and down transition, inversion and idempotent coupling, address
// decoder) at random cells. Checks: a fault-free run never mismatches, takes
// exactly 10 * 64 * 8 = 5120 test cycles with 2560 checked reads and one cout;
// every faulty run mismatches at least once. Also checks the normal-mode path
// through the multiplexers before and after a test.
module tb_mbist_core;
  localparam int ADDR_W = 6, DATA_W = 8;
  localparam int TEST_CYCLES = 10 * (2**ADDR_W) * DATA_W;

  logic clk = 0, rst, start, rwbarin, csin;
  logic [ADDR_W-1:0] address, mem_addr;
  logic [DATA_W-1:0] datain, mem_din, ramout;
  logic mem_rwbar, mem_cs, NbarT, cout, eq, rd_chk;
  int kind; logic [ADDR_W-1:0] f_addr, a_addr; int f_bit, a_bit;
  int checks = 0, failures = 0;

  mbist_core dut (.*);
  fault_sram_model #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) mem (
    .clk, .cs(mem_cs), .rwbar(mem_rwbar), .addr(mem_addr), .din(mem_din),
    .dout(ramout), .kind, .f_addr, .f_bit, .a_addr, .a_bit
  );
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Runs one complete test; returns cycles, reads and mismatches.
  task automatic run_test(output int cycles, output int reads, output int bad, output int couts);
    cycles = 0; reads = 0; bad = 0; couts = 0;
    start = 1; @(negedge clk); start = 0;
    while (NbarT) begin
      cycles++;
      if (rd_chk) begin reads++; if (!eq) bad++; end
      if (cout) couts++;
      @(negedge clk);
    end
  endtask

  task automatic normal_mode_check();
    // write then read back two words through the normal-mode path
    csin = 1; rwbarin = 0; address = 6'd5; datain = 8'hA5; @(negedge clk);
    address = 6'd6; datain = 8'h3C; @(negedge clk);
    rwbarin = 1; address = 6'd5; #1;
    check(ramout == 8'hA5 && mem_addr == 6'd5 && mem_cs && mem_rwbar, "normal read 5");
    address = 6'd6; #1;
    check(ramout == 8'h3C, "normal read 6");
    csin = 0; rwbarin = 0; address = 6'd5; datain = 8'hFF; @(negedge clk);
    rwbarin = 1; #1;
    check(ramout == 8'hA5, "no write with cs low");
  endtask

  initial begin
    int cycles, reads, bad, couts;
    kind = 0; f_addr = 0; a_addr = 0; f_bit = 0; a_bit = 0;
    rst = 1; start = 0; csin = 0; rwbarin = 1; address = '0; datain = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    check(!NbarT, "normal mode after reset");
    normal_mode_check();

    run_test(cycles, reads, bad, couts);
    $display("fault-free: %0d cycles, %0d reads, %0d mismatches", cycles, reads, bad);
    check(cycles == TEST_CYCLES, $sformatf("test length %0d", cycles));
    check(reads == TEST_CYCLES / 2, $sformatf("read count %0d", reads));
    check(bad == 0, "fault-free run mismatched");
    check(couts == 1, "one cout");
    check(!NbarT, "back in normal mode");
    // after the test every word holds 0 (last element writes 0s)
    rwbarin = 1; csin = 1;
    for (int a = 0; a < 2**ADDR_W; a++) begin
      address = ADDR_W'(a); #1;
      check(ramout == '0, $sformatf("word %0d zero after test", a));
    end
    normal_mode_check();

    for (int k = 1; k <= 7; k++) begin
      for (int trial = 0; trial < 3; trial++) begin
        kind = k;
        f_addr = ADDR_W'($urandom); f_bit = $urandom % DATA_W;
        do begin
          a_addr = ADDR_W'($urandom); a_bit = (k == 7) ? 0 : $urandom % DATA_W;
        end while (a_addr == f_addr);
        run_test(cycles, reads, bad, couts);
        check(cycles == TEST_CYCLES, "faulty run length");
        check(bad > 0, $sformatf("fault kind %0d at %0d.%0d (aggressor %0d.%0d) not detected",
                                 k, f_addr, f_bit, a_addr, a_bit));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30 * TEST_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
