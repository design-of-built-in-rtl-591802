// tb_bist_top: end-to-end test of both BIST engines at their default sizes
// (64 x 8 word-oriented MBIST, 16 x 1 bit-oriented BIST).
//
// Word-oriented engine: normal-mode writes and reads; a full March C- run on
// the good memory (5120 test cycles, 2560 checked reads, eq always high, one
// cout, memory all zero afterwards); normal mode again; then a second run in
// which the testbench corrupts one memory bit after M1 has written it, which
// the following M2 read must flag with eq low.
// Bit-oriented engine: a run on the good memory (160 cycles, all six phases,
// done, no fail), then a run with a corrupted cell that must end in fail.
// Counts how often each mechanism happened: normal write/read, mode switch,
// each March element, each bit position, ascending and descending sweeps,
// read/write address holds, cout, mismatch detection, every phase of the
// bit-oriented engine; a mechanism that never happened is a failure.
module tb_bist_top;
  import bist_pkg::*;
  localparam int ADDR_W = 6, DATA_W = 8, WORDS = 64;
  localparam int TEST_CYCLES = 10 * WORDS * DATA_W;
  localparam int BO_CYCLES = 10 * 16;

  logic clk = 0, rst, start, rwbarin, csin, bo_reset;
  logic [ADDR_W-1:0] address;
  logic [DATA_W-1:0] datain, dataout;
  logic NbarT, cout, eq, rd_chk;
  logic bo_done, bo_fail, bo_wen, bo_oen, bo_element;
  logic [3:0] bo_address; logic [0:0] bo_data; logic [2:0] bo_phase;
  int checks = 0, failures = 0;

  bist_top dut (.*);
  always #5 clk = ~clk;

  // mechanism counters
  int n_nwrite = 0, n_nread = 0, n_switch = 0, n_cout = 0, n_mismatch = 0;
  int n_up = 0, n_dn = 0, n_hold = 0, n_bo_fail = 0, n_bo_done = 0;
  int n_elem[6], n_bit[8], n_phase[8];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // mechanism monitors
  logic [12:0] q_prev; logic nbart_prev = 0;
  always @(negedge clk) begin
    logic [12:0] q;
    q = dut.u_mbist.q;
    if (NbarT && !nbart_prev) n_switch++;
    if (!NbarT && csin && !rwbarin) n_nwrite++;
    if (!NbarT && csin && rwbarin) n_nread++;
    if (NbarT) begin
      n_elem[op_element(q[9:6])]++;
      n_bit[q[12:10]]++;
      if (dut.u_mbist.u_cnt.u_d) n_up++; else n_dn++;
      if (nbart_prev && q[5:0] == q_prev[5:0] && q[9:6] != q_prev[9:6]) n_hold++;
      if (cout) n_cout++;
      if (rd_chk && !eq) n_mismatch++;
    end
    if (!bo_reset) n_phase[bo_phase]++;
    q_prev = q; nbart_prev = NbarT;
  end

  task automatic normal_write(int a, logic [7:0] d);
    csin = 1; rwbarin = 0; address = ADDR_W'(a); datain = d; @(negedge clk);
    csin = 0; rwbarin = 1;
  endtask

  task automatic normal_read(int a, logic [7:0] d, string what);
    csin = 1; rwbarin = 1; address = ADDR_W'(a); #1;
    check(dataout == d, $sformatf("%s: word %0d = %h, exp %h", what, a, dataout, d));
    @(negedge clk); csin = 0;
  endtask

  // one MBIST run; corrupt: clear bit fb of word fa once M1 has written it
  task automatic mbist_run(bit corrupt, int fa, int fb,
                           output int cycles, output int reads, output int bad);
    bit done_corrupt;
    cycles = 0; reads = 0; bad = 0; done_corrupt = 0;
    start = 1; @(negedge clk); start = 0;
    while (NbarT) begin
      cycles++;
      if (rd_chk) begin reads++; if (!eq) bad++; end
      if (corrupt && !done_corrupt && dut.u_mbist.q[12:10] == 3'(fb) &&
          dut.u_mbist.q[9:6] == 4'd3) begin
        dut.u_mem.mem[fa][fb] = 1'b0;   // M2 has begun: disturb a written 1
        done_corrupt = 1;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    int cycles, reads, bad;
    logic [7:0] pat [WORDS];
    rst = 1; start = 0; csin = 0; rwbarin = 1; address = '0; datain = '0; bo_reset = 1;
    repeat (2) @(negedge clk);
    rst = 0;

    // ---- word-oriented engine ------------------------------------------
    check(!NbarT, "normal mode after reset");
    for (int a = 0; a < WORDS; a++) begin pat[a] = 8'($urandom); normal_write(a, pat[a]); end
    for (int a = 0; a < WORDS; a++) normal_read(a, pat[a], "normal mode");

    mbist_run(0, 0, 0, cycles, reads, bad);
    $display("MBIST good memory: %0d cycles, %0d reads, %0d mismatches", cycles, reads, bad);
    check(cycles == TEST_CYCLES, $sformatf("MBIST length %0d, exp %0d", cycles, TEST_CYCLES));
    check(reads == TEST_CYCLES / 2, "MBIST read count");
    check(bad == 0, "mismatch on a good memory");
    check(!NbarT, "back to normal mode");
    for (int a = 0; a < WORDS; a++) normal_read(a, 8'h00, "after test");
    normal_write(9, 8'h5A);
    normal_read(9, 8'h5A, "normal mode after test");

    mbist_run(1, 17, 5, cycles, reads, bad);
    $display("MBIST disturbed memory: %0d mismatches", bad);
    check(bad > 0, "disturbed cell not detected");

    // ---- bit-oriented engine -------------------------------------------
    @(negedge clk); bo_reset = 0;
    cycles = 0;
    while (bo_done != 1'b1 && cycles < 1000) begin @(negedge clk); cycles++; end
    n_bo_done++;
    @(negedge clk);
    $display("bit-oriented BIST: done after %0d cycles, fail %b", cycles, bo_fail);
    check(cycles == BO_CYCLES + 1, $sformatf("bit-oriented length %0d (init + %0d)", cycles, BO_CYCLES));
    check(bo_fail == 1'b0, "bit-oriented fail on a good memory");

    bo_reset = 1; @(negedge clk); bo_reset = 0;
    cycles = 0;
    while (bo_done != 1'b1 && cycles < 1000) begin
      if (bo_phase == 3'd3 && bo_element == 1'b0 && bo_address == 4'd0)
        dut.u_bo_mem.mem[7] = 1'b0;    // disturb a cell that M1 set to 1
      @(negedge clk); cycles++;
    end
    @(negedge clk);
    if (bo_fail) n_bo_fail++;
    check(bo_fail == 1'b1, "bit-oriented engine missed a disturbed cell");

    // ---- mechanisms ------------------------------------------------------
    check(n_nwrite > 0, "normal write never happened");
    check(n_nread > 0, "normal read never happened");
    check(n_switch == 2, "mode switches");
    check(n_cout == 2, "cout count");
    check(n_mismatch > 0, "mismatch never flagged");
    check(n_up > 0 && n_dn > 0, "both sweep directions");
    check(n_hold > 0, "address hold never happened");
    for (int e = 0; e < 6; e++) check(n_elem[e] > 0, $sformatf("element M%0d never ran", e));
    for (int b = 0; b < 8; b++) check(n_bit[b] > 0, $sformatf("bit %0d never tested", b));
    for (int p = 0; p < 8; p++) check(n_phase[p] > 0, $sformatf("phase %0d never reached", p));
    check(n_bo_done > 0 && n_bo_fail > 0, "bit-oriented done/fail");
    $display("mechanisms: normal writes %0d reads %0d, mode switches %0d, cout %0d, mismatches %0d",
             n_nwrite, n_nread, n_switch, n_cout, n_mismatch);
    $display("  up %0d down %0d holds %0d, elements %p, bits %p, bo phases %p",
             n_up, n_dn, n_hold, n_elem, n_bit, n_phase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * TEST_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
