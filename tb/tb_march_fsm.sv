// tb_march_fsm: runs the bit-oriented March C- controller with its up/down
// counter on a 16 x 1 behavioural memory. Checks, every cycle, the phase,
// element, address, write/output enable levels and test data against a
// sequence built in the testbench from the element list; the 160-cycle test
// length (16 + 4 * 32 + 16); done; fail low on a good memory; and fail high
// for each injected fault kind.
module tb_march_fsm;
  import bist_pkg::*;
  localparam int ADDR_W = 4, DATA_W = 1, WORDS = 16;
  localparam int TOTAL = 10 * WORDS;

  logic clk = 0, reset;
  logic [ADDR_W-1:0] address;
  logic [DATA_W-1:0] data_out, data;
  logic wen, oen, u_d, cnt_en, done, fail;
  phase_t phase; element_t element;
  int kind; logic [ADDR_W-1:0] f_addr, a_addr; int f_bit, a_bit;
  int checks = 0, failures = 0;

  updown_counter #(.W(ADDR_W)) cnt (.clk, .reset, .en(cnt_en), .u_d, .count(address));
  march_fsm dut (.clk, .reset, .address, .data_out, .wen, .oen, .data, .u_d,
                 .cnt_en, .done, .fail, .phase, .element);
  fault_sram_model #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) mem (
    .clk, .cs(wen == 1'b1 || oen == 1'b0), .rwbar(wen != 1'b1), .addr(address),
    .din(data), .dout(data_out), .kind, .f_addr, .f_bit, .a_addr, .a_bit
  );
  always #5 clk = ~clk;

  // expected trace: phase, element, address, is_write, value
  int e_ph[TOTAL], e_el[TOTAL], e_ad[TOTAL], e_wr[TOTAL], e_v[TOTAL];
  int n;
  task automatic push(int ph, int el, int a, int wr, int v);
    e_ph[n] = ph; e_el[n] = el; e_ad[n] = a; e_wr[n] = wr; e_v[n] = v; n++;
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic do_reset();
    reset = 1; repeat (2) @(negedge clk); reset = 0;
    check(phase == PH_INIT && address == 4'hF && done == 1'b0, "init state");
    @(negedge clk);
  endtask

  initial begin
    n = 0;
    for (int a = WORDS-1; a >= 0; a--) push(1, 0, a, 1, 0);
    for (int a = 0; a < WORDS; a++) begin push(2, 0, a, 0, 0); push(2, 1, a, 1, 1); end
    for (int a = 0; a < WORDS; a++) begin push(3, 0, a, 0, 1); push(3, 1, a, 1, 0); end
    for (int a = WORDS-1; a >= 0; a--) begin push(4, 0, a, 0, 0); push(4, 1, a, 1, 1); end
    for (int a = WORDS-1; a >= 0; a--) begin push(5, 0, a, 0, 1); push(5, 1, a, 1, 0); end
    for (int a = 0; a < WORDS; a++) push(6, 0, a, 0, 0);

    kind = 0; f_addr = 0; a_addr = 0; f_bit = 0; a_bit = 0;
    do_reset();
    for (int i = 0; i < TOTAL; i++) begin
      check(int'(phase) == e_ph[i] && int'(element) == e_el[i] && int'(address) == e_ad[i],
            $sformatf("step %0d: phase %0d ele %0d addr %0d, exp %0d %0d %0d",
                      i, phase, element, address, e_ph[i], e_el[i], e_ad[i]));
      check(wen == (e_wr[i] == 1) && oen == (e_wr[i] == 1), $sformatf("step %0d enables", i));
      check(data == DATA_W'(e_v[i]), $sformatf("step %0d data", i));
      check(done == 1'b0, "done early");
      @(negedge clk);
    end
    check(phase == PH_FINAL && done == 1'b1, "done after 160 cycles");
    check(fail == 1'b0, "fail on a good memory");
    repeat (5) @(negedge clk);
    check(done == 1'b1 && wen == 1'b0 && oen == 1'b1, "stays done, memory idle");

    for (int k = 1; k <= 7; k++) begin
      for (int trial = 0; trial < 3; trial++) begin
        kind = k; f_addr = ADDR_W'($urandom);
        do a_addr = ADDR_W'($urandom); while (a_addr == f_addr);
        do_reset();
        while (done != 1'b1) @(negedge clk);
        check(fail == 1'b1, $sformatf("fault kind %0d at %0d (aggressor %0d) not detected", k, f_addr, a_addr));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30 * TOTAL) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
