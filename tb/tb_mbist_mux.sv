// tb_mbist_mux: random stimulus on all inputs of the memory multiplexers;
// the expected memory inputs are worked out in the testbench from the select
// rules (NbarT picks normal or BIST side, cen picks q[6] or read).
module tb_mbist_mux;
  logic NbarT, cen, rwbarin, csin, q_op0;
  logic [5:0] address, q_addr, mem_addr;
  logic [7:0] datain, data_t, mem_din;
  logic mem_rwbar, mem_cs;
  int checks = 0, failures = 0;

  mbist_mux dut (.*);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [5:0] ea; logic [7:0] ed; logic er, ec;
      {NbarT, cen, rwbarin, csin, q_op0} = 5'($urandom);
      address = 6'($urandom); q_addr = 6'($urandom);
      datain = 8'($urandom); data_t = 8'($urandom);
      #1;
      if (NbarT) begin
        ea = q_addr; ed = data_t; ec = 1'b1;
        er = cen ? q_op0 : 1'b1;
      end else begin
        ea = address; ed = datain; ec = csin; er = rwbarin;
      end
      checks++;
      if (mem_addr !== ea || mem_din !== ed || mem_rwbar !== er || mem_cs !== ec) begin
        failures++;
        if (failures < 10) $display("FAIL iteration %0d", i);
      end
    end
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
