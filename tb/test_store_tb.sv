// test_store_tb: writes random faults to every entry, reads them back in a
// different order, and checks that a write lands only on its own entry.
module test_store_tb;
  import atpg_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we;
  logic [FAULT_AW-1:0] wr_addr, rd_addr;
  result_t wr_result, rd_result;
  result_t model [MAX_FAULTS];
  int checks = 0, failures = 0;

  test_store dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wr_addr = '0; rd_addr = '0; wr_result = '0;
    for (int a = 0; a < MAX_FAULTS; a++) begin
      @(negedge clk);
      model[a] = '{status: result_e'($urandom % 3), pi: N_PI'($urandom)};
      we = 1; wr_addr = FAULT_AW'(a); wr_result = model[a];
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < MAX_FAULTS; k++) begin
      rd_addr = FAULT_AW'((k * 37 + 11) % MAX_FAULTS);
      #1; checks++;
      if (rd_result != model[rd_addr]) begin failures++; $display("FAIL entry %0d", rd_addr); end
    end
    for (int k = 0; k < 200; k++) begin
      int a;
      a = $urandom % MAX_FAULTS;
      @(negedge clk);
      model[a] = '{status: result_e'($urandom % 3), pi: N_PI'($urandom)};
      we = 1; wr_addr = FAULT_AW'(a); wr_result = model[a];
      @(negedge clk); we = 0;
      rd_addr = FAULT_AW'(a); #1; checks++;
      if (rd_result != model[a]) begin failures++; $display("FAIL rewrite %0d", a); end
      rd_addr = FAULT_AW'((a + 1) % MAX_FAULTS); #1; checks++;
      if (rd_result != model[rd_addr]) begin failures++; $display("FAIL neighbour %0d", rd_addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
