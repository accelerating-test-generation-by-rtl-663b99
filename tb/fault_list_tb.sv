// fault_list_tb: writes random faults to every entry, reads them back in a
// different order, and checks that a write lands only on its own entry.
module fault_list_tb;
  import atpg_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we;
  logic [FAULT_AW-1:0] wr_addr, rd_addr;
  fault_t wr_fault, rd_fault;
  fault_t model [MAX_FAULTS];
  int checks = 0, failures = 0;

  fault_list dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wr_addr = '0; rd_addr = '0; wr_fault = '0;
    for (int a = 0; a < MAX_FAULTS; a++) begin
      @(negedge clk);
      model[a] = '{net: net_idx_t'($urandom % N_NETS), stuck: 1'($urandom)};
      we = 1; wr_addr = FAULT_AW'(a); wr_fault = model[a];
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < MAX_FAULTS; k++) begin
      rd_addr = FAULT_AW'((k * 37 + 11) % MAX_FAULTS);
      #1; checks++;
      if (rd_fault != model[rd_addr]) begin failures++; $display("FAIL entry %0d", rd_addr); end
    end
    for (int k = 0; k < 200; k++) begin
      int a;
      a = $urandom % MAX_FAULTS;
      @(negedge clk);
      model[a] = '{net: net_idx_t'($urandom % N_NETS), stuck: 1'($urandom)};
      we = 1; wr_addr = FAULT_AW'(a); wr_fault = model[a];
      @(negedge clk); we = 0;
      rd_addr = FAULT_AW'(a); #1; checks++;
      if (rd_fault != model[a]) begin failures++; $display("FAIL rewrite %0d", a); end
      rd_addr = FAULT_AW'((a + 1) % MAX_FAULTS); #1; checks++;
      if (rd_fault != model[rd_addr]) begin failures++; $display("FAIL neighbour %0d", rd_addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
