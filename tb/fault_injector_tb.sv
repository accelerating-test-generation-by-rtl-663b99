// fault_injector_tb: injects random faults and checks that exactly the faulty
// net is forced, to the stuck value, from the clock edge after inject until
// the edge after clear, and that inject is ignored while clear is high.
module fault_injector_tb;
  import atpg_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0, inject, clear, active;
  fault_t fault_in, fault_q;
  logic [N_NETS-1:0] force0, force1;
  int checks = 0, failures = 0;

  fault_injector dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inject = 0; clear = 0; fault_in = '0;
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(!active && force0 == '0 && force1 == '0, "idle after reset");
    for (int t = 0; t < 100; t++) begin
      fault_t f;
      logic [N_NETS-1:0] e0, e1;
      f.net = net_idx_t'($urandom % N_NETS);
      f.stuck = 1'($urandom);
      fault_in = f; inject = 1;
      #1 check(force0 == '0 && force1 == '0, "no force before the edge");
      @(negedge clk); inject = 0; fault_in = '0;
      e0 = '0; e1 = '0;
      if (f.stuck) e1[f.net] = 1'b1; else e0[f.net] = 1'b1;
      check(active && fault_q == f, "fault held");
      check(force0 == e0 && force1 == e1, $sformatf("one-hot force for net %0d", f.net));
      @(negedge clk);
      check(force0 == e0 && force1 == e1, "force persists");
      clear = 1; inject = 1; fault_in = '{net: '0, stuck: 1'b1};
      @(negedge clk); clear = 0; inject = 0;
      check(!active && force0 == '0 && force1 == '0, "cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
