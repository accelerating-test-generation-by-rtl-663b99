// output_interface_tb: programs random output slots, then checks the output
// vectors, the difference flag, the latched target (faulty outputs with the
// chosen bit inverted, unused slots zero) and the clamp force vectors against
// values computed in the testbench.
module output_interface_tb;
  import atpg_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic po_we, po_valid_in, latch, clamp, differ;
  logic [PO_W-1:0] po_idx, toggle_idx;
  net_idx_t po_net_in;
  logic [N_NETS-1:0] faulty_nets, good_nets, force0, force1;
  logic [N_PO-1:0] po_valid, faulty_po, good_po, target;
  int checks = 0, failures = 0;
  int nets_of [N_PO];
  bit val_of [N_PO];

  output_interface dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    po_we = 0; po_valid_in = 0; latch = 0; clamp = 0; po_idx = '0; toggle_idx = '0;
    po_net_in = '0; faulty_nets = '0; good_nets = '0;
    @(negedge clk); rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      // distinct nets for the slots
      for (int i = 0; i < N_PO; i++) begin
        nets_of[i] = (r * 3 + i * 9) % N_NETS;
        val_of[i]  = ($urandom % 4) != 0;
        @(negedge clk);
        po_we = 1; po_idx = PO_W'(i); po_valid_in = val_of[i]; po_net_in = net_idx_t'(nets_of[i]);
      end
      @(negedge clk); po_we = 0;
      for (int t = 0; t < 10; t++) begin
        logic [N_PO-1:0] ef, eg, ev, et;
        logic [N_NETS-1:0] e0, e1;
        faulty_nets = {$urandom, $urandom, $urandom};
        good_nets   = {$urandom, $urandom, $urandom};
        toggle_idx  = PO_W'($urandom);
        for (int i = 0; i < N_PO; i++) begin
          ev[i] = val_of[i];
          ef[i] = val_of[i] && faulty_nets[nets_of[i]];
          eg[i] = val_of[i] && good_nets[nets_of[i]];
        end
        #1;
        check(po_valid == ev && faulty_po == ef && good_po == eg, "output vectors");
        check(differ == (ef != eg), "difference flag");
        latch = 1; @(negedge clk); latch = 0;
        et = ef;
        et[toggle_idx] = !et[toggle_idx];
        et = et & ev;
        check(target == et, $sformatf("target %b expected %b", target, et));
        clamp = 0; #1;
        check(force0 == '0 && force1 == '0, "no force without clamp");
        clamp = 1;
        e0 = '0; e1 = '0;
        for (int i = 0; i < N_PO; i++)
          if (ev[i]) begin e1[nets_of[i]] = et[i]; e0[nets_of[i]] = !et[i]; end
        #1;
        check(force0 == e0 && force1 == e1, "clamp forces");
        clamp = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
