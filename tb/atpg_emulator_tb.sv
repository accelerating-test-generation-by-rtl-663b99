// atpg_emulator_tb: end-to-end test of the emulator on the ISCAS-85 c17
// benchmark (six 2-input NAND gates, 5 inputs, 2 outputs).
//
// The testbench programs the netlist into both arrays, names the two outputs,
// loads all 22 single stuck-at faults of the 11 nets and runs the generator
// with the default parameters. Every vector reported as a test is re-checked
// by an independent gate-level evaluation of the good and the faulty circuit
// in the testbench; c17 has no redundant fault, so every fault must get a
// test. It also requires that each mechanism of the loop was used at least
// once: repeated propagate/justify rounds (inputs changed), random restarts,
// toggled-bit moves, saved tests. Whether a fault was injected is checked on
// the fault_now / fault_active outputs while the run is busy, and the
// difference flag must be seen high during justification.
module atpg_emulator_tb;
  import atpg_pkg::*;

  localparam int NG = 6;
  localparam int NI = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // c17 netlist: gate g drives net N_PI+g
  int ga [NG] = '{0, 2, 1, N_PI+1, N_PI+0, N_PI+2};
  int gb [NG] = '{2, 3, N_PI+1, 4, N_PI+2, N_PI+3};
  int po [2]  = '{N_PI+4, N_PI+5};

  // DUT signals, shared by both instances
  logic                      gate_we, po_we, fault_we, po_valid_in;
  logic [$clog2(N_GATES)-1:0] gate_idx;
  gate_cfg_t                 gate_cfg;
  logic [PO_W-1:0]           po_idx;
  net_idx_t                  po_net;
  logic [FAULT_AW-1:0]       fault_addr, res_addr;
  fault_t                    fault_in;
  logic [FAULT_AW:0]         n_faults;
  logic                      start;

  logic busy [2], done [2], differ [2], fact [2];
  result_t res [2];
  logic [15:0] n_tests [2], n_aborts [2], n_rounds [2], n_perturbs [2], n_toggles [2];
  logic [N_PI-1:0] pi_now [2];
  logic [N_PO-1:0] fpo [2], gpo [2], tgt [2];
  fault_t fnow [2];

  // index 0 is the emulator with default parameters (arrays kept for
  // the result loop below)
  atpg_emulator u_dut (
    .clk, .rst_n, .gate_we, .gate_idx, .gate_cfg, .po_we, .po_idx, .po_valid_in, .po_net,
    .fault_we, .fault_addr, .fault_in, .n_faults, .start,
    .busy(busy[0]), .done(done[0]), .res_addr, .res(res[0]),
    .n_tests(n_tests[0]), .n_aborts(n_aborts[0]), .n_rounds(n_rounds[0]),
    .n_perturbs(n_perturbs[0]), .n_toggles(n_toggles[0]),
    .pi_now(pi_now[0]), .faulty_po(fpo[0]), .good_po(gpo[0]), .po_target(tgt[0]),
    .po_differ(differ[0]), .fault_now(fnow[0]), .fault_active(fact[0])
  );

  // Reference: evaluate c17 with an optional stuck-at net
  function automatic logic [1:0] ref_po(input logic [NI-1:0] pi, input bit fen,
                                        input int fnet, input logic fval);
    logic v [N_NETS];
    for (int n = 0; n < N_NETS; n++) v[n] = 1'b0;
    for (int i = 0; i < NI; i++) v[i] = pi[i];
    if (fen && fnet < N_PI) v[fnet] = fval;
    for (int g = 0; g < NG; g++) begin
      v[N_PI+g] = ~(v[ga[g]] & v[gb[g]]);
      if (fen && fnet == N_PI+g) v[N_PI+g] = fval;
    end
    return {v[po[1]], v[po[0]]};
  endfunction

  int fnets [22];
  int injections = 0, wrong_inject = 0, differ_cycles = 0;
  logic fact_d = 1'b0;
  always @(posedge clk) begin
    if (rst_n && busy[0]) begin
      if (fact[0] && !fact_d) begin
        injections++;
        if (int'(fnow[0].net) != fnets[injections-1] || fnow[0].stuck != fvals[injections-1])
          wrong_inject++;
      end
      if (differ[0]) differ_cycles++;
    end
    fact_d <= fact[0];
  end
  logic fvals [22];
  int cycles;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gate_we = 0; po_we = 0; fault_we = 0; start = 0; po_valid_in = 0;
    gate_idx = '0; gate_cfg = '0; po_idx = '0; po_net = '0;
    fault_addr = '0; fault_in = '0; n_faults = '0; res_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // program gates
    for (int g = 0; g < NG; g++) begin
      gate_we <= 1; gate_idx <= g[$clog2(N_GATES)-1:0];
      gate_cfg <= '{valid: 1'b1, a: net_idx_t'(ga[g]), b: net_idx_t'(gb[g])};
      @(posedge clk);
    end
    gate_we <= 0;
    for (int i = 0; i < 2; i++) begin
      po_we <= 1; po_idx <= i[PO_W-1:0]; po_valid_in <= 1; po_net <= net_idx_t'(po[i]);
      @(posedge clk);
    end
    po_we <= 0;
    // fault list: both stuck values on every used net
    for (int k = 0; k < 22; k++) begin
      int n;
      n = (k / 2 < NI) ? k / 2 : N_PI + (k / 2 - NI);
      fnets[k] = n; fvals[k] = k[0];
      fault_we <= 1; fault_addr <= k[FAULT_AW-1:0];
      fault_in <= '{net: net_idx_t'(n), stuck: k[0]};
      @(posedge clk);
    end
    fault_we <= 0;
    n_faults <= 22;
    start <= 1;
    @(posedge clk);
    start <= 0;
    cycles = 0;
    while (!done[0]) begin
      @(posedge clk);
      cycles++;
    end
    $display("run took %0d cycles", cycles);

    for (int d = 0; d < 1; d++) begin
      int found;
      found = 0;
      for (int k = 0; k < 22; k++) begin
        logic [1:0] gp, fp;
        res_addr = k[FAULT_AW-1:0];
        #1;
        checks++;
        if (res[d].status == RES_TEST) begin
          found++;
          gp = ref_po(res[d].pi[NI-1:0], 1'b0, 0, 1'b0);
          fp = ref_po(res[d].pi[NI-1:0], 1'b1, fnets[k], fvals[k]);
          if (gp == fp) begin
            failures++;
            $display("inst %0d fault %0d (net %0d s-a-%0d): vector %b does not detect it",
                     d, k, fnets[k], fvals[k], res[d].pi[NI-1:0]);
          end
        end else if (d == 0) begin
          failures++;
          $display("inst 0 fault %0d (net %0d s-a-%0d): no test (status %s)",
                   k, fnets[k], fvals[k], res[d].status.name());
        end
      end
      checks++;
      if (int'(n_tests[d]) != found || int'(n_tests[d]) + int'(n_aborts[d]) != 22) begin
        failures++;
        $display("inst %0d: counters tests=%0d aborts=%0d, store has %0d tests",
                 d, n_tests[d], n_aborts[d], found);
      end
      $display("inst %0d: tests=%0d aborts=%0d rounds=%0d perturbs=%0d toggles=%0d",
               d, n_tests[d], n_aborts[d], n_rounds[d], n_perturbs[d], n_toggles[d]);
    end
    // mechanism coverage
    checks++; if (n_rounds[0] == 0)   begin failures++; $display("no repeated round"); end
    checks++; if (n_perturbs[0] == 0) begin failures++; $display("no perturbation"); end
    checks++; if (n_toggles[0] == 0)  begin failures++; $display("no toggle move"); end
    checks++; if (injections != 22 || wrong_inject != 0) begin
      failures++; $display("injections %0d, wrong %0d", injections, wrong_inject); end
    checks++; if (differ_cycles == 0) begin failures++; $display("outputs never differed"); end
    checks++; if (n_tests[0] == 0)    begin failures++; $display("no test found"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
