// atpg_random_tb: runs the emulator on a random NAND circuit that fills all
// N_GATES cells of the arrays, at the default parameters.
//
// The circuit has 10 primary inputs; gate g reads two different nets chosen
// among the inputs and the outputs of gates before it, and the last N_PO
// gates are the primary outputs. The fault list holds both stuck values of
// every input and gate net. The testbench decides for each fault, by
// exhaustive simulation of all 1024 input vectors, whether it is testable at
// all. It then checks that every vector the emulator reports detects its
// fault, that no untestable fault gets a test, and that at least
// MIN_FOUND_PCT percent of the testable faults get one (the search is
// heuristic and bounded, so some testable faults may be aborted).
module atpg_random_tb;
  import atpg_pkg::*;

  localparam int NI = 10;
  localparam int NF = 2 * (NI + N_GATES);
  localparam int MIN_FOUND_PCT = 50;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  int ga [N_GATES];
  int gb [N_GATES];
  int fnets [NF];
  logic fvals [NF];
  bit testable [NF];

  logic                      gate_we, po_we, fault_we, po_valid_in, start;
  logic [$clog2(N_GATES)-1:0] gate_idx;
  gate_cfg_t                 gate_cfg;
  logic [PO_W-1:0]           po_idx;
  net_idx_t                  po_net;
  logic [FAULT_AW-1:0]       fault_addr, res_addr;
  fault_t                    fault_in, fault_now;
  logic [FAULT_AW:0]         n_faults;
  logic busy, done, po_differ, fault_active;
  result_t res;
  logic [15:0] n_tests, n_aborts, n_rounds, n_perturbs, n_toggles;
  logic [N_PI-1:0] pi_now;
  logic [N_PO-1:0] faulty_po, good_po, po_target;

  atpg_emulator u_dut (.*);

  function automatic logic [N_PO-1:0] ref_po(input logic [NI-1:0] pi, input bit fen,
                                             input int fnet, input logic fval);
    logic [N_NETS-1:0] v;
    logic [N_PO-1:0] o;
    v = '0;
    for (int i = 0; i < NI; i++) v[i] = pi[i];
    if (fen && fnet < N_PI) v[fnet] = fval;
    for (int g = 0; g < N_GATES; g++) begin
      v[N_PI+g] = ~(v[ga[g]] & v[gb[g]]);
      if (fen && fnet == N_PI+g) v[N_PI+g] = fval;
    end
    for (int i = 0; i < N_PO; i++) o[i] = v[N_PI + N_GATES - N_PO + i];
    return o;
  endfunction

  function automatic int pick(input int g);
    int r;
    r = int'($urandom % (NI + g));
    return (r < NI) ? r : N_PI + (r - NI);
  endfunction

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, found, n_testable, found_testable;
    void'($urandom(1234));
    gate_we = 0; po_we = 0; fault_we = 0; start = 0; po_valid_in = 0;
    gate_idx = '0; gate_cfg = '0; po_idx = '0; po_net = '0;
    fault_addr = '0; fault_in = '0; n_faults = '0; res_addr = '0;
    // random netlist; prefer recent gates so the circuit is deep
    for (int g = 0; g < N_GATES; g++) begin
      ga[g] = pick(g);
      do gb[g] = pick(g); while (gb[g] == ga[g]);
      if (g >= 4 && ($urandom % 2)) ga[g] = N_PI + g - 1 - int'($urandom % 4);
      if (ga[g] == gb[g]) gb[g] = (ga[g] == 0) ? 1 : 0;
    end
    for (int k = 0; k < NF; k++) begin
      fnets[k] = (k / 2 < NI) ? k / 2 : N_PI + (k / 2 - NI);
      fvals[k] = k[0];
    end
    // exhaustive testability
    n_testable = 0;
    for (int k = 0; k < NF; k++) begin
      testable[k] = 1'b0;
      for (int p = 0; p < (1 << NI) && !testable[k]; p++)
        if (ref_po(NI'(p), 1'b0, 0, 1'b0) != ref_po(NI'(p), 1'b1, fnets[k], fvals[k]))
          testable[k] = 1'b1;
      if (testable[k]) n_testable++;
    end
    $display("%0d faults, %0d testable", NF, n_testable);

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int g = 0; g < N_GATES; g++) begin
      gate_we <= 1; gate_idx <= g[$clog2(N_GATES)-1:0];
      gate_cfg <= '{valid: 1'b1, a: net_idx_t'(ga[g]), b: net_idx_t'(gb[g])};
      @(posedge clk);
    end
    gate_we <= 0;
    for (int i = 0; i < N_PO; i++) begin
      po_we <= 1; po_idx <= i[PO_W-1:0]; po_valid_in <= 1;
      po_net <= net_idx_t'(N_PI + N_GATES - N_PO + i);
      @(posedge clk);
    end
    po_we <= 0;
    for (int k = 0; k < NF; k++) begin
      fault_we <= 1; fault_addr <= k[FAULT_AW-1:0];
      fault_in <= '{net: net_idx_t'(fnets[k]), stuck: fvals[k]};
      @(posedge clk);
    end
    fault_we <= 0;
    n_faults <= (FAULT_AW+1)'(NF);
    start <= 1;
    @(posedge clk);
    start <= 0;
    cycles = 0;
    while (!done) begin
      @(posedge clk);
      cycles++;
    end
    $display("run took %0d cycles", cycles);

    found = 0; found_testable = 0;
    for (int k = 0; k < NF; k++) begin
      res_addr = k[FAULT_AW-1:0];
      #1;
      checks++;
      if (res.status == RES_TEST) begin
        found++;
        if (ref_po(res.pi[NI-1:0], 1'b0, 0, 1'b0) ==
            ref_po(res.pi[NI-1:0], 1'b1, fnets[k], fvals[k])) begin
          failures++;
          $display("fault %0d (net %0d s-a-%0d): vector does not detect it", k, fnets[k], fvals[k]);
        end
        if (!testable[k]) begin
          failures++;
          $display("fault %0d untestable but reported as tested", k);
        end else found_testable++;
      end else if (res.status != RES_ABORT) begin
        failures++;
        $display("fault %0d not processed", k);
      end
    end
    checks++;
    if (int'(n_tests) != found || int'(n_tests) + int'(n_aborts) != NF) begin
      failures++;
      $display("counters tests=%0d aborts=%0d, store has %0d tests", n_tests, n_aborts, found);
    end
    checks++;
    if (found_testable * 100 < MIN_FOUND_PCT * n_testable) begin
      failures++;
      $display("only %0d of %0d testable faults got a test", found_testable, n_testable);
    end
    $display("tests=%0d of %0d testable, aborts=%0d rounds=%0d perturbs=%0d toggles=%0d",
             found_testable, n_testable, n_aborts, n_rounds, n_perturbs, n_toggles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
