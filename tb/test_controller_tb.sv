// test_controller_tb: runs the controller against a behavioural model of the
// two arrays and checks the loop of the flow chart.
//
// Fault 0: justification is stable with unchanged inputs -> a test is saved.
// Fault 1: the first justification changes the inputs (to 5) -> one more
//          propagate/justify round, then a test with inputs 5.
// Fault 2: justification never becomes stable -> MAX_RESTARTS perturbations
//          per attempt, the toggled output bit moves over the valid outputs
//          (0, 2, 5, 0, ...) and the fault is aborted after MAX_ITER attempts.
// The model's faulty circuit needs 3 cycles to settle; every propagation must
// wait for it. Counters, store writes, the zeroing of the inputs at each
// injection and the end of the run are checked.
module test_controller_tb;
  import atpg_pkg::*;
  localparam int SM = 8, MR = 2, MI = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0, start;
  logic [FAULT_AW:0] n_faults;
  logic [N_PO-1:0] po_valid;
  logic faulty_stable, good_stable;
  logic [N_PI-1:0] good_pi;
  logic [FAULT_AW-1:0] fault_addr, st_addr;
  logic inject, clear_fault, f_run, f_pi_load, g_run, g_fwd, g_perturb, g_pi_zero;
  logic if_latch, if_clamp, st_we, busy, done;
  logic [PO_W-1:0] toggle_idx;
  result_t st_result;
  logic [15:0] n_tests, n_aborts, n_rounds, n_perturbs, n_toggles;
  int checks = 0, failures = 0;

  test_controller #(.SETTLE_MAX(SM), .MAX_RESTARTS(MR), .MAX_ITER(MI)) dut (.*);

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

  // behavioural arrays
  int prop_cycles, short_props, runs_in_fault, zeroed;
  bit changed_once;
  result_t stored [3];
  bit written [3];
  int toggles_seen [$];
  logic [PO_W-1:0] last_toggle;

  always_ff @(posedge clk) begin
    if (f_run) prop_cycles <= prop_cycles + 1; else prop_cycles <= 0;
    if (g_pi_zero) begin good_pi <= '0; changed_once <= 1'b0; zeroed <= zeroed + 1; end
    else if (g_run && !g_fwd && fault_addr == 1 && !changed_once) begin
      good_pi <= N_PI'(5); changed_once <= 1'b1;
    end
    if (rst_n && f_run && !(f_pi_load && g_fwd && g_run)) short_props <= short_props + 1;
    if (rst_n && if_latch && prop_cycles < 3) short_props <= short_props + 1;
    if (st_we) begin stored[st_addr] <= st_result; written[st_addr] <= 1'b1; end
    if (if_latch && fault_addr == 2) toggles_seen.push_back(int'(toggle_idx));
  end
  assign faulty_stable = (prop_cycles >= 3);
  assign good_stable   = g_fwd ? (prop_cycles >= 2) : (fault_addr != 2);

  initial begin
    start = 0; n_faults = 3; po_valid = 8'b0010_0101;
    good_pi = N_PI'(9); prop_cycles = 0; short_props = 0; zeroed = 0; changed_once = 0;
    written = '{default: 1'b0};
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    start = 1; @(negedge clk); start = 0;
    check(busy, "busy after start");
    while (!done) @(negedge clk);
    check(!busy, "not busy when done");
    check(written[0] && stored[0].status == RES_TEST && stored[0].pi == '0,
          "fault 0: test with zero inputs");
    check(written[1] && stored[1].status == RES_TEST && stored[1].pi == N_PI'(5),
          "fault 1: test after one more round");
    check(written[2] && stored[2].status == RES_ABORT, "fault 2: aborted");
    check(n_tests == 2 && n_aborts == 1, $sformatf("counts %0d tests %0d aborts", n_tests, n_aborts));
    check(n_rounds == 1, $sformatf("rounds %0d", n_rounds));
    check(n_perturbs == MR * MI, $sformatf("perturbs %0d", n_perturbs));
    check(n_toggles == MI, $sformatf("toggles %0d", n_toggles));
    check(short_props == 0, "propagation waited for the faulty circuit");
    check(zeroed == 3, $sformatf("inputs zeroed at each injection (%0d)", zeroed));
    check(toggles_seen.size() == MI, "attempts on fault 2");
    if (toggles_seen.size() == MI)
      check(toggles_seen[0] == 0 && toggles_seen[1] == 2 && toggles_seen[2] == 5 &&
            toggles_seen[3] == 0, "toggled bit walks over valid outputs");
    // a second run restarts the counters
    start = 1; @(negedge clk); start = 0;
    check(busy && n_tests == 0, "restart clears counters");
    while (!done) @(negedge clk);
    check(n_tests == 2 && n_aborts == 1, "second run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
