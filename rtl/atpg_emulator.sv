// atpg_emulator: hardware test-pattern generator for combinational circuits
// built from 2-input NAND gates.
//
// The circuit under test is programmed twice into identical cell arrays. The
// good copy runs as a Hopfield network: every net is a neuron and the cells
// push their neighbours towards a consistent state, so forcing output nets
// makes the network justify its primary inputs. The faulty copy only
// propagates forward and has one net forced by the fault injector. Both copies
// share their primary inputs: the faulty copy loads the good copy's input
// registers. The output interface forces the good outputs to the faulty
// outputs with one bit toggled; when justification ends stable with the inputs
// unchanged, those inputs make the good and faulty outputs differ, i.e. they
// are a test for the fault. The test controller runs this loop for every
// fault of the fault list and writes results to the test store.
//
// Host interface: program gates (gate_we, written to both arrays), primary
// outputs (po_we) and faults (fault_we), set n_faults, pulse start, wait for
// done and read results through res_addr / res. Two LFSRs give the random
// update masks (about half of the neurons per cycle) and the perturbation
// selection (about one neuron in eight is inverted). Array sizes come from
// atpg_pkg.
module atpg_emulator
  import atpg_pkg::*;
#(
  parameter int SETTLE_MAX   = 32,
  parameter int MAX_RESTARTS = 2,
  parameter int MAX_ITER     = 64
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // programming
  input  logic                      gate_we,
  input  logic [$clog2(N_GATES)-1:0] gate_idx,
  input  gate_cfg_t                 gate_cfg,
  input  logic                      po_we,
  input  logic [PO_W-1:0]           po_idx,
  input  logic                      po_valid_in,
  input  net_idx_t                  po_net,
  input  logic                      fault_we,
  input  logic [FAULT_AW-1:0]       fault_addr,
  input  fault_t                    fault_in,
  input  logic [FAULT_AW:0]         n_faults,
  // run control
  input  logic                      start,
  output logic                      busy,
  output logic                      done,
  // results
  input  logic [FAULT_AW-1:0]       res_addr,
  output result_t                   res,
  output logic [15:0]               n_tests,
  output logic [15:0]               n_aborts,
  output logic [15:0]               n_rounds,
  output logic [15:0]               n_perturbs,
  output logic [15:0]               n_toggles,
  // observation
  output logic [N_PI-1:0]           pi_now,
  output logic [N_PO-1:0]           faulty_po,
  output logic [N_PO-1:0]           good_po,
  output logic [N_PO-1:0]           po_target,
  output logic                      po_differ,
  output fault_t                    fault_now,
  output logic                      fault_active
);

  logic [N_NETS-1:0] g_nets, f_nets;
  logic              g_stable, f_stable;
  logic [N_NETS-1:0] fi_force0, fi_force1, if_force0, if_force1;
  logic [N_NETS-1:0] upd_mask, flip_sel, g_flip;
  logic [31:0]       r1, r2;
  logic [N_PO-1:0]   po_valid;

  logic [FAULT_AW-1:0] c_fault_addr, st_addr;
  fault_t  cur_fault;
  logic    inject, clear_fault;
  logic    f_run, f_pi_load, g_run, g_fwd, g_perturb, g_pi_zero;
  logic    if_latch, if_clamp, st_we;
  logic [PO_W-1:0] toggle_idx;
  result_t st_result;

  assign pi_now = g_nets[N_PI-1:0];

  // Random sources
  lfsr #(.SEED(32'h1ACE_B00C)) u_lfsr1 (.clk(clk), .rst_n(rst_n), .en(1'b1), .q(r1));
  lfsr #(.SEED(32'h0F0F_5A3D)) u_lfsr2 (.clk(clk), .rst_n(rst_n), .en(1'b1), .q(r2));

  always_comb begin
    for (int n = 0; n < N_NETS; n++) begin
      upd_mask[n] = r1[n % 32] ^ r2[(n * 7 + 3) % 32];
      flip_sel[n] = r1[(n * 3 + 1) % 32] & r2[(n * 5 + 2) % 32] & r1[(n * 11 + 7) % 32];
    end
  end
  assign g_flip = g_perturb ? flip_sel : '0;

  // Good circuit: bidirectional (justification)
  cell_array #(.BIDIR(1'b1)) u_good (
    .clk(clk), .rst_n(rst_n),
    .cfg_we(gate_we), .cfg_idx(gate_idx), .cfg_gate(gate_cfg),
    .run(g_run), .fwd(g_fwd), .upd_mask(upd_mask), .perturb(g_flip),
    .pi_load(g_pi_zero), .pi_in('0),
    .force0(if_force0), .force1(if_force1),
    .nets(g_nets), .stable(g_stable)
  );

  // Faulty circuit: forward propagation with fault injection
  cell_array #(.BIDIR(1'b0)) u_faulty (
    .clk(clk), .rst_n(rst_n),
    .cfg_we(gate_we), .cfg_idx(gate_idx), .cfg_gate(gate_cfg),
    .run(f_run), .fwd(1'b1), .upd_mask('1), .perturb('0),
    .pi_load(f_pi_load), .pi_in(g_nets[N_PI-1:0]),
    .force0(fi_force0), .force1(fi_force1),
    .nets(f_nets), .stable(f_stable)
  );

  fault_list u_fault_list (
    .clk(clk), .we(fault_we), .wr_addr(fault_addr), .wr_fault(fault_in),
    .rd_addr(c_fault_addr), .rd_fault(cur_fault)
  );

  fault_injector u_injector (
    .clk(clk), .rst_n(rst_n), .inject(inject), .clear(clear_fault),
    .fault_in(cur_fault), .fault_q(fault_now), .active(fault_active),
    .force0(fi_force0), .force1(fi_force1)
  );

  output_interface u_interface (
    .clk(clk), .rst_n(rst_n),
    .po_we(po_we), .po_idx(po_idx), .po_valid_in(po_valid_in), .po_net_in(po_net),
    .faulty_nets(f_nets), .good_nets(g_nets),
    .latch(if_latch), .toggle_idx(toggle_idx), .clamp(if_clamp),
    .po_valid(po_valid), .faulty_po(faulty_po), .good_po(good_po), .target(po_target),
    .differ(po_differ), .force0(if_force0), .force1(if_force1)
  );

  test_controller #(
    .SETTLE_MAX(SETTLE_MAX), .MAX_RESTARTS(MAX_RESTARTS), .MAX_ITER(MAX_ITER)
  ) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .n_faults(n_faults), .po_valid(po_valid),
    .faulty_stable(f_stable), .good_stable(g_stable), .good_pi(g_nets[N_PI-1:0]),
    .fault_addr(c_fault_addr), .inject(inject), .clear_fault(clear_fault),
    .f_run(f_run), .f_pi_load(f_pi_load),
    .g_run(g_run), .g_fwd(g_fwd), .g_perturb(g_perturb), .g_pi_zero(g_pi_zero),
    .if_latch(if_latch), .toggle_idx(toggle_idx), .if_clamp(if_clamp),
    .st_we(st_we), .st_addr(st_addr), .st_result(st_result),
    .busy(busy), .done(done),
    .n_tests(n_tests), .n_aborts(n_aborts), .n_rounds(n_rounds),
    .n_perturbs(n_perturbs), .n_toggles(n_toggles)
  );

  test_store u_store (
    .clk(clk), .we(st_we), .wr_addr(st_addr), .wr_result(st_result),
    .rd_addr(res_addr), .rd_result(res)
  );

endmodule
