// cell_array_tb: checks the programmable array with the c17 netlist (six
// NAND cells, inputs on nets 0..4, outputs on the cells 4 and 5).
//
// Forward array (BIDIR=0): for random input vectors, with and without one
// forced net, every net must settle to the value of an independent gate-level
// evaluation, and stable must rise only then.
// Bidirectional array (BIDIR=1): for every output pair (all four are
// reachable in c17) the outputs are clamped and the array runs with random
// update masks until stable; the justified inputs, evaluated independently,
// must give the clamped outputs and every internal net must be consistent.
// Perturbation (random inversions) is used when a run does not settle. The
// forward mode of the bidirectional array and the exact single-neuron update
// (against the summed energy of the merged network) are checked as well.
module cell_array_tb;
  import atpg_pkg::*;

  localparam int NG = 6;
  localparam int NI = 5;
  localparam int GW = $clog2(N_GATES);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  int ga [NG] = '{0, 2, 1, N_PI+1, N_PI+0, N_PI+2};
  int gb [NG] = '{2, 3, N_PI+1, 4, N_PI+2, N_PI+3};

  logic cfg_we;
  logic [GW-1:0] cfg_idx;
  gate_cfg_t cfg_gate;
  logic run, pi_load, gfwd;
  logic [N_NETS-1:0] perturb;
  logic [N_NETS-1:0] upd_mask, rnd_val, force0, force1, fnets, gnets;
  logic [N_PI-1:0] pi_in;
  logic fstable, gstable;

  cell_array #(.BIDIR(1'b0)) u_f (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_gate, .run, .fwd(1'b1), .upd_mask, .perturb('0),
    .pi_load, .pi_in, .force0, .force1, .nets(fnets), .stable(fstable));

  logic [N_NETS-1:0] gforce0, gforce1;
  logic grun;
  cell_array #(.BIDIR(1'b1)) u_g (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_gate, .run(grun), .fwd(gfwd), .upd_mask,
    .perturb, .pi_load(1'b0), .pi_in, .force0(gforce0), .force1(gforce1),
    .nets(gnets), .stable(gstable));

  function automatic logic [N_NETS-1:0] ref_nets(input logic [NI-1:0] pi, input int fnet,
                                                 input logic fval);
    logic [N_NETS-1:0] v;
    v = '0;
    for (int i = 0; i < NI; i++) v[i] = pi[i];
    if (fnet >= 0 && fnet < N_PI) v[fnet] = fval;
    for (int g = 0; g < NG; g++) begin
      v[N_PI+g] = ~(v[ga[g]] & v[gb[g]]);
      if (fnet == N_PI+g) v[N_PI+g] = fval;
    end
    return v;
  endfunction

  // Energy of the whole c17 network, sum of the NAND group energies
  function automatic int net_energy(input logic [N_NETS-1:0] v);
    int e;
    e = 0;
    for (int g = 0; g < NG; g++) begin
      int a, b, y;
      a = v[ga[g]]; b = v[gb[g]]; y = v[N_PI+g];
      e += 2*a*b - 4*a - 4*b + 4*a*y + 4*b*y - 6*y + 6;
    end
    return e;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N_NETS-1:0] rand_mask;
  int onehot_k = -1;
  assign upd_mask = (onehot_k >= 0) ? (N_NETS'(1) << onehot_k) : rand_mask;

  always @(negedge clk) begin
    rand_mask = {$urandom, $urandom, $urandom};
    rnd_val  = {$urandom, $urandom, $urandom};
  end

  initial begin
    cfg_we = 0; cfg_idx = '0; cfg_gate = '0; run = 0; perturb = '0; pi_load = 0; gfwd = 0;
    pi_in = '0; force0 = '0; force1 = '0; gforce0 = '0; gforce1 = '0; grun = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < NG; g++) begin
      @(negedge clk);
      cfg_we = 1; cfg_idx = GW'(g);
      cfg_gate = '{valid: 1'b1, a: net_idx_t'(ga[g]), b: net_idx_t'(gb[g])};
    end
    @(negedge clk); cfg_we = 0;

    // forward propagation
    for (int t = 0; t < 40; t++) begin
      logic [NI-1:0] pi;
      int fnet, cyc;
      logic fval;
      logic [N_NETS-1:0] exp;
      pi = NI'($urandom);
      fnet = (t % 2 == 0) ? -1 : int'($urandom % 11);
      if (fnet >= NI) fnet = fnet - NI + N_PI;
      fval = 1'($urandom);
      force0 = '0; force1 = '0;
      if (fnet >= 0) begin force0[fnet] = !fval; force1[fnet] = fval; end
      pi_in = N_PI'(pi); pi_load = 1; run = 1;
      cyc = 0;
      @(negedge clk);
      while (!fstable && cyc < 50) begin @(negedge clk); cyc++; end
      exp = ref_nets(pi, fnet, fval);
      check(fstable, $sformatf("forward settles, vector %0d", t));
      check(fnets[N_PI+NG-1:0] == exp[N_PI+NG-1:0],
            $sformatf("forward nets %0d: %h vs %h (fault net %0d)", t, fnets, exp, fnet));
      check(cyc <= NG + 2, $sformatf("forward settle time %0d within depth", cyc));
    end
    run = 0; pi_load = 0; force0 = '0; force1 = '0;

    // single-neuron update rule against the energy of the merged network
    for (int t = 0; t < 300; t++) begin
      logic [N_NETS-1:0] st, lo, hi;
      int k, de;
      logic exp;
      st = '0;
      for (int i = 0; i < NI; i++) st[i] = 1'($urandom);
      for (int g = 0; g < NG; g++) st[N_PI+g] = 1'($urandom);
      k = int'($urandom % 11);
      if (k >= NI) k = k - NI + N_PI;
      gforce1 = st; gforce0 = ~st;
      @(negedge clk);
      gforce1 = '0; gforce0 = '0;
      check(gnets[N_PI+NG-1:0] == st[N_PI+NG-1:0], "state forced");
      lo = st; lo[k] = 1'b0; hi = st; hi[k] = 1'b1;
      de = net_energy(lo) - net_energy(hi);
      exp = (de > 0) ? 1'b1 : (de < 0) ? 1'b0 : st[k];
      onehot_k = k;
      grun = 1;
      @(negedge clk);
      grun = 0;
      onehot_k = -1;
      check(gnets[k] == exp, $sformatf("net %0d update: dE=%0d got %b", k, de, gnets[k]));
      st[k] = exp;
      check(gnets[N_PI+NG-1:0] == st[N_PI+NG-1:0], "other nets unchanged");
    end

    // forward mode of the bidirectional array: inputs held, cells settle to
    // the forward values
    for (int t = 0; t < 10; t++) begin
      logic [N_NETS-1:0] st, exp;
      int cyc;
      st = {$urandom, $urandom, $urandom};
      gforce1 = st; gforce0 = ~st;
      @(negedge clk);
      gforce1 = '0; gforce0 = '0;
      gfwd = 1; grun = 1; cyc = 0;
      @(negedge clk);
      while (!gstable && cyc < 50) begin @(negedge clk); cyc++; end
      exp = ref_nets(st[NI-1:0], -1, 1'b0);
      check(gnets[NI-1:0] == st[NI-1:0], "inputs held in forward mode");
      check(gnets[N_PI+NG-1:N_PI] == exp[N_PI+NG-1:N_PI], "forward mode of good array");
      gfwd = 0; grun = 0;
    end

    // justification
    for (int t = 0; t < 16; t++) begin
      logic [1:0] tgt;
      logic [N_NETS-1:0] exp;
      int cyc, restarts;
      tgt = 2'(t);
      gforce0 = '0; gforce1 = '0;
      gforce1[N_PI+4] = tgt[0];  gforce0[N_PI+4] = !tgt[0];
      gforce1[N_PI+5] = tgt[1];  gforce0[N_PI+5] = !tgt[1];
      grun = 1; cyc = 0; restarts = 0;
      repeat (2) @(negedge clk);
      while (!gstable && restarts < 50) begin
        @(negedge clk); cyc++;
        if (cyc == 30) begin
          grun = 0; perturb = rnd_val; @(negedge clk); perturb = '0; grun = 1;
          cyc = 0; restarts++;
        end
      end
      check(gstable, $sformatf("justification %0d settles", t));
      exp = ref_nets(gnets[NI-1:0], -1, 1'b0);
      check(gnets[N_PI+NG-1:N_PI] == exp[N_PI+NG-1:N_PI],
            $sformatf("justified nets consistent, target %b", tgt));
      check({exp[N_PI+5], exp[N_PI+4]} == tgt,
            $sformatf("justified inputs %b give target %b", gnets[NI-1:0], tgt));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
