// nand_cell_tb: checks one NAND cell in both modes.
//
// Forward mode: the output register loads NAND(a, b) one cycle after upd, the
// stuck-at forces win over the update, and stable follows "input of the hold
// register equals its output, or forced and holding the forced value".
// Bidirectional mode: the input feedback values equal the local energy
// differences of the NAND neuron group worked out here from the energy
// E = 2ab - 4a - 4b + 4ay + 4by - 6y + 6, the output follows the sign of its
// own difference plus fb_de, and holds when the sum is zero. Perturb inverts;
// an unprogrammed cell parks at 0, sends no feedback and is stable.
module nand_cell_tb;
  import atpg_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, valid, bidir, va, vb, upd, perturb, force0, force1;
  de_t  fb_de, de_a, de_b;
  logic y, stable;
  int checks = 0, failures = 0;

  nand_cell dut (.*);

  function automatic int energy(input int a, input int b, input int yy);
    return 2*a*b - 4*a - 4*b + 4*a*yy + 4*b*yy - 6*yy + 6;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step();
    @(posedge clk); #1;
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; valid = 1; bidir = 0; va = 0; vb = 0; upd = 0; perturb = 0;
    force0 = 0; force1 = 0; fb_de = '0;
    step(); rst_n = 1; step();
    check(y == 1'b0, "reset value");
    // forward mode truth table
    for (int k = 0; k < 4; k++) begin
      va = k[0]; vb = k[1]; upd = 1;
      #1 check(stable == (y == !(va && vb)), "forward stable before update");
      step();
      check(y == !(k[0] && k[1]), $sformatf("forward NAND %0d", k));
      check(stable, "forward stable after update");
      check(de_a == 0 && de_b == 0, "no feedback in forward mode");
    end
    // stuck-at forcing in forward mode
    va = 0; vb = 0; force1 = 1; #1;
    check(y == 0 && !stable, "forced but not yet holding: unstable");
    step();
    check(y == 1 && stable, "stuck-at-1 stable");
    force1 = 0; va = 0; vb = 0; force0 = 1; step();
    check(y == 0, "stuck-at-0 over NAND=1");
    check(stable, "stuck-at-0 stable");
    force0 = 0; force1 = 1; va = 1; vb = 1; step();
    check(y == 1, "stuck-at-1 over NAND=0");
    check(stable, "stuck-at-1 stable");
    force1 = 0; step();
    check(y == 0, "released");
    // hold when upd low
    upd = 0; va = 0; step();
    check(y == 0, "hold without upd");

    // bidirectional mode: feedback values
    bidir = 1;
    for (int k = 0; k < 8; k++) begin
      int ea, eb, ey;
      upd = 0;
      va = k[0]; vb = k[1];
      // set y with a force, then release
      force1 = k[2]; force0 = !k[2]; step(); force0 = 0; force1 = 0; #1;
      ea = energy(0, vb, y) - energy(1, vb, y);
      eb = energy(va, 0, y) - energy(va, 1, y);
      ey = energy(va, vb, 0) - energy(va, vb, 1);
      check(int'(de_a) == ea, $sformatf("de_a case %0d: %0d vs %0d", k, de_a, ea));
      check(int'(de_b) == eb, $sformatf("de_b case %0d: %0d vs %0d", k, de_b, eb));
      check(stable == (y == !(va && vb)), "bidir stable = consistent");
      // output update with its own difference only
      fb_de = '0; upd = 1; step(); upd = 0;
      check(y == (ey > 0 ? 1'b1 : 1'b0), $sformatf("bidir output case %0d", k));
    end
    // fanout feedback can overrule: a=b=1 gives own dE=-2; +5 from fanout -> 1
    va = 1; vb = 1; force0 = 1; step(); force0 = 0;
    fb_de = de_t'(5); upd = 1; step();
    check(y == 1, "fanout feedback overrules");
    // sum exactly zero holds the value
    fb_de = de_t'(2); step();
    check(y == 1, "zero sum holds 1");
    force0 = 1; step(); force0 = 0; step();
    check(y == 0, "zero sum holds 0");
    fb_de = '0; upd = 0;
    // perturb
    perturb = 1; step(); check(y == 1, "perturb inverts 0");
    step(); check(y == 0, "perturb inverts 1");
    perturb = 0;
    // unprogrammed
    valid = 0; force1 = 1; step(); force1 = 0;
    check(y == 0 && stable && de_a == 0 && de_b == 0, "unprogrammed cell parked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
