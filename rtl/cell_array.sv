// cell_array: a programmable array of N_GATES NAND cells and N_PI primary-input
// registers, linked by net number.
//
// Every net is one register (one neuron): the primary inputs live in the
// input registers, every other net in the hold register of the cell that
// drives it. A cell reads its two input nets through a multiplexer chosen by
// its configuration (gate_cfg). When several cells read the same net, their
// feedback is multiplexed into that one register: the energy differences they
// report are added, which is the same as merging equal neurons by adding their
// thresholds and edge weights. A net register then follows the sign of the sum
// (1 if >0, 0 if <0, else hold).
//
// BIDIR = 1 builds the good circuit: all registers follow the update rule on
// the cycles where run is high and their bit of upd_mask is set (a random
// subset, so neighbouring neurons rarely flip together). While fwd is high it
// evaluates forward instead, with its input registers held, which brings it
// to the consistent state for its present inputs. BIDIR = 0 builds the faulty
// circuit: cells always evaluate forward, every cycle that run is high. The
// input registers copy pi_in while pi_load is high. force0/force1 (one bit per
// net) override any register; perturb inverts the registers it selects that
// are not forced. Configuration is written one cell at a time through cfg_we.
//
// stable is high when every programmed cell is stable and, while pi_load is
// high, the input registers already hold pi_in. The random-subset update, the
// forward mode of the good array and perturb are this design's own choices.
module cell_array
  import atpg_pkg::*;
#(
  parameter bit BIDIR = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // configuration port
  input  logic                   cfg_we,
  input  logic [$clog2(N_GATES)-1:0] cfg_idx,
  input  gate_cfg_t              cfg_gate,
  // operation
  input  logic                   run,
  input  logic                   fwd,       // BIDIR array only: evaluate forward
  input  logic [N_NETS-1:0]      upd_mask,
  input  logic [N_NETS-1:0]      perturb,   // invert these registers
  input  logic                   pi_load,
  input  logic [N_PI-1:0]        pi_in,
  input  logic [N_NETS-1:0]      force0,
  input  logic [N_NETS-1:0]      force1,
  output logic [N_NETS-1:0]      nets,
  output logic                   stable
);

  gate_cfg_t             cfg_q [N_GATES];
  logic [N_PI-1:0]       pi_q;
  logic [N_GATES-1:0]    y;
  logic [N_GATES-1:0]    va, vb, cell_stable;
  de_t                   de_a [N_GATES];
  de_t                   de_b [N_GATES];
  de_t                   fb   [N_NETS];

  logic bidir;

  assign bidir = BIDIR && !fwd;
  assign nets  = {y, pi_q};

  // Configuration registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < N_GATES; g++) cfg_q[g] <= '0;
    end else if (cfg_we) begin
      cfg_q[cfg_idx] <= cfg_gate;
    end
  end

  // Input multiplexers
  always_comb begin
    for (int g = 0; g < N_GATES; g++) begin
      va[g] = nets[cfg_q[g].a];
      vb[g] = nets[cfg_q[g].b];
    end
  end

  // Feedback merging: sum over all cells of the feedback aimed at each net
  for (genvar n = 0; n < N_NETS; n++) begin : g_fb
    always_comb begin
      fb[n] = '0;
      for (int g = 0; g < N_GATES; g++) begin
        if (cfg_q[g].valid && cfg_q[g].a == net_idx_t'(n)) fb[n] = fb[n] + de_a[g];
        if (cfg_q[g].valid && cfg_q[g].b == net_idx_t'(n)) fb[n] = fb[n] + de_b[g];
      end
    end
  end

  // NAND cells
  for (genvar g = 0; g < N_GATES; g++) begin : g_cell
    nand_cell u_cell (
      .clk     (clk),
      .rst_n   (rst_n),
      .valid   (cfg_q[g].valid),
      .bidir   (bidir),
      .va      (va[g]),
      .vb      (vb[g]),
      .fb_de   (fb[N_PI+g]),
      .upd     (run && (bidir ? upd_mask[N_PI+g] : 1'b1)),
      .perturb (perturb[N_PI+g]),
      .force0  (force0[N_PI+g]),
      .force1  (force1[N_PI+g]),
      .y       (y[g]),
      .de_a    (de_a[g]),
      .de_b    (de_b[g]),
      .stable  (cell_stable[g])
    );
  end

  // Primary-input registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pi_q <= '0;
    end else begin
      for (int i = 0; i < N_PI; i++) begin
        if (force1[i])                          pi_q[i] <= 1'b1;
        else if (force0[i])                     pi_q[i] <= 1'b0;
        else if (pi_load)                       pi_q[i] <= pi_in[i];
        else if (perturb[i])                    pi_q[i] <= ~pi_q[i];
        else if (bidir && run && upd_mask[i]) begin
          if (fb[i] > 0)                        pi_q[i] <= 1'b1;
          else if (fb[i] < 0)                   pi_q[i] <= 1'b0;
        end
      end
    end
  end

  logic pi_settled;
  always_comb begin
    pi_settled = 1'b1;
    if (pi_load) begin
      for (int i = 0; i < N_PI; i++)
        if (force1[i])      pi_settled &= pi_q[i];
        else if (force0[i]) pi_settled &= ~pi_q[i];
        else                pi_settled &= (pi_q[i] == pi_in[i]);
    end
  end

  assign stable = (&cell_stable) && pi_settled;

endmodule
