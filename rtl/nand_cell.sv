// nand_cell: one programmable 2-input NAND primitive of the emulation array.
//
// The cell is the logic-level form of the primitive gate state machine: the
// two input values feed a gate whose result goes into a hold register, the
// output neuron. (In the transistor structure of the method the register
// holds the AND value and the NAND output is its complement; here the register
// holds the NAND value y directly.) It has three parts:
//   * feedback: for each input it reports the local energy difference
//     dE = E(in=0) - E(in=1) given the other input and the output. For a
//     lone gate the sign reproduces the input state tables: drive the input to
//     1 (dE>0), to 0 (dE<0) or let it hold its value (dE=0). The array sums
//     these values over every cell that shares a net.
//   * hold: the output register. In bidirectional mode (good circuit) it takes
//     the sign of its own dE plus the feedback summed from the fanout cells
//     (fb_de); in forward mode (faulty circuit) it loads NAND(va, vb).
//   * set-reset: force0 / force1 put the output into a stuck-at-0 / stuck-at-1
//     (or clamped) state over everything else. The cell is stable when the
//     value entering the hold register equals the value held, or, in forward
//     mode, when the output is forced and already holds the forced value.
// The update rule (1 if dE>0, 0 if dE<0, else hold) and the stuck-at / stable
// semantics follow the source method. Using signed energy sums to merge cells
// on a shared net, the perturb input (invert the held value, a move that may
// raise the energy) and the reset value 0 are this design's choices.
//
// Timing: one register; the output changes on the rising clock edge after upd,
// perturb or a force is applied. valid = 0 parks the cell: y holds 0, it sends
// no feedback and reports stable.
module nand_cell
  import atpg_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic valid,    // cell is programmed
  input  logic bidir,    // 1: Hopfield update, 0: forward evaluation
  input  logic va,       // present value of input net a
  input  logic vb,       // present value of input net b
  input  de_t  fb_de,    // summed feedback from cells reading this output net
  input  logic upd,      // update enable for this cycle
  input  logic perturb,  // invert the held value instead of the update rule
  input  logic force0,   // stuck-at-0 / clamp to 0
  input  logic force1,   // stuck-at-1 / clamp to 1
  output logic y,        // output neuron (NAND net value)
  output de_t  de_a,     // feedback towards input net a
  output de_t  de_b,     // feedback towards input net b
  output logic stable
);

  logic d;       // value entering the hold register in forward sense
  de_t  de_y;    // total energy difference of the output neuron
  logic y_next;

  assign d    = ~(va & vb);
  assign de_y = nand_de_out(va, vb) + fb_de;

  // Feedback part
  assign de_a = (valid && bidir) ? nand_de_in(vb, y) : '0;
  assign de_b = (valid && bidir) ? nand_de_in(va, y) : '0;

  // Hold part with set-reset forcing
  always_comb begin
    y_next = y;
    if (!valid)               y_next = 1'b0;
    else if (force1)          y_next = 1'b1;
    else if (force0)          y_next = 1'b0;
    else if (perturb)         y_next = ~y;
    else if (upd) begin
      if (!bidir)             y_next = d;
      else if (de_y > 0)      y_next = 1'b1;
      else if (de_y < 0)      y_next = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= 1'b0;
    else        y <= y_next;
  end

  // Stable-state check
  assign stable = !valid || (d == y) || (!bidir && ((force1 && y) || (force0 && !y)));

  a_force_exclusive: assert property (@(posedge clk) !(force0 && force1))
    else $error("nand_cell: stuck-at-0 and stuck-at-1 forced together");

endmodule
