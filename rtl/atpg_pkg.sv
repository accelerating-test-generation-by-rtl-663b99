// atpg_pkg: sizes, types and constants shared by the test-generation emulator.
//
// The emulator holds two programmed copies of a circuit made of 2-input NAND
// cells: a "good" copy that runs as a Hopfield network (it can justify inputs
// from forced outputs) and a "faulty" copy that only propagates forward and can
// have one net forced to a stuck-at value. Nets are numbered: 0..N_PI-1 are the
// primary inputs, N_PI+g is the output of gate g.
//
// The array sizes below are this design's own choice; the source method gives
// no array size. Local energy differences use the 2-input NAND neuron weights
// derived from the AND-gate model (weights 4, 4, -2, thresholds 0, 0, -6) by
// inverting the output neuron.
package atpg_pkg;

  localparam int N_PI       = 16;              // primary-input registers
  localparam int N_PO       = 8;               // primary-output slots in the interface
  localparam int N_GATES    = 64;              // NAND cells per array
  localparam int N_NETS     = N_PI + N_GATES;  // neurons per array
  localparam int NET_W      = $clog2(N_NETS);
  localparam int MAX_FAULTS = 256;             // fault-list / test-store depth
  localparam int FAULT_AW   = $clog2(MAX_FAULTS);
  localparam int PO_W       = $clog2(N_PO);
  localparam int DE_W       = 12;              // signed width of a summed energy difference

  typedef logic [NET_W-1:0]  net_idx_t;
  typedef logic signed [DE_W-1:0] de_t;

  // One programmed NAND cell: its two input nets.
  typedef struct packed {
    logic     valid;
    net_idx_t a;
    net_idx_t b;
  } gate_cfg_t;

  // One single stuck-at fault on a net (stem fault).
  typedef struct packed {
    net_idx_t net;
    logic     stuck;   // 0: stuck-at-0, 1: stuck-at-1
  } fault_t;

  typedef enum logic [1:0] {
    RES_NONE  = 2'd0,  // fault not processed yet
    RES_TEST  = 2'd1,  // a test vector was found
    RES_ABORT = 2'd2   // iteration limit reached without a test
  } result_e;

  typedef struct packed {
    result_e          status;
    logic [N_PI-1:0]  pi;
  } result_t;

  // Local energy differences dE = E(v=0) - E(v=1) of one 2-input NAND
  // neuron group (a, b inputs, y output), for each terminal with the other
  // two at their present values.
  //   E = 2ab - 4a - 4b + 4ay + 4by - 6y + 6
  function automatic de_t nand_de_in(input logic other, input logic y);
    return de_t'(4) - (other ? de_t'(2) : de_t'(0)) - (y ? de_t'(4) : de_t'(0));
  endfunction

  function automatic de_t nand_de_out(input logic a, input logic b);
    return de_t'(6) - (a ? de_t'(4) : de_t'(0)) - (b ? de_t'(4) : de_t'(0));
  endfunction

endpackage
