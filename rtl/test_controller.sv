// test_controller: sequences test generation fault by fault.
//
// For every fault of the list it follows the loop: select the next fault
// (exit when none is left), inject it, propagate the primary inputs through the
// faulty circuit (the good circuit evaluates forward at the same time, g_fwd,
// so that it starts justification from a consistent state), let the good
// circuit justify inputs for the faulty outputs
// with one bit toggled, and check whether the primary inputs changed. If they
// did not, and the good circuit reached a stable state, the inputs are a test
// for the fault and are saved; if they changed, propagation and justification
// repeat with the new inputs. The primary inputs start at zero for every fault.
//
// This design adds bounds the source loop does not give: a justification that
// is not stable after SETTLE_MAX cycles is shaken by inverting a random part
// of the neurons (perturb) up to MAX_RESTARTS times, then the toggled output bit moves on to
// the next valid output; after MAX_ITER propagate/justify rounds the fault is
// recorded as aborted. Every wait lasts at least MIN_WAIT cycles so forces
// and loads reach the registers before stability is sampled.
//
// Interface: start (one cycle) begins a run over faults 0..n_faults-1; busy is
// high during the run and done rises when it ends. Results are written to the
// test store at the fault's index. The statistics count found tests, aborted
// faults, repeated rounds (inputs changed), perturbations and toggle moves.
module test_controller
  import atpg_pkg::*;
#(
  parameter int SETTLE_MAX   = 32,
  parameter int MAX_RESTARTS = 2,
  parameter int MAX_ITER     = 64,
  parameter int MIN_WAIT     = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [FAULT_AW:0]   n_faults,
  input  logic [N_PO-1:0]     po_valid,
  input  logic                faulty_stable,
  input  logic                good_stable,
  input  logic [N_PI-1:0]     good_pi,
  // fault list and injection
  output logic [FAULT_AW-1:0] fault_addr,
  output logic                inject,
  output logic                clear_fault,
  // faulty circuit
  output logic                f_run,
  output logic                f_pi_load,
  // good circuit
  output logic                g_run,
  output logic                g_fwd,
  output logic                g_perturb,
  output logic                g_pi_zero,
  // output interface
  output logic                if_latch,
  output logic [PO_W-1:0]     toggle_idx,
  output logic                if_clamp,
  // test store
  output logic                st_we,
  output logic [FAULT_AW-1:0] st_addr,
  output result_t             st_result,
  // status
  output logic                busy,
  output logic                done,
  output logic [15:0]         n_tests,
  output logic [15:0]         n_aborts,
  output logic [15:0]         n_rounds,
  output logic [15:0]         n_perturbs,
  output logic [15:0]         n_toggles
);

  typedef enum logic [3:0] {
    S_IDLE, S_SELECT, S_INJECT, S_PROP, S_LATCH, S_JUST, S_CHECK, S_SAVE, S_ABORT, S_DONE
  } state_e;

  state_e              state;
  logic [FAULT_AW:0]   fidx;
  logic [15:0]         timer;
  logic [7:0]          iter;
  logic [7:0]          restarts;
  logic [N_PI-1:0]     pi_snap;

  function automatic logic [PO_W-1:0] next_valid(input logic [PO_W-1:0] k,
                                                 input logic [N_PO-1:0] v);
    logic [PO_W-1:0] r;
    r = k;
    for (int s = N_PO; s >= 1; s--) begin
      if (v[(int'(k) + s) % N_PO]) r = PO_W'((int'(k) + s) % N_PO);
    end
    return r;
  endfunction

  assign fault_addr = fidx[FAULT_AW-1:0];
  assign st_addr    = fidx[FAULT_AW-1:0];
  assign busy       = (state != S_IDLE) && (state != S_DONE);
  assign done       = (state == S_DONE);

  always_comb begin
    g_perturb   = (state == S_JUST) && (int'(timer) >= SETTLE_MAX) && (int'(restarts) < MAX_RESTARTS);
    inject      = (state == S_INJECT);
    clear_fault = (state == S_SAVE) || (state == S_ABORT);
    f_run       = (state == S_PROP);
    f_pi_load   = (state == S_PROP);
    g_run       = ((state == S_JUST) && !g_perturb) || (state == S_PROP);
    g_fwd       = (state == S_PROP);
    g_pi_zero   = (state == S_INJECT);
    if_latch    = (state == S_LATCH);
    if_clamp    = (state == S_JUST) || (state == S_CHECK);
    st_we       = (state == S_SAVE) || (state == S_ABORT);
    st_result.status = (state == S_SAVE) ? RES_TEST : RES_ABORT;
    st_result.pi     = good_pi;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      fidx       <= '0;
      timer      <= '0;
      iter       <= '0;
      restarts   <= '0;
      pi_snap    <= '0;
      toggle_idx <= '0;
      n_tests    <= '0;
      n_aborts   <= '0;
      n_rounds   <= '0;
      n_perturbs <= '0;
      n_toggles  <= '0;
    end else begin
      case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state      <= S_SELECT;
            fidx       <= '0;
            n_tests    <= '0;
            n_aborts   <= '0;
            n_rounds   <= '0;
            n_perturbs <= '0;
            n_toggles  <= '0;
          end
        end
        S_SELECT: begin
          if (fidx >= n_faults) state <= S_DONE;
          else                  state <= S_INJECT;
        end
        S_INJECT: begin
          iter       <= '0;
          restarts   <= '0;
          timer      <= '0;
          toggle_idx <= next_valid(PO_W'(N_PO - 1), po_valid);
          state      <= S_PROP;
        end
        S_PROP: begin
          timer <= timer + 1'b1;
          if (int'(timer) >= MIN_WAIT && faulty_stable && good_stable) begin
            timer <= '0;
            state <= S_LATCH;
          end
        end
        S_LATCH: begin
          pi_snap  <= good_pi;
          restarts <= '0;
          timer    <= '0;
          state    <= S_JUST;
        end
        S_JUST: begin
          timer <= timer + 1'b1;
          if (g_perturb) begin
            timer      <= '0;
            restarts   <= restarts + 1'b1;
            n_perturbs <= n_perturbs + 1'b1;
          end else if (int'(timer) >= MIN_WAIT && good_stable) begin
            state <= S_CHECK;
          end else if (int'(timer) >= SETTLE_MAX) begin
            // restarts exhausted: try another toggled output bit
            toggle_idx <= next_valid(toggle_idx, po_valid);
            n_toggles  <= n_toggles + 1'b1;
            iter       <= iter + 1'b1;
            timer      <= '0;
            state      <= (int'(iter) + 1 >= MAX_ITER) ? S_ABORT : S_PROP;
          end
        end
        S_CHECK: begin
          if (good_pi == pi_snap) begin
            state <= S_SAVE;
          end else begin
            n_rounds <= n_rounds + 1'b1;
            iter     <= iter + 1'b1;
            timer    <= '0;
            state    <= (int'(iter) + 1 >= MAX_ITER) ? S_ABORT : S_PROP;
          end
        end
        S_SAVE: begin
          n_tests <= n_tests + 1'b1;
          fidx    <= fidx + 1'b1;
          state   <= S_SELECT;
        end
        S_ABORT: begin
          n_aborts <= n_aborts + 1'b1;
          fidx     <= fidx + 1'b1;
          state    <= S_SELECT;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_one_write: assert property (@(posedge clk) st_we |-> busy)
    else $error("test_controller: test store written outside a run");

endmodule
