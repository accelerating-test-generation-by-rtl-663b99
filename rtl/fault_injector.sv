// fault_injector: the fault-injection multiplexers of the faulty circuit.
//
// The faulty copy keeps the structure of the circuit for every fault; only
// the set-reset input of one net changes. This block holds the fault being
// injected (loaded on inject, dropped on clear) and decodes it into one-hot
// stuck-at-0 / stuck-at-1 force vectors, one bit per net of the array. The
// force vectors change on the clock edge after inject / clear.
// Injecting one stem fault at a time follows the source method; the
// register-and-decode form is this design's choice.
module fault_injector
  import atpg_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              inject,
  input  logic              clear,
  input  fault_t            fault_in,
  output fault_t            fault_q,
  output logic              active,
  output logic [N_NETS-1:0] force0,
  output logic [N_NETS-1:0] force1
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fault_q <= '0;
      active  <= 1'b0;
    end else if (clear) begin
      active  <= 1'b0;
    end else if (inject) begin
      fault_q <= fault_in;
      active  <= 1'b1;
    end
  end

  always_comb begin
    force0 = '0;
    force1 = '0;
    for (int n = 0; n < N_NETS; n++) begin
      if (active && fault_q.net == net_idx_t'(n)) begin
        force0[n] = ~fault_q.stuck;
        force1[n] =  fault_q.stuck;
      end
    end
  end

endmodule
