// output_interface: links the primary outputs of the faulty and good circuits.
//
// Up to N_PO nets of the arrays are named primary outputs (programmed through
// po_we with a valid bit per slot). On latch, the interface captures the
// faulty circuit's output vector with one bit, toggle_idx, inverted; while
// clamp is high it forces the good circuit's output nets to that target, so
// the good circuit has to justify inputs that make its outputs differ from the
// faulty ones. With a single output this is a plain inversion. It also reports
// both output vectors and differ, high when at least one valid good output
// differs from the faulty one (the OR of the per-output XORs).
// Transmitting the faulty outputs with one toggled bit follows the source
// method; which bit is toggled is chosen by the controller. The target is
// registered (one cycle after latch); the force vectors are combinational.
module output_interface
  import atpg_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              po_we,
  input  logic [PO_W-1:0]   po_idx,
  input  logic              po_valid_in,
  input  net_idx_t          po_net_in,
  input  logic [N_NETS-1:0] faulty_nets,
  input  logic [N_NETS-1:0] good_nets,
  input  logic              latch,
  input  logic [PO_W-1:0]   toggle_idx,
  input  logic              clamp,
  output logic [N_PO-1:0]   po_valid,
  output logic [N_PO-1:0]   faulty_po,
  output logic [N_PO-1:0]   good_po,
  output logic [N_PO-1:0]   target,
  output logic              differ,
  output logic [N_NETS-1:0] force0,
  output logic [N_NETS-1:0] force1
);

  net_idx_t po_net [N_PO];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      po_valid <= '0;
      for (int i = 0; i < N_PO; i++) po_net[i] <= '0;
    end else if (po_we) begin
      po_valid[po_idx] <= po_valid_in;
      po_net[po_idx]   <= po_net_in;
    end
  end

  always_comb begin
    for (int i = 0; i < N_PO; i++) begin
      faulty_po[i] = po_valid[i] & faulty_nets[po_net[i]];
      good_po[i]   = po_valid[i] & good_nets[po_net[i]];
    end
  end

  assign differ = |(faulty_po ^ good_po);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     target <= '0;
    else if (latch) target <= (faulty_po ^ (N_PO'(1) << toggle_idx)) & po_valid;
  end

  always_comb begin
    force0 = '0;
    force1 = '0;
    if (clamp) begin
      for (int i = 0; i < N_PO; i++) begin
        if (po_valid[i]) begin
          force1[po_net[i]] = force1[po_net[i]] |  target[i];
          force0[po_net[i]] = force0[po_net[i]] | ~target[i];
        end
      end
    end
  end

endmodule
