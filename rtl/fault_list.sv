// fault_list: memory of the collapsed single stuck-at faults to be targeted.
//
// The list is produced off-chip by fault collapsing and written by the host
// through the write port; the test controller reads it asynchronously by
// index (rd_addr to rd_fault within the same cycle). Depth MAX_FAULTS is this
// design's choice.
module fault_list
  import atpg_pkg::*;
(
  input  logic                clk,
  input  logic                we,
  input  logic [FAULT_AW-1:0] wr_addr,
  input  fault_t              wr_fault,
  input  logic [FAULT_AW-1:0] rd_addr,
  output fault_t              rd_fault
);

  fault_t mem [MAX_FAULTS];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_fault;
  end

  assign rd_fault = mem[rd_addr];

endmodule
