// test_store: memory of the outcome for every fault of the fault list.
//
// The test controller writes one result_t per fault index: RES_TEST with the
// primary-input vector found, or RES_ABORT. clr_we with clr_addr writes
// RES_NONE (the controller clears one entry per cycle at the start of a run,
// or the host may). The host reads an entry asynchronously through rd_addr.
// Storing the vector per fault index is this design's choice.
module test_store
  import atpg_pkg::*;
(
  input  logic                clk,
  input  logic                we,
  input  logic [FAULT_AW-1:0] wr_addr,
  input  result_t             wr_result,
  input  logic [FAULT_AW-1:0] rd_addr,
  output result_t             rd_result
);

  result_t mem [MAX_FAULTS];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_result;
  end

  assign rd_result = mem[rd_addr];

endmodule
