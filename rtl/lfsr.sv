// lfsr: 32-bit Galois linear-feedback shift register (taps 32, 22, 2, 1,
// polynomial 0x80200003), advancing once per clock while en is high. SEED must
// be non-zero. Used as the random source for update masks and perturbation.
module lfsr #(
  parameter logic [31:0] SEED = 32'h1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [31:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= SEED;
    else if (en) q <= (q >> 1) ^ (q[0] ? 32'h80200003 : 32'h0);
  end

endmodule
