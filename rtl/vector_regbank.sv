// Vector register bank: N words of W bits.
//
// One synchronous write port; every word is visible at once on q so that the
// adder and the multiplier-accumulator can pick their operands word by word
// without contending for a read port (the 16 x 16-bit banks are as
// specified; the port arrangement is this implementation's choice). Reset
// clears all words.
//
//   we, waddr, wdata : write wdata into word waddr at the rising clock edge
//   q[i]             : word i, updated the cycle after a write
module vector_regbank #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] waddr,
  input  logic [W-1:0]         wdata,
  output logic [W-1:0]         q [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) q[i] <= '0;
    end else if (we) begin
      q[waddr] <= wdata;
    end
  end

endmodule
