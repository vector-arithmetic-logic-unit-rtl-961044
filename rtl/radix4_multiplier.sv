// Radix-4 multiplier, signed or unsigned.
//
// The multiplier b is read as W/2 base-4 digits. For each digit a lookup
// table of the multiplicand's multiples {0, a, 2a, 3a} gives a partial
// product; in binary a base-4 digit is simply a bit pair, so the partial
// product is already in base 4. Partial product j is shifted left by 2j
// bits, and the partial products are added two at a time in a tree, one
// registered level per pairing.
//
// Signed mode adds one more term, the two's complement correction
// -2^W * (a_sign ? b : 0) - 2^W * (b_sign ? a : 0), to the unsigned product
// of the raw bit patterns (modulo 2^(2W)).
//
// The lookup of multiples, the 2-bit shifts and the pairwise addition follow
// the radix-4 scheme as specified; the register per tree level and the
// signed correction term are this implementation's choices.
//
//   in_valid, a, b, sgn : one multiplication per clock
//   out_valid, p        : the product r4_mul_latency(W) clocks later
//                         (1 lookup stage + ceil(log2(W/2 + 1)) adder levels)
module radix4_multiplier
  import valu_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic           sgn,
  output logic           out_valid,
  output logic [2*W-1:0] p
);

  localparam int unsigned ND     = W / 2;            // base-4 digits of b
  localparam int unsigned NT     = ND + 1;           // terms incl. sign correction
  localparam int unsigned LEVELS = $clog2(NT);
  localparam int unsigned NP     = 1 << LEVELS;      // terms padded to a power of two
  localparam int unsigned PW     = 2 * W;

  initial assert (W % 2 == 0) else $error("W must be even");

  // Lookup table of the multiples of a.
  logic [W+1:0] mult [4];
  always_comb begin
    mult[0] = '0;
    mult[1] = {2'b00, a};
    mult[2] = {1'b0, a, 1'b0};
    mult[3] = {2'b00, a} + {1'b0, a, 1'b0};
  end

  logic [PW-1:0] terms [NP];
  always_comb begin
    logic [PW-1:0] corr;
    for (int j = 0; j < NP; j++) terms[j] = '0;
    for (int j = 0; j < ND; j++) terms[j] = PW'(mult[b[2*j +: 2]]) << (2 * j);
    corr = '0;
    if (sgn) begin
      if (a[W-1]) corr = corr + (PW'(b) << W);
      if (b[W-1]) corr = corr + (PW'(a) << W);
    end
    terms[ND] = -corr;
  end

  // Level 0 registers the partial products; each further level adds pairs.
  logic [PW-1:0] lvl [LEVELS+1][NP];
  logic          v   [LEVELS+1];

  always_ff @(posedge clk) begin
    for (int j = 0; j < NP; j++) lvl[0][j] <= terms[j];
    for (int l = 0; l < LEVELS; l++) begin
      for (int j = 0; j < (NP >> (l + 1)); j++) begin
        lvl[l+1][j] <= lvl[l][2*j] + lvl[l][2*j+1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l <= LEVELS; l++) v[l] <= 1'b0;
    end else begin
      v[0] <= in_valid;
      for (int l = 1; l <= LEVELS; l++) v[l] <= v[l-1];
    end
  end

  assign out_valid = v[LEVELS];
  assign p         = lvl[LEVELS][0];

endmodule
