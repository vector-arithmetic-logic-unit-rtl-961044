// Bit-level pipelined array multiplier (radix 2), signed or unsigned.
//
// The array has W rows of W single-bit adders. Row r adds the partial
// product a AND b[r] to the carry-save pair coming from row r-1: cell j gets
// the sum of cell j+1 and the carry of cell j of the row above, so no carry
// runs along a row and every adder sits between two ranks of registers. The
// sum of cell 0 of row r is product bit r; it joins a shift register that
// travels with the word. The operands travel down the rows in shift
// registers as well, so a new multiplication enters every serial clock and
// W of them are in the array at once.
//
// After the last row the upper half of the product is still a carry-save
// pair. It is merged by a W-bit staggered adder (single-bit adders with
// registered carries), which adds W more clocks.
//
// Signed mode uses the Baugh-Wooley form: partial product bits that pair a
// sign bit with a non-sign bit are inverted, 2^W is added through the
// merge's carry in and 2^(2W-1) by inverting the top product bit. The same
// array then computes two's complement products; fixed-point operands are
// multiplied the same way, the binary point being the caller's concern.
//
// The 16 x 16 adder array with every adder between registers, one new
// multiplication per clock and signed/unsigned operation follow the
// architecture as specified. The carry-save organisation, the staggered
// merge and Baugh-Wooley signing are this implementation's choices, and so
// is the resulting 32-clock latency (a 45-clock figure is quoted for the
// architecture without a structure that produces it). Bit 0 of the last
// row's sum vector is product bit W-1 and is taken from the low-half shift
// register, so the merge reads only its upper bits; the merge's carry out
// lies beyond the 2W-bit product.
//
//   in_valid, a, b, sgn : one multiplication per clock, sgn = signed operands
//   out_valid, p        : the 2W-bit product arr_mul_latency(W) = 2W clocks later
module array_multiplier
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

  // Registers after each row.
  logic         v_q  [W];
  logic         sg_q [W];
  logic [W-1:0] a_q  [W];
  logic [W-1:0] b_q  [W];
  logic [W-1:0] s_q  [W];
  logic [W-1:0] c_q  [W];
  logic [W-1:0] lo_q [W];

  for (genvar r = 0; r < W; r++) begin : g_row
    logic         v_i, sg_i;
    logic [W-1:0] a_i, b_i, s_i, c_i, lo_i;
    logic [W-1:0] pp, s_d, c_d, lo_d;

    if (r == 0) begin : g_first
      assign v_i  = in_valid;
      assign sg_i = sgn;
      assign a_i  = a;
      assign b_i  = b;
      assign s_i  = '0;
      assign c_i  = '0;
      assign lo_i = '0;
    end else begin : g_next
      assign v_i  = v_q[r-1];
      assign sg_i = sg_q[r-1];
      assign a_i  = a_q[r-1];
      assign b_i  = b_q[r-1];
      assign s_i  = s_q[r-1];
      assign c_i  = c_q[r-1];
      assign lo_i = lo_q[r-1];
    end

    for (genvar j = 0; j < W; j++) begin : g_cell
      // Baugh-Wooley: invert the bits that pair exactly one sign bit.
      localparam bit MIXED = (j == W - 1) != (r == W - 1);
      assign pp[j] = (a_i[j] & b_i[r]) ^ (sg_i & MIXED);

      logic s_up;
      if (j == W - 1) begin : g_top
        assign s_up = 1'b0;
      end else begin : g_inner
        assign s_up = s_i[j+1];
      end

      full_adder u_fa (.x(pp[j]), .y(s_up), .z(c_i[j]), .sum(s_d[j]), .cout(c_d[j]));
    end

    always_comb begin
      lo_d    = lo_i;
      lo_d[r] = s_d[0];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v_q[r] <= 1'b0;
      else        v_q[r] <= v_i;
    end

    always_ff @(posedge clk) begin
      sg_q[r] <= sg_i;
      a_q[r]  <= a_i;
      b_q[r]  <= b_i;
      s_q[r]  <= s_d;
      c_q[r]  <= c_d;
      lo_q[r] <= lo_d;
    end
  end

  // Merge of the upper half: (sum >> 1) + carry + 2^W in signed mode.
  logic         m_valid;
  logic [W-1:0] m_hi;
  logic         m_cout;

  staggered_adder #(.W(W), .DIGIT(1)) u_merge (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v_q[W-1]),
    .x        ({1'b0, s_q[W-1][W-1:1]}),
    .y        (c_q[W-1]),
    .fb       (1'b0),
    .cin      (sg_q[W-1]),
    .out_valid(m_valid),
    .sum      (m_hi),
    .cout     (m_cout)
  );

  // The low half and the sign flag wait for the merge.
  logic [W-1:0] lo_dl [W];
  logic         sg_dl [W];
  always_ff @(posedge clk) begin
    lo_dl[0] <= lo_q[W-1];
    sg_dl[0] <= sg_q[W-1];
    for (int i = 1; i < W; i++) begin
      lo_dl[i] <= lo_dl[i-1];
      sg_dl[i] <= sg_dl[i-1];
    end
  end

  // The merge's carry out lies beyond the 2W-bit product and is dropped.
  assign out_valid = m_valid;
  assign p = {m_hi[W-1] ^ sg_dl[W-1], m_hi[W-2:0], lo_dl[W-1]};

endmodule
