// Staggered (bit-skewed) vector adder.
//
// D = W/DIGIT adder cells are connected in series. Cell k adds digit k of a
// word; its carry goes through a register to cell k+1, which meets the same
// word one serial clock later. Operand digit k is therefore delayed k clocks
// by an input skew shift register, and sum digit k is delayed D-1-k clocks
// by an output deskew shift register, so whole words go in and come out. A
// new addition enters every clock: the first result appears D clocks after
// its operands, and each further one a clock later (16 words of 16 bits
// take 16 + 15 clocks in radix 2).
//
// Integration (Z = Z + X(i)): when fb is set for a word, cell k takes its
// second operand from its own sum register, which holds digit k of the
// previous word's sum. Because that previous word left cell k exactly one
// clock earlier, the sum register is the one-stage shift register that
// closes the accumulation loop; no wider feedback is needed. The first word
// of a run supplies the starting value on y with fb clear.
//
// DIGIT = 1 uses single-bit adders (radix 2); DIGIT = 2 uses radix-4 digit
// adders with the same structure and half as many stages.
//
//   in_valid, x, y, fb, cin : one word per clock; cin is the carry into
//                             digit 0 (1 with an inverted y subtracts)
//   out_valid, sum, cout    : the result, stag_latency(W, DIGIT) clocks later
//
// The series chain with registered carries, the 16 + 15 clock timing and
// integration by feeding the sum back follow the architecture as specified;
// the skew/deskew registers, the valid flags and the carry in (for
// subtraction) are this implementation's choices. The carry out is provided
// for callers that need it; the units in this design work modulo 2^W and
// leave it open.
//
// The skew and deskew registers are not reset: only words marked valid are
// ever read, and the valid flags are reset.
module staggered_adder #(
  parameter int unsigned W     = 16,
  parameter int unsigned DIGIT = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         fb,
  input  logic         cin,
  output logic         out_valid,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned D = W / DIGIT;

  initial begin
    assert (DIGIT == 1 || DIGIT == 2) else $error("DIGIT must be 1 or 2");
    assert (W % DIGIT == 0) else $error("W must be a multiple of DIGIT");
  end

  // Per-stage registers: control travelling with the word, sum digit, carry.
  logic             v_q  [D];
  logic             fb_q [D];
  logic [DIGIT-1:0] s_q  [D];
  logic             c_q  [D];

  // Inputs of each stage in the current clock.
  logic             v_in  [D];
  logic             fb_in [D];
  logic             c_in  [D];
  logic [DIGIT-1:0] xd    [D];
  logic [DIGIT-1:0] yd    [D];

  for (genvar k = 0; k < D; k++) begin : g_stage
    // Input skew: digit k of x and y is delayed k clocks.
    if (k == 0) begin : g_noskew
      assign xd[k]    = x[DIGIT-1:0];
      assign yd[k]    = y[DIGIT-1:0];
      assign v_in[k]  = in_valid;
      assign fb_in[k] = fb;
      assign c_in[k]  = cin;
    end else begin : g_skew
      logic [DIGIT-1:0] xs [k];
      logic [DIGIT-1:0] ys [k];
      always_ff @(posedge clk) begin
        xs[0] <= x[k*DIGIT +: DIGIT];
        ys[0] <= y[k*DIGIT +: DIGIT];
        for (int i = 1; i < k; i++) begin
          xs[i] <= xs[i-1];
          ys[i] <= ys[i-1];
        end
      end
      assign xd[k]    = xs[k-1];
      assign yd[k]    = ys[k-1];
      assign v_in[k]  = v_q[k-1];
      assign fb_in[k] = fb_q[k-1];
      assign c_in[k]  = c_q[k-1];
    end

    // The adder cell; its second operand is its own previous sum in
    // integration mode.
    logic [DIGIT-1:0] op_b;
    logic [DIGIT-1:0] s_d;
    logic             c_d;
    assign op_b = fb_in[k] ? s_q[k] : yd[k];

    if (DIGIT == 1) begin : g_r2
      full_adder u_fa (
        .x(xd[k][0]), .y(op_b[0]), .z(c_in[k]), .sum(s_d[0]), .cout(c_d)
      );
    end else begin : g_r4
      radix4_digit_adder u_da (
        .x(xd[k]), .y(op_b), .cin(c_in[k]), .s(s_d), .cout(c_d)
      );
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_q[k]  <= 1'b0;
        fb_q[k] <= 1'b0;
      end else begin
        v_q[k]  <= v_in[k];
        fb_q[k] <= fb_in[k];
      end
    end

    // The sum register only changes for valid words so that an idle clock
    // inside an integration run does not lose the running sum.
    always_ff @(posedge clk) begin
      if (v_in[k]) begin
        s_q[k] <= s_d;
        c_q[k] <= c_d;
      end
    end

    // Output deskew: sum digit k waits D-1-k more clocks.
    if (k == D - 1) begin : g_nodeskew
      assign sum[k*DIGIT +: DIGIT] = s_q[k];
    end else begin : g_deskew
      localparam int unsigned L = D - 1 - k;
      logic [DIGIT-1:0] ds [L];
      always_ff @(posedge clk) begin
        ds[0] <= s_q[k];
        for (int i = 1; i < L; i++) ds[i] <= ds[i-1];
      end
      assign sum[k*DIGIT +: DIGIT] = ds[L-1];
    end
  end

  assign out_valid = v_q[D-1];
  assign cout      = c_q[D-1];

endmodule
