// Multiplier-accumulator unit.
//
// On start the unit copies the X and Y banks into its own input latches, so
// new data can be written to X and Y while it works. It then feeds one pair
// X(i), Y(i) per serial clock into a pipelined multiplier, and every product
// into a 2W-bit staggered adder whose output lands in a bank of N 2W-bit
// accumulators:
//   MAC_VMUL  A(i) = X(i) * Y(i)                    (y operand 0)
//   MAC_VMAC  A(0) = A(0) + sum_i X(i) * Y(i)       (the staggered adder
//             integrates: the first product adds A(0), or 0 when acc_clear
//             is given with start, later products add the running sum)
// sgn selects two's complement operands; the sums are modulo 2^(2W).
//
// RADIX4 = 0 uses the radix-2 array multiplier and a single-bit staggered
// accumulator; RADIX4 = 1 uses the radix-4 multiplier and radix-4 digit
// adders in the accumulator.
//
// Input latches, N 32-bit accumulators, element-wise products and the dot
// product follow the architecture as specified. Routing every product
// through the staggered accumulator (also for MAC_VMUL, with y = 0), the
// dot product landing in accumulator 0 and the start/busy/done handshake
// are this implementation's choices. The accumulator's carry out is unused
// because sums wrap modulo 2^(2W).
//
// Timing: pairs enter the multiplier on the N clocks after start. A product
// reaches its accumulator LAT = multiplier latency + accumulator latency
// clocks after its pair entered (64 for W = 16 in radix 2). done pulses one
// clock after the last write; busy is high from the clock after start until
// then, and start is ignored while busy.
module mac_unit
  import valu_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned W      = 16,
  parameter bit          RADIX4 = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [W-1:0]   x_words   [N],
  input  logic [W-1:0]   y_words   [N],
  input  logic           start,
  input  mac_op_e        op,
  input  logic           sgn,
  input  logic           acc_clear,
  output logic           busy,
  output logic           done,
  output logic [2*W-1:0] acc_words [N]
);

  localparam int unsigned IW    = $clog2(N);
  localparam int unsigned DIGIT = RADIX4 ? 2 : 1;

  // Input latches.
  logic [W-1:0]  xl [N];
  logic [W-1:0]  yl [N];
  mac_op_e       op_q;
  logic          sgn_q, clr_q;
  logic          feed_on;
  logic [IW-1:0] feed_idx;
  logic [IW-1:0] prod_idx;
  logic [IW-1:0] wr_idx;

  // Multiplier.
  logic           m_valid;
  logic [2*W-1:0] m_p;

  if (RADIX4) begin : g_mul_r4
    radix4_multiplier #(.W(W)) u_mul (
      .clk(clk), .rst_n(rst_n), .in_valid(feed_on),
      .a(xl[feed_idx]), .b(yl[feed_idx]), .sgn(sgn_q),
      .out_valid(m_valid), .p(m_p)
    );
  end else begin : g_mul_r2
    array_multiplier #(.W(W)) u_mul (
      .clk(clk), .rst_n(rst_n), .in_valid(feed_on),
      .a(xl[feed_idx]), .b(yl[feed_idx]), .sgn(sgn_q),
      .out_valid(m_valid), .p(m_p)
    );
  end

  // Accumulating adder.
  logic           a_fb;
  logic [2*W-1:0] a_y;
  logic           r_valid, r_cout;
  logic [2*W-1:0] r_sum;

  always_comb begin
    a_fb = (op_q == MAC_VMAC) && (prod_idx != '0);
    a_y  = (op_q == MAC_VMAC && !clr_q) ? acc_words[0] : '0;
  end

  staggered_adder #(.W(2 * W), .DIGIT(DIGIT)) u_acc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (m_valid),
    .x        (m_p),
    .y        (a_y),
    .fb       (a_fb),
    .cin      (1'b0),
    .out_valid(r_valid),
    .sum      (r_sum),
    .cout     (r_cout)
  );

  vector_regbank #(.N(N), .W(2 * W)) u_accbank (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (r_valid),
    .waddr(op_q == MAC_VMAC ? '0 : wr_idx),
    .wdata(r_sum),
    .q    (acc_words)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q     <= MAC_VMUL;
      sgn_q    <= 1'b0;
      clr_q    <= 1'b0;
      busy     <= 1'b0;
      done     <= 1'b0;
      feed_on  <= 1'b0;
      feed_idx <= '0;
      prod_idx <= '0;
      wr_idx   <= '0;
      for (int i = 0; i < N; i++) begin
        xl[i] <= '0;
        yl[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        op_q     <= op;
        sgn_q    <= sgn;
        clr_q    <= acc_clear;
        busy     <= 1'b1;
        feed_on  <= 1'b1;
        feed_idx <= '0;
        prod_idx <= '0;
        wr_idx   <= '0;
        xl       <= x_words;
        yl       <= y_words;
      end
      if (feed_on) begin
        feed_idx <= feed_idx + 1'b1;
        if (feed_idx == IW'(N - 1)) feed_on <= 1'b0;
      end
      if (m_valid) prod_idx <= prod_idx + 1'b1;
      if (r_valid) begin
        wr_idx <= wr_idx + 1'b1;
        if (wr_idx == IW'(N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_result_in_op: assert property (@(posedge clk) disable iff (!rst_n) r_valid |-> busy);
  a_product_in_op: assert property (@(posedge clk) disable iff (!rst_n) m_valid |-> busy);

endmodule
