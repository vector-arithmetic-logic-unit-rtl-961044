// Vector adder unit: register banks, operand multiplexers, staggered adder
// and result bank.
//
// On start the unit multiplexes the N words of the X and Y banks, one per
// serial clock, into the staggered adder and writes the results, in the same
// order, into its result bank Z or its accumulator:
//   ADD_VADD  Z(i) = X(i) + Y(i)
//   ADD_VSUB  Z(i) = X(i) - Y(i)   (Y inverted, carry in 1)
//   ADD_VACC  ACC  = ACC + X(0) + ... + X(N-1)   (ACC starts from 0 when
//             acc_clear is set with start)
// Integration uses the adder's feedback mode: the first word adds the old
// accumulator value, every later word adds the running sum held inside the
// adder cells. Arithmetic is modulo 2^W.
//
// Register banks multiplexed word by word into the adder, the result bank
// and integration by feedback follow the architecture as specified;
// subtraction, the separate scalar accumulator and the handshake are this
// implementation's choices. The adder's carry out is unused because
// results wrap modulo 2^W.
//
// Timing: words enter the adder on the N clocks after start; the first
// result is written stag_latency(W, DIGIT) clocks after it entered and one
// more per clock after that; done pulses for one clock after the last
// write, and busy is high from the clock after start until then. start is
// ignored while busy. X and Y are read while the words are fed, so they
// must not be rewritten during the first N clocks of an operation.
module vector_adder_unit
  import valu_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned W     = 16,
  parameter int unsigned DIGIT = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] x_words [N],
  input  logic [W-1:0] y_words [N],
  input  logic         start,
  input  add_op_e      op,
  input  logic         acc_clear,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] z_words [N],
  output logic [W-1:0] acc
);

  localparam int unsigned IW = $clog2(N);

  add_op_e       op_q;
  logic          clr_q;
  logic          feed_on;
  logic [IW-1:0] feed_idx;
  logic [IW-1:0] wr_idx;

  // Operand multiplexers into the adder.
  logic         a_valid, a_fb, a_cin;
  logic [W-1:0] a_x, a_y;
  logic         r_valid, r_cout;
  logic [W-1:0] r_sum;

  always_comb begin
    a_valid = feed_on;
    a_x     = x_words[feed_idx];
    a_fb    = 1'b0;
    a_cin   = 1'b0;
    unique case (op_q)
      ADD_VSUB: begin
        a_y   = ~y_words[feed_idx];
        a_cin = 1'b1;
      end
      ADD_VACC: begin
        a_y  = clr_q ? '0 : acc;
        a_fb = (feed_idx != '0);
      end
      default: a_y = y_words[feed_idx];
    endcase
  end

  staggered_adder #(.W(W), .DIGIT(DIGIT)) u_add (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (a_valid),
    .x        (a_x),
    .y        (a_y),
    .fb       (a_fb),
    .cin      (a_cin),
    .out_valid(r_valid),
    .sum      (r_sum),
    .cout     (r_cout)
  );

  // Result bank: written in order as results leave the adder.
  vector_regbank #(.N(N), .W(W)) u_zbank (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (r_valid && op_q != ADD_VACC),
    .waddr(wr_idx),
    .wdata(r_sum),
    .q    (z_words)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q     <= ADD_VADD;
      clr_q    <= 1'b0;
      busy     <= 1'b0;
      done     <= 1'b0;
      feed_on  <= 1'b0;
      feed_idx <= '0;
      wr_idx   <= '0;
      acc      <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        op_q     <= op;
        clr_q    <= acc_clear;
        busy     <= 1'b1;
        feed_on  <= 1'b1;
        feed_idx <= '0;
        wr_idx   <= '0;
      end
      if (feed_on) begin
        feed_idx <= feed_idx + 1'b1;
        if (feed_idx == IW'(N - 1)) feed_on <= 1'b0;
      end
      if (r_valid) begin
        if (op_q == ADD_VACC) acc <= r_sum;
        wr_idx <= wr_idx + 1'b1;
        if (wr_idx == IW'(N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // Results only arrive for an operation in progress.
  a_result_in_op: assert property (@(posedge clk) disable iff (!rst_n) r_valid |-> busy);

endmodule
