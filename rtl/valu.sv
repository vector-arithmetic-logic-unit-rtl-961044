// Vector arithmetic logic unit (top level).
//
// Two vector register banks, X and Y, each N words of W bits, feed two
// units that work independently and at the same time:
//   - the vector adder unit: element-wise add and subtract into the result
//     bank Z, and integration of X into the accumulator ACC;
//   - the multiplier-accumulator unit: element-wise products into N 2W-bit
//     accumulators, or a dot product accumulated into accumulator 0.
// Everything runs on one clock, the serial clock. Both units are bit-level
// pipelined: each adder cell sits between registers, so a vector of N words
// streams through at one word per clock after the pipeline fills.
//
// Host interface: x_we / y_we write xy_wdata into word xy_waddr of X or Y.
// add_start with add_op / add_acc_clear starts the adder unit, mac_start with
// mac_op / mac_sgn / mac_acc_clear the multiplier-accumulator; each unit has
// its own busy and a one-clock done pulse and ignores start while busy. The
// multiplier-accumulator latches X and Y at its start; the adder reads them
// during the N clocks after its start.
//
// Shared X/Y banks, the two concurrent units and the radix-4 option follow
// the architecture as specified; the host write port and command
// handshake are this implementation's choices.
//
// RADIX4 = 0 is the radix-2 design. RADIX4 = 1 builds both units from
// radix-4 digit adders and the radix-4 multiplier.
module valu
  import valu_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned W      = 16,
  parameter bit          RADIX4 = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // X / Y register bank writes
  input  logic                 x_we,
  input  logic                 y_we,
  input  logic [$clog2(N)-1:0] xy_waddr,
  input  logic [W-1:0]         xy_wdata,
  // adder unit
  input  logic                 add_start,
  input  add_op_e              add_op,
  input  logic                 add_acc_clear,
  output logic                 add_busy,
  output logic                 add_done,
  output logic [W-1:0]         z_words [N],
  output logic [W-1:0]         add_acc,
  // multiplier-accumulator unit
  input  logic                 mac_start,
  input  mac_op_e              mac_op,
  input  logic                 mac_sgn,
  input  logic                 mac_acc_clear,
  output logic                 mac_busy,
  output logic                 mac_done,
  output logic [2*W-1:0]       mac_acc [N]
);

  logic [W-1:0] x_words [N];
  logic [W-1:0] y_words [N];

  vector_regbank #(.N(N), .W(W)) u_xbank (
    .clk(clk), .rst_n(rst_n), .we(x_we), .waddr(xy_waddr), .wdata(xy_wdata), .q(x_words)
  );

  vector_regbank #(.N(N), .W(W)) u_ybank (
    .clk(clk), .rst_n(rst_n), .we(y_we), .waddr(xy_waddr), .wdata(xy_wdata), .q(y_words)
  );

  vector_adder_unit #(.N(N), .W(W), .DIGIT(RADIX4 ? 2 : 1)) u_adder (
    .clk      (clk),
    .rst_n    (rst_n),
    .x_words  (x_words),
    .y_words  (y_words),
    .start    (add_start),
    .op       (add_op),
    .acc_clear(add_acc_clear),
    .busy     (add_busy),
    .done     (add_done),
    .z_words  (z_words),
    .acc      (add_acc)
  );

  mac_unit #(.N(N), .W(W), .RADIX4(RADIX4)) u_mac (
    .clk      (clk),
    .rst_n    (rst_n),
    .x_words  (x_words),
    .y_words  (y_words),
    .start    (mac_start),
    .op       (mac_op),
    .sgn      (mac_sgn),
    .acc_clear(mac_acc_clear),
    .busy     (mac_busy),
    .done     (mac_done),
    .acc_words(mac_acc)
  );

endmodule
