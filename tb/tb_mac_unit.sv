// Test of the multiplier-accumulator in radix 2 and radix 4, both driven
// from the same X and Y words: element-wise signed and unsigned products,
// and dot products into accumulator 0 starting from zero or continuing.
// The X and Y inputs are overwritten with new random data on the clock
// after start, which the input latches must hide. Results are compared with
// integer arithmetic; start to done must take N + multiplier latency +
// accumulator latency clocks (16 + 32 + 32 in radix 2, 16 + 5 + 16 in radix 4).
module tb_mac_unit
  import valu_pkg::*;
;
  localparam int N = 16, W = 16;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] x_words [N], y_words [N], xs [N], ys [N];
  logic start = 0, acc_clear = 0, sgn = 0;
  mac_op_e op = MAC_VMUL;
  logic busy2, done2, busy4, done4;
  logic [2*W-1:0] a2 [N], a4 [N];
  logic [2*W-1:0] dot_model;
  int checks = 0, failures = 0, cycle = 0;

  mac_unit #(.N(N), .W(W), .RADIX4(0)) dut2 (.clk, .rst_n, .x_words, .y_words, .start, .op,
    .sgn, .acc_clear, .busy(busy2), .done(done2), .acc_words(a2));
  mac_unit #(.N(N), .W(W), .RADIX4(1)) dut4 (.clk, .rst_n, .x_words, .y_words, .start, .op,
    .sgn, .acc_clear, .busy(busy4), .done(done4), .acc_words(a4));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  int t_start, t_done2, t_done4;
  always @(posedge clk) begin
    #1;
    if (done2) t_done2 = cycle;
    if (done4) t_done4 = cycle;
  end

  function automatic logic [2*W-1:0] prod(logic [W-1:0] a, logic [W-1:0] b, logic s);
    if (s) return (2*W)'($signed(a) * $signed(b));
    return (2*W)'({{W{1'b0}}, a} * {{W{1'b0}}, b});
  endfunction

  task automatic check(logic [2*W-1:0] got, logic [2*W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(mac_op_e o, logic s, logic clr);
    foreach (x_words[i]) begin
      x_words[i] = W'($urandom);
      y_words[i] = W'($urandom);
    end
    x_words[0] = {1'b1, {(W-1){1'b0}}};
    y_words[1] = '1;
    xs = x_words; ys = y_words;
    @(negedge clk);
    op = o; sgn = s; acc_clear = clr; start = 1;
    @(posedge clk);
    #1 t_start = cycle;
    @(negedge clk);
    start = 0;
    foreach (x_words[i]) begin
      x_words[i] = W'($urandom);
      y_words[i] = W'($urandom);
    end
    wait (!busy2 && !busy4);
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (t_done2 - t_start != N + 32 + 32 || t_done4 - t_start != N + 5 + 16) begin
      failures++;
      $display("FAIL timing %0d %0d", t_done2 - t_start, t_done4 - t_start);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int s = 0; s < 2; s++) begin
        run(MAC_VMUL, 1'(s), 0);
        foreach (xs[i]) begin
          check(a2[i], prod(xs[i], ys[i], 1'(s)), "vmul r2");
          check(a4[i], prod(xs[i], ys[i], 1'(s)), "vmul r4");
        end
        run(MAC_VMAC, 1'(s), 1);
        dot_model = '0;
        foreach (xs[i]) dot_model += prod(xs[i], ys[i], 1'(s));
        check(a2[0], dot_model, "vmac r2");
        check(a4[0], dot_model, "vmac r4");
        run(MAC_VMAC, 1'(s), 0);
        foreach (xs[i]) dot_model += prod(xs[i], ys[i], 1'(s));
        check(a2[0], dot_model, "vmac acc r2");
        check(a4[0], dot_model, "vmac acc r4");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
