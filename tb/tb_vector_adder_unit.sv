// Test of the vector adder unit in radix 2 and radix 4, both driven from
// the same X and Y words: element-wise add and subtract into Z, and
// integration into the accumulator, starting from zero and continuing from
// the previous value. Results are compared with integer arithmetic. The
// time from start to done must be latency + N clocks: 16 + 16 in radix 2,
// 8 + 16 in radix 4 (first sum after one clock per digit, then one per clock).
module tb_vector_adder_unit
  import valu_pkg::*;
;
  localparam int N = 16, W = 16;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] x_words [N], y_words [N];
  logic start = 0, acc_clear = 0;
  add_op_e op = ADD_VADD;
  logic busy2, done2, busy4, done4;
  logic [W-1:0] z2 [N], z4 [N], acc2, acc4;
  logic [W-1:0] acc_model;
  int checks = 0, failures = 0, cycle = 0;

  vector_adder_unit #(.N(N), .W(W), .DIGIT(1)) dut2 (.clk, .rst_n, .x_words, .y_words,
    .start, .op, .acc_clear, .busy(busy2), .done(done2), .z_words(z2), .acc(acc2));
  vector_adder_unit #(.N(N), .W(W), .DIGIT(2)) dut4 (.clk, .rst_n, .x_words, .y_words,
    .start, .op, .acc_clear, .busy(busy4), .done(done4), .z_words(z4), .acc(acc4));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  int t_start, t_done2, t_done4;
  // Sampled just after each edge: the clock count at which done is seen.
  always @(posedge clk) begin
    #1;
    if (done2) t_done2 = cycle;
    if (done4) t_done4 = cycle;
  end

  task automatic check(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  task automatic run(add_op_e o, logic clr);
    @(negedge clk);
    op = o; acc_clear = clr; start = 1;
    @(posedge clk);
    #1 t_start = cycle;
    @(negedge clk);
    // A second start while busy must be ignored.
    op = ADD_VADD;
    @(negedge clk);
    start = 0;
    wait (!busy2 && !busy4);
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (t_done2 - t_start != 16 + N || t_done4 - t_start != 8 + N) begin
      failures++;
      $display("FAIL timing %0d %0d", t_done2 - t_start, t_done4 - t_start);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    acc_model = '0;
    for (int rep = 0; rep < 6; rep++) begin
      foreach (x_words[i]) begin
        x_words[i] = W'($urandom);
        y_words[i] = W'($urandom);
      end
      run(ADD_VADD, 0);
      foreach (z2[i]) begin
        check(z2[i], x_words[i] + y_words[i], "vadd r2");
        check(z4[i], x_words[i] + y_words[i], "vadd r4");
      end
      run(ADD_VSUB, 0);
      foreach (z2[i]) begin
        check(z2[i], x_words[i] - y_words[i], "vsub r2");
        check(z4[i], x_words[i] - y_words[i], "vsub r4");
      end
      run(ADD_VACC, rep == 0 || rep == 3);
      if (rep == 0 || rep == 3) acc_model = '0;
      foreach (x_words[i]) acc_model += x_words[i];
      check(acc2, acc_model, "vacc r2");
      check(acc4, acc_model, "vacc r4");
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
