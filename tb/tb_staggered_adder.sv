// Test of the staggered adder in radix 2 (16 single-bit stages) and radix 4
// (8 digit stages), fed from the same random stream of additions,
// subtractions (inverted y, carry in 1) and integration runs, with idle
// clocks mixed in. Every result is compared with integer arithmetic, and
// must arrive exactly W/DIGIT clocks after its operands. A burst of 16
// back-to-back additions must finish 16 + 15 clocks after the first enters
// in radix 2 and 8 + 15 in radix 4.
module tb_staggered_adder;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, fb = 0, cin = 0;
  logic [W-1:0] x = 0, y = 0;
  logic         ov2, ov4, co2, co4;
  logic [W-1:0] s2, s4;
  int checks = 0, failures = 0, cycle = 0;

  typedef struct { logic [W:0] res; int due; } exp_t;
  exp_t q2[$], q4[$];
  logic [W-1:0] run_sum;
  int last2, last4, n_fb = 0;

  staggered_adder #(.W(W), .DIGIT(1)) dut2 (.clk, .rst_n, .in_valid, .x, .y, .fb, .cin,
    .out_valid(ov2), .sum(s2), .cout(co2));
  staggered_adder #(.W(W), .DIGIT(2)) dut4 (.clk, .rst_n, .in_valid, .x, .y, .fb, .cin,
    .out_valid(ov4), .sum(s4), .cout(co4));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Compare outputs just before each rising edge.
  always @(negedge clk) if (rst_n) begin
    if (ov2) begin
      checks++;
      if (q2.size() == 0 || {co2, s2} !== q2[0].res || cycle != q2[0].due) begin
        failures++;
        $display("FAIL r2 cycle %0d: %h", cycle, {co2, s2});
      end
      if (q2.size() != 0) void'(q2.pop_front());
      last2 = cycle;
    end
    if (ov4) begin
      checks++;
      if (q4.size() == 0 || {co4, s4} !== q4[0].res || cycle != q4[0].due) begin
        failures++;
        $display("FAIL r4 cycle %0d: %h", cycle, {co4, s4});
      end
      if (q4.size() != 0) void'(q4.pop_front());
      last4 = cycle;
    end
  end

  task automatic issue(logic [W-1:0] xv, logic [W-1:0] yv, logic fbv, logic cv);
    logic [W:0] r;
    @(negedge clk);
    in_valid = 1; x = xv; y = yv; fb = fbv; cin = cv;
    r = {1'b0, xv} + {1'b0, (fbv ? run_sum : yv)} + (W+1)'(cv);
    run_sum = r[W-1:0];
    q2.push_back('{r, cycle + W});
    q4.push_back('{r, cycle + W / 2});
    if (fbv) n_fb++;
  endtask

  task automatic idle(int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 0; x = W'($urandom); y = W'($urandom); fb = $urandom; cin = $urandom;
    end
  endtask

  int first;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Burst of 16 back-to-back additions: timing of first and last result.
    @(negedge clk);
    first = cycle + 1;  // the first word is driven at the next falling edge
    for (int i = 0; i < 16; i++) issue(W'($urandom), W'($urandom), 0, 0);
    idle(20);
    checks++;
    if (last2 - first != 16 + 15) begin
      failures++; $display("FAIL radix-2 burst took %0d", last2 - first);
    end
    checks++;
    if (last4 - first != 8 + 15) begin
      failures++; $display("FAIL radix-4 burst took %0d", last4 - first);
    end
    // Random mix.
    for (int t = 0; t < 400; t++) begin
      case ($urandom_range(0, 5))
        0: issue(W'($urandom), W'($urandom), 0, 0);
        1: issue(W'($urandom), ~W'($urandom), 0, 1);
        2: idle($urandom_range(1, 3));
        default: begin
          // Integration run: start value on y, then feedback words, with
          // an idle clock allowed inside the run.
          issue(W'($urandom), W'($urandom), 0, 0);
          repeat ($urandom_range(1, 15)) begin
            if ($urandom_range(0, 4) == 0) idle(1);
            issue(W'($urandom), W'($urandom), 1, $urandom_range(0, 1));
          end
        end
      endcase
    end
    idle(W + 4);
    checks++;
    if (q2.size() != 0 || q4.size() != 0 || n_fb == 0) begin
      failures++; $display("FAIL missing results %0d %0d or no feedback", q2.size(), q4.size());
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
