// Test of the radix-4 multiplier; the latency must be 1 + ceil(log2(W/2 + 1)) = 5 clocks.
// Signed and unsigned products of random operands and of the corner values
// (0, 1, all ones, the most negative and most positive numbers), issued
// back to back and with idle clocks, are compared with integer
// multiplication, each at its expected arrival clock.
module tb_radix4_multiplier;
  localparam int W = 16;
  localparam int LAT = valu_pkg::r4_mul_latency(W);
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, sgn = 0;
  logic [W-1:0] a = 0, b = 0;
  logic out_valid;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0, cycle = 0, n_signed = 0;

  typedef struct { logic [2*W-1:0] res; int due; } exp_t;
  exp_t q[$];

  radix4_multiplier #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (q.size() == 0 || p !== q[0].res || cycle != q[0].due) begin
      failures++;
      $display("FAIL cycle %0d: p=%h expected %h due %0d", cycle, p,
               q.size() ? q[0].res : '0, q.size() ? q[0].due : -1);
    end
    if (q.size() != 0) void'(q.pop_front());
  end

  task automatic issue(logic [W-1:0] av, logic [W-1:0] bv, logic sv);
    logic [2*W-1:0] r;
    @(negedge clk);
    in_valid = 1; a = av; b = bv; sgn = sv;
    if (sv) r = (2*W)'($signed(av) * $signed(bv));
    else    r = (2*W)'({{W{1'b0}}, av} * {{W{1'b0}}, bv});
    q.push_back('{r, cycle + LAT});
    if (sv) n_signed++;
  endtask

  logic [W-1:0] corner [6];
  initial begin
    corner = '{'0, W'(1), '1, {1'b1, {(W-1){1'b0}}}, {1'b0, {(W-1){1'b1}}}, W'(3)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (corner[i]) foreach (corner[j]) begin
      issue(corner[i], corner[j], 0);
      issue(corner[i], corner[j], 1);
    end
    for (int t = 0; t < 600; t++) begin
      if ($urandom_range(0, 5) == 0) begin
        @(negedge clk);
        in_valid = 0; a = W'($urandom); b = W'($urandom);
      end else begin
        issue(W'($urandom), W'($urandom), 1'($urandom));
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_signed == 0) begin
      failures++; $display("FAIL %0d products missing", q.size());
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
