// Test of the vector register bank: reset value, writes to every word in a
// random order, and that a write touches only its own word.
module tb_vector_regbank;
  localparam int N = 16, W = 16;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] waddr;
  logic [W-1:0] wdata;
  logic [W-1:0] q [N];
  logic [W-1:0] model [N];
  int checks = 0, failures = 0;

  vector_regbank #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic compare(string what);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (q[i] !== model[i]) begin
        failures++;
        $display("FAIL %s word %0d: %h expected %h", what, i, q[i], model[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare("reset");
    for (int t = 0; t < 200; t++) begin
      we    = ($urandom_range(0, 3) != 0);
      waddr = 4'($urandom_range(0, N - 1));
      wdata = W'($urandom);
      @(posedge clk);
      if (we) model[waddr] = wdata;
      @(negedge clk);
      compare("write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
