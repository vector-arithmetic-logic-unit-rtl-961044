// Exhaustive test of the single-bit adder cell against integer addition.
module tb_full_adder;
  logic x, y, z, sum, cout;
  int checks = 0, failures = 0;

  full_adder dut (.x(x), .y(y), .z(z), .sum(sum), .cout(cout));

  initial begin
    for (int i = 0; i < 8; i++) begin
      {x, y, z} = 3'(i);
      #1;
      checks++;
      if ({cout, sum} != 2'(int'(x) + int'(y) + int'(z))) begin
        failures++;
        $display("FAIL x=%0d y=%0d z=%0d -> cout=%0d sum=%0d", x, y, z, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
