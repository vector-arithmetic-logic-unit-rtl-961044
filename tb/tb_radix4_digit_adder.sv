// Exhaustive test of the radix-4 digit adder: all 32 combinations of two
// base-4 digits and a carry, including the extreme 3 + 3 + 1 = carry 1, digit 3.
module tb_radix4_digit_adder;
  logic [1:0] x, y, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  radix4_digit_adder dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin
    for (int i = 0; i < 32; i++) begin
      {x, y, cin} = 5'(i);
      #1;
      checks++;
      if (int'(s) != (int'(x) + int'(y) + int'(cin)) % 4 ||
          int'(cout) != (int'(x) + int'(y) + int'(cin)) / 4) begin
        failures++;
        $display("FAIL %0d+%0d+%0d -> cout=%0d s=%0d", x, y, cin, cout, s);
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
