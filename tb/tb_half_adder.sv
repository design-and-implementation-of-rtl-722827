// Self-checking testbench of half_adder: all four input combinations, each
// compared with the arithmetic sum x + y. Combinational, so every vector is
// checked 1 time unit after it is applied. A watchdog ends the run with a
// failure if it has not finished by time 10000.
module tb_half_adder;
  logic x, y, sum, carry;
  int checks = 0, failures = 0;

  half_adder dut (.x(x), .y(y), .sum(sum), .carry(carry));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x, y} = 2'(v);
      #1;
      checks++;
      if ({carry, sum} !== 2'(int'(x) + int'(y))) begin
        failures++;
        $display("FAIL x=%0b y=%0b -> carry=%0b sum=%0b", x, y, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_half_adder
