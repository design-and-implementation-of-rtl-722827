// Self-checking testbench of full_adder: all eight input combinations, each
// compared with the arithmetic sum x + y + z. Combinational, so every vector
// is checked 1 time unit after it is applied. A watchdog ends the run with a
// failure if it has not finished by time 10000.
module tb_full_adder;
  logic x, y, z, sum, carry;
  int checks = 0, failures = 0;

  full_adder dut (.x(x), .y(y), .z(z), .sum(sum), .carry(carry));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v);
      #1;
      checks++;
      if ({carry, sum} !== 2'(int'(x) + int'(y) + int'(z))) begin
        failures++;
        $display("FAIL x=%0b y=%0b z=%0b -> carry=%0b sum=%0b", x, y, z, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_full_adder
