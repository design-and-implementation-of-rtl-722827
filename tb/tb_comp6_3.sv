// Self-checking testbench of comp6_3: every one of the 64 input patterns is
// applied, and the outputs {z2, z1, z0} are compared with the number of ones
// in the pattern, counted here bit by bit. Each count 0..6 (one row of the
// compressor's counting table) must be reached at least once. Combinational,
// so every vector is checked 1 time unit after it is applied. A watchdog ends
// the run with a failure if it has not finished by time 100000.
module tb_comp6_3;
  localparam int NIN = 6;

  logic [NIN-1:0] in;
  logic           z0, z1, z2;
  int             checks = 0, failures = 0;
  int             seen [NIN+1];

  comp6_3 dut ( .a(in[5]), .b(in[4]), .c(in[3]), .d(in[2]), .e(in[1]), .f(in[0]), .z0(z0), .z1(z1), .z2(z2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    foreach (seen[i]) seen[i] = 0;
    for (int v = 0; v < (1 << NIN); v++) begin
      in = NIN'(v);
      ones = 0;
      for (int i = 0; i < NIN; i++) if (v[i]) ones++;
      #1;
      checks++;
      seen[ones]++;
      if ({z2, z1, z0} !== 3'(ones)) begin
        failures++;
        $display("FAIL in=%b expected %0d got z2z1z0=%b%b%b", in, ones, z2, z1, z0);
      end
    end
    // every row of the counting table was exercised
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("FAIL count %0d never produced", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_comp6_3
