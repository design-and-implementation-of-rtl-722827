// Self-checking testbench of pp_gen at its default 5-bit width: for every
// pair of operands, each partial-product bit pp[j][i] is compared with
// a[i] & b[j], and the weighted sum of all partial products with a * b.
// Combinational, so every vector is checked 1 time unit after it is applied.
// A watchdog ends the run with a failure if it has not finished by time
// 100000.
module tb_pp_gen;
  import aam_pkg::*;

  operand_t            a, b;
  logic [N-1:0][N-1:0] pp;
  int                  checks = 0, failures = 0;

  pp_gen dut (.a(a), .b(b), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int va = 0; va < (1 << N); va++) begin
      for (int vb = 0; vb < (1 << N); vb++) begin
        a = operand_t'(va);
        b = operand_t'(vb);
        #1;
        total = 0;
        for (int j = 0; j < N; j++) begin
          for (int i = 0; i < N; i++) begin
            checks++;
            if (pp[j][i] !== (a[i] & b[j])) begin
              failures++;
              $display("FAIL a=%0d b=%0d pp[%0d][%0d]=%0b", va, vb, j, i, pp[j][i]);
            end
            if (pp[j][i]) total += 1 << (i + j);
          end
        end
        checks++;
        if (total != va * vb) begin
          failures++;
          $display("FAIL a=%0d b=%0d weighted sum %0d", va, vb, total);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_pp_gen
