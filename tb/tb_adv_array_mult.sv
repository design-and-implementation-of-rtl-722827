// End-to-end self-checking testbench of adv_array_mult at its only size,
// 5 x 5 bits. It first applies the worked example of the design
// (11001 x 01001 = 0011100001, i.e. 25 * 9 = 225), then all 1024 operand
// pairs, comparing p with a * b computed here.
//
// Alongside, a column model of the reduction (each column's ones counted,
// bit 0 kept, bit 1 passed one column up, bit 2 two columns up) tracks how
// often each column's counter has to produce its weight-2 and its weight-4
// output. Every column from 1 to 8 must need its weight-2 output, and every
// column from 2 to 7 its weight-4 output, at least once, or the run counts a
// failure. Column 9 must never hold more than a single one, which is what
// allows the design to merge its two carries with an exclusive-or.
//
// The multiplier is combinational: each vector is checked 1 time unit after
// it is applied. A watchdog ends the run with a failure if it has not finished
// by time 100000.
module tb_adv_array_mult;
  import aam_pkg::*;

  operand_t a, b;
  product_t p;
  int       checks = 0, failures = 0;
  int       w2_seen [10];
  int       w4_seen [10];

  adv_array_mult dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_product(input int va, input int vb);
    a = operand_t'(va);
    b = operand_t'(vb);
    #1;
    checks++;
    if (p !== product_t'(va * vb)) begin
      failures++;
      $display("FAIL %0d * %0d: expected %0d got %0d", va, vb, va * vb, p);
    end
    model_columns(va, vb);
  endtask

  // Column model: cnt = partial products of the column + bits carried in
  task automatic model_columns(input int va, input int vb);
    int in [12];
    int cnt;
    foreach (in[c]) in[c] = 0;
    for (int c = 0; c < 2 * N; c++) begin
      cnt = in[c];
      for (int i = 0; i < N; i++)
        if (c - i >= 0 && c - i < N) cnt += ((va >> i) & (vb >> (c - i)) & 1);
      if (cnt >= 2) w2_seen[c]++;
      if (cnt >= 4) w4_seen[c]++;
      in[c+1] += (cnt >> 1) & 1;
      in[c+2] += (cnt >> 2) & 1;
      if (c == 2 * N - 1) begin
        checks++;
        if (cnt > 1) begin
          failures++;
          $display("FAIL %0d * %0d: column 9 holds %0d ones", va, vb, cnt);
        end
      end
    end
  endtask

  initial begin
    foreach (w2_seen[i]) begin
      w2_seen[i] = 0;
      w4_seen[i] = 0;
    end

    // worked example: 11001 * 01001 = 0011100001
    check_product(25, 9);
    checks++;
    if (p !== 10'b0011100001) begin
      failures++;
      $display("FAIL worked example gave %b", p);
    end

    for (int va = 0; va < (1 << N); va++)
      for (int vb = 0; vb < (1 << N); vb++)
        check_product(va, vb);

    for (int c = 1; c <= 8; c++) begin
      $display("column %0d: weight-2 output used %0d times, weight-4 output %0d times",
               c, w2_seen[c], w4_seen[c]);
      checks++;
      if (w2_seen[c] == 0) begin
        failures++;
        $display("FAIL column %0d never used its weight-2 output", c);
      end
      if (c >= 2 && c <= 7) begin
        checks++;
        if (w4_seen[c] == 0) begin
          failures++;
          $display("FAIL column %0d never used its weight-4 output", c);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_adv_array_mult
