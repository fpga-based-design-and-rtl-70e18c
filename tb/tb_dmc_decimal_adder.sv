// tb_dmc_decimal_adder: exhaustive check of the 4-bit + 4-bit symbol adder
// against integer addition (all 256 operand pairs), plus the worked
// example 1010 + 0110 = 10000.
module tb_dmc_decimal_adder;
  logic [3:0] a, b;
  logic [4:0] sum;
  int checks = 0, failures = 0;

  dmc_decimal_adder dut (.a(a), .b(b), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (int'(sum) != i + j) begin
          failures++;
          $display("FAIL %0d + %0d -> %0d", i, j, sum);
        end
      end
    a = 4'b1010; b = 4'b0110; #1;
    checks++;
    if (sum !== 5'b10000) begin failures++; $display("FAIL example"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
