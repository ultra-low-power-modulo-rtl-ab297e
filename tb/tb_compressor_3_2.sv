// Testbench for compressor_3_2: all eight inputs, a+b+c = sum + 2*carry.
module tb_compressor_3_2;
  int checks = 0, failures = 0;
  logic a, b, c, sum, carry;

  compressor_3_2 dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (int'(sum) + 2 * int'(carry) != $countones(v)) begin
        failures++;
        $display("FAIL 3:2 %03b -> sum=%0b carry=%0b", v[2:0], sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
