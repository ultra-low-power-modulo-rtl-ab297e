// Testbench for cgen: all eight inputs, output compared with "at least two of
// the three inputs are 1".
module tb_cgen;
  int checks = 0, failures = 0;
  logic x1, x2, x3, o;

  cgen dut (.x1(x1), .x2(x2), .x3(x3), .o(o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x1, x2, x3} = 3'(v);
      #1;
      checks++;
      if (o !== (int'(x1) + int'(x2) + int'(x3) >= 2)) begin
        failures++;
        $display("FAIL cgen %0b%0b%0b -> %0b", x1, x2, x3, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
