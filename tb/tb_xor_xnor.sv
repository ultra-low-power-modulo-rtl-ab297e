// Testbench for xor_xnor: all four input pairs, both rails checked.
module tb_xor_xnor;
  int checks = 0, failures = 0;
  logic a, b, x, xn;

  xor_xnor dut (.a(a), .b(b), .x(x), .xn(xn));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks += 2;
      if (x  !== (a != b)) begin failures++; $display("FAIL xor  a=%0b b=%0b", a, b); end
      if (xn !== (a == b)) begin failures++; $display("FAIL xnor a=%0b b=%0b", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
