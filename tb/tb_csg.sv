// Testbench for csg (K = 4): every pair of 4-bit operands and both carry-ins;
// the slice sum must be the low 4 bits of a + b + cin.
module tb_csg;
  localparam int K = 4;
  int checks = 0, failures = 0;
  logic [K-1:0] a, b, s;
  logic cin;

  csg #(.K(K)) dut (.g(a[K-2:0] & b[K-2:0]), .p(a[K-2:0] | b[K-2:0]), .psum(a ^ b), .cin(cin), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * K + 1)); v++) begin
      {cin, a, b} = (2 * K + 1)'(v);
      #1;
      checks++;
      if (s !== K'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL csg a=%0h b=%0h cin=%0b s=%0h", a, b, cin, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
