// Testbench for compressor_5_2.
// All 128 input combinations: the count of ones on x1..x5, cin1, cin2 must
// equal sum + 2*(carry + cout1 + cout2); cout1 must not change with cin1 or
// cin2 and cout2 not with cin2 (no sideways ripple between columns). Two
// vectors with known outputs from a published simulation are checked exactly.
module tb_compressor_5_2;
  int checks = 0, failures = 0;
  logic [5:1] x;
  logic cin1, cin2, sum, carry, cout1, cout2;
  logic co1_ref;
  logic co2_at [2];

  compressor_5_2 dut (.x(x), .cin1(cin1), .cin2(cin2), .sum(sum), .carry(carry), .cout1(cout1), .cout2(cout2));

  task automatic expect_exact(logic [5:1] xi, logic c1, logic c2, logic [3:0] exp_sccc);
    x = xi; cin1 = c1; cin2 = c2;
    #1;
    checks++;
    if ({sum, carry, cout1, cout2} !== exp_sccc) begin
      failures++;
      $display("FAIL 5:2 vector x=%05b cin=%0b%0b -> %04b, expected %04b", xi, c1, c2, {sum, carry, cout1, cout2}, exp_sccc);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      for (int c = 0; c < 4; c++) begin
        x = 5'(v);
        {cin2, cin1} = 2'(c);
        #1;
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout1) + int'(cout2)) != $countones(v) + $countones(c)) begin
          failures++;
          $display("FAIL 5:2 count x=%05b cin1=%0b cin2=%0b", x, cin1, cin2);
        end
        if (c == 0) co1_ref = cout1;
        if (c < 2) co2_at[c] = cout2;
        checks++;
        if (cout1 !== co1_ref || cout2 !== co2_at[c % 2]) begin
          failures++;
          $display("FAIL 5:2 carry-out depends on carry-in x=%05b c=%0d", x, c);
        end
      end
    end
    // x written as x1..x5 from the left; outputs {sum, carry, cout1, cout2}
    expect_exact({1'b0, 1'b1, 1'b0, 1'b1, 1'b1}, 1'b0, 1'b0, 4'b1010);   // 11010
    expect_exact({1'b1, 1'b0, 1'b0, 1'b0, 1'b0}, 1'b0, 1'b0, 4'b1000);   // 00001
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
