// Testbench for compressor_7_2.
// All 512 input combinations: the count of ones on x1..x7, cin1, cin2 must
// equal sum + 2*(carry + cout1) + 4*cout2, and cout1, cout2 must not change
// with cin1, cin2. Six vectors with known outputs from a published simulation
// are checked exactly.
module tb_compressor_7_2;
  int checks = 0, failures = 0;
  logic [7:1] x;
  logic cin1, cin2, sum, carry, cout1, cout2;
  logic [1:0] co_ref;

  compressor_7_2 dut (.x(x), .cin1(cin1), .cin2(cin2), .sum(sum), .carry(carry), .cout1(cout1), .cout2(cout2));

  // xi is written x7..x1 from the left; exp is {sum, carry, cout1, cout2}
  task automatic expect_exact(logic [7:1] xi, logic c1, logic c2, logic [3:0] exp);
    x = xi; cin1 = c1; cin2 = c2;
    #1;
    checks++;
    if ({sum, carry, cout1, cout2} !== exp) begin
      failures++;
      $display("FAIL 7:2 vector x=%07b cin=%0b%0b -> %04b, expected %04b", xi, c1, c2, {sum, carry, cout1, cout2}, exp);
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
    for (int v = 0; v < 128; v++) begin
      for (int c = 0; c < 4; c++) begin
        x = 7'(v);
        {cin2, cin1} = 2'(c);
        #1;
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout1)) + 4 * int'(cout2) != $countones(v) + $countones(c)) begin
          failures++;
          $display("FAIL 7:2 count x=%07b cin1=%0b cin2=%0b -> s%0b c%0b o1 %0b o2 %0b", x, cin1, cin2, sum, carry, cout1, cout2);
        end
        if (c == 0) co_ref = {cout1, cout2};
        checks++;
        if ({cout1, cout2} !== co_ref) begin
          failures++;
          $display("FAIL 7:2 carry-out depends on carry-in x=%07b c=%0d", x, c);
        end
      end
    end
    expect_exact(7'b0000011, 1'b0, 1'b0, 4'b0010);
    expect_exact(7'b0000111, 1'b0, 1'b0, 4'b1010);
    expect_exact(7'b0000111, 1'b1, 1'b0, 4'b0110);
    expect_exact(7'b0000111, 1'b1, 1'b1, 4'b1110);
    expect_exact(7'b1101101, 1'b1, 1'b1, 4'b1101);
    expect_exact(7'b1111101, 1'b1, 1'b1, 4'b0111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
