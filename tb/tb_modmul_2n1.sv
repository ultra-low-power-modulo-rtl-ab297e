// End-to-end testbench for modmul_2n1 at its only size, modulo 2^16 + 1.
// Compares r with x*y mod 65537 computed in 64-bit arithmetic, and r with
// (sum_vec + carry_vec + 1) mod 65537. Drives every pair of special operands
// (0, 1, 2, 2^15, 2^16 - 1, 2^16), random pairs in [0, 2^16] with extra
// weight on 2^16, and random 16-bit operands as used in IDEA (bit 16 tied to
// 0, a zero operand standing for 2^16 given as x[16] = 1, r[16] dropped).
// It counts how often each mechanism of the design is exercised and fails if
// one never is: each operand group (A: both below 2^16, B: x = 2^16,
// D: y = 2^16, C: both 2^16), a final-adder carry out of 0 and of 1 (the
// inverted end-around carry), the all-propagate case giving r = 2^16, and
// set inverted wrap bit at column 0 of the carry vector.
module tb_modmul_2n1;
  localparam longint M = 65537;
  int checks = 0, failures = 0;
  int n_grp_a = 0, n_grp_b = 0, n_grp_d = 0, n_grp_c = 0;
  int n_cout0 = 0, n_cout1 = 0, n_r2n = 0, n_wrap0 = 0, n_idea = 0;

  logic [16:0] x, y, r;
  logic [15:0] sum_vec, carry_vec;

  modmul_2n1 dut (.x(x), .y(y), .r(r), .sum_vec(sum_vec), .carry_vec(carry_vec));

  task automatic check();
    longint exp, t;
    #1;
    exp = (longint'(x) * longint'(y)) % M;
    t = longint'(sum_vec) + longint'(carry_vec);
    checks += 2;
    if (longint'(r) != exp) begin
      failures++;
      $display("FAIL r: x=%0d y=%0d r=%0d exp=%0d", x, y, r, exp);
    end
    if (longint'(r) != (t + 1) % M) begin
      failures++;
      $display("FAIL final add: sum=%h carry=%h r=%h", sum_vec, carry_vec, r);
    end
    case ({x[16], y[16]})
      2'b00: n_grp_a++;
      2'b10: n_grp_b++;
      2'b01: n_grp_d++;
      2'b11: n_grp_c++;
    endcase
    if (t >= 65536) n_cout1++; else n_cout0++;
    if (r[16]) n_r2n++;
    if (carry_vec[0]) n_wrap0++;
  endtask

  function automatic longint idea_mul(logic [15:0] a, logic [15:0] b);
    longint aa = (a == 0) ? 65536 : longint'(a);
    longint bb = (b == 0) ? 65536 : longint'(b);
    return ((aa * bb) % M) % 65536;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int special [6] = '{0, 1, 2, 32768, 65535, 65536};
    foreach (special[i]) foreach (special[j]) begin
      x = 17'(special[i]); y = 17'(special[j]); check();
    end
    for (int i = 0; i < 200000; i++) begin
      x = (i % 16 == 1) ? 17'h10000 : 17'($urandom_range(0, 65536));
      y = (i % 16 == 2) ? 17'h10000 : 17'($urandom_range(0, 65536));
      check();
    end
    // IDEA operands: 16-bit, zero meaning 2^16
    for (int i = 0; i < 20000; i++) begin
      logic [15:0] a, b;
      a = (i % 50 == 0) ? 16'h0 : 16'($urandom);
      b = (i % 70 == 0) ? 16'h0 : 16'($urandom);
      x = {a == 16'h0, a};
      y = {b == 16'h0, b};
      #1;
      checks++;
      n_idea++;
      if (longint'(r[15:0]) != idea_mul(a, b)) begin
        failures++;
        $display("FAIL IDEA a=%h b=%h r=%h exp=%h", a, b, r[15:0], idea_mul(a, b));
      end
    end
    $display("group A %0d, B %0d, D %0d, C %0d; adder carry out 0: %0d, 1: %0d; r = 2^16: %0d; wrap bit set: %0d; IDEA: %0d",
             n_grp_a, n_grp_b, n_grp_d, n_grp_c, n_cout0, n_cout1, n_r2n, n_wrap0, n_idea);
    checks += 9;
    if (n_grp_a == 0) begin failures++; $display("FAIL group A never reached"); end
    if (n_grp_b == 0) begin failures++; $display("FAIL group B never reached"); end
    if (n_grp_d == 0) begin failures++; $display("FAIL group D never reached"); end
    if (n_grp_c == 0) begin failures++; $display("FAIL group C never reached"); end
    if (n_cout0 == 0) begin failures++; $display("FAIL adder carry out 0 never reached"); end
    if (n_cout1 == 0) begin failures++; $display("FAIL adder carry out 1 never reached"); end
    if (n_r2n == 0)   begin failures++; $display("FAIL result 2^16 never reached"); end
    if (n_wrap0 == 0) begin failures++; $display("FAIL wrap bit never set"); end
    if (n_idea == 0)  begin failures++; $display("FAIL IDEA operands never applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
