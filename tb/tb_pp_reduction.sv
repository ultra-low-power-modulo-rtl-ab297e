// Testbench for pp_reduction (N = 16).
// Seventeen random 16-bit operands (and all-zero / all-one sets) go in; the
// two output vectors must satisfy  Sum + Carry = sum of operands + 15
// (mod 2^16 + 1), 15 being the total weight the inverted wrap-around carries
// of the five compressor rows add.
module tb_pp_reduction;
  localparam int N = 16;
  localparam longint M = (longint'(1) << N) + 1;
  int checks = 0, failures = 0;

  logic [N-1:0] op [17];
  logic [N-1:0] sum_vec, carry_vec;

  pp_reduction #(.N(N)) dut (.op(op), .sum_vec(sum_vec), .carry_vec(carry_vec));

  task automatic check();
    longint acc;
    #1;
    acc = 0;
    foreach (op[i]) acc += longint'(op[i]);
    checks++;
    if ((longint'(sum_vec) + longint'(carry_vec)) % M != (acc + 15) % M) begin
      failures++;
      $display("FAIL reduction: sum=%h carry=%h, operands total %0d", sum_vec, carry_vec, acc);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (op[i]) op[i] = '0;
    check();
    foreach (op[i]) op[i] = '1;
    check();
    for (int k = 0; k < 17; k++) begin       // one operand at a time all ones
      foreach (op[i]) op[i] = (i == k) ? '1 : '0;
      check();
    end
    for (int t = 0; t < 50000; t++) begin
      foreach (op[i]) op[i] = N'($urandom);
      if (t % 5 == 0) op[$urandom_range(0, 16)] = '1;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
