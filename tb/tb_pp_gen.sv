// Testbench for pp_gen at N = 16 and N = 8.
// The rows must satisfy  sum of rows = X*Y + 2^N - N - 1  (mod 2^N + 1)
// for X, Y in [0, 2^N]. Driven with every pair at N = 8 and, at N = 16, with
// the special operands 0, 1, 2^N - 1, 2^N and random pairs.
module tb_pp_gen;
  int checks = 0, failures = 0;

  logic [16:0] x16, y16;
  logic [15:0] pp16 [16];
  logic [8:0]  x8, y8;
  logic [7:0]  pp8 [8];

  pp_gen #(.N(16)) dut16 (.x(x16), .y(y16), .pp(pp16));
  pp_gen #(.N(8))  dut8  (.x(x8),  .y(y8),  .pp(pp8));

  task automatic check16();
    longint m, acc, exp;
    #1;
    m = 65537;
    acc = 0;
    for (int i = 0; i < 16; i++) acc += longint'(pp16[i]);
    exp = (longint'(x16) * longint'(y16) + 65536 - 17) % m;
    checks++;
    if (acc % m != exp) begin
      failures++;
      $display("FAIL pp16 x=%0d y=%0d rows=%0d exp=%0d", x16, y16, acc % m, exp);
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
    static int special [4] = '{0, 1, 65535, 65536};
    for (int xv = 0; xv <= 256; xv++) begin
      for (int yv = 0; yv <= 256; yv++) begin
        int acc;
        x8 = 9'(xv); y8 = 9'(yv);
        #1;
        acc = 0;
        for (int i = 0; i < 8; i++) acc += int'(pp8[i]);
        checks++;
        if (acc % 257 != (xv * yv + 256 - 9) % 257) begin
          failures++;
          $display("FAIL pp8 x=%0d y=%0d", xv, yv);
        end
      end
    end
    foreach (special[i]) foreach (special[j]) begin
      x16 = 17'(special[i]); y16 = 17'(special[j]); check16();
    end
    for (int i = 0; i < 20000; i++) begin
      x16 = 17'($urandom_range(0, 65536));
      y16 = (i % 10 == 0) ? 17'h10000 : 17'($urandom_range(0, 65536));
      check16();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
