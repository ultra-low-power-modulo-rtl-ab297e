// Testbench for sparse_eac_adder.
// Six instances: inverted and plain EAC at N = 16 (the multiplier's size), at
// N = 32 (the other width named for K = 4) and at N = 8 (small enough to try
// every operand pair). For the inverted form
//   s = (a + b + !cout) mod 2^N  and  {all_prop, s} = (a + b + 1) mod (2^N+1);
// for the plain form s = (a + b + cout) mod 2^N. N = 16 gets corner cases
// (all-propagate sums, all ones, zero) and random pairs; N = 32 random pairs.
module tb_sparse_eac_adder;
  int checks = 0, failures = 0;
  int n_allprop = 0;

  logic [15:0] a16, b16, si16, se16;
  logic        pi16, pe16;
  logic [7:0]  a8, b8, si8, se8;
  logic [31:0] a32, b32, si32, se32;
  logic        pi32, pe32;
  logic        pi8, pe8;

  sparse_eac_adder #(.N(16), .K(4), .INVERTED(1'b1)) dut_i16 (.a(a16), .b(b16), .s(si16), .all_prop(pi16));
  sparse_eac_adder #(.N(16), .K(4), .INVERTED(1'b0)) dut_e16 (.a(a16), .b(b16), .s(se16), .all_prop(pe16));
  sparse_eac_adder #(.N(8),  .K(4), .INVERTED(1'b1)) dut_i8  (.a(a8),  .b(b8),  .s(si8),  .all_prop(pi8));
  sparse_eac_adder #(.N(32), .K(4), .INVERTED(1'b1)) dut_i32 (.a(a32), .b(b32), .s(si32), .all_prop(pi32));
  sparse_eac_adder #(.N(32), .K(4), .INVERTED(1'b0)) dut_e32 (.a(a32), .b(b32), .s(se32), .all_prop(pe32));
  sparse_eac_adder #(.N(8),  .K(4), .INVERTED(1'b0)) dut_e8  (.a(a8),  .b(b8),  .s(se8),  .all_prop(pe8));

  task automatic check16();
    longint t, m;
    logic [15:0] exp_i, exp_e;
    #1;
    t = longint'(a16) + longint'(b16);
    exp_i = 16'(t + ((t >> 16) == 0 ? 1 : 0));
    exp_e = 16'(t + (t >> 16));
    m = (t + 1) % 65537;
    checks += 4;
    if (si16 !== exp_i) begin failures++; $display("FAIL IEAC16 %h+%h s=%h exp=%h", a16, b16, si16, exp_i); end
    if (longint'({pi16, si16}) != m) begin failures++; $display("FAIL IEAC16 mod %h+%h r=%h exp=%h", a16, b16, {pi16, si16}, m); end
    if (se16 !== exp_e) begin failures++; $display("FAIL EAC16 %h+%h s=%h exp=%h", a16, b16, se16, exp_e); end
    if (pe16 !== ((a16 ^ b16) == 16'hffff)) begin failures++; $display("FAIL EAC16 all_prop"); end
    if (pi16) n_allprop++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // N = 8, exhaustive
    for (int v = 0; v < 65536; v++) begin
      int t;
      {a8, b8} = 16'(v);
      #1;
      t = int'(a8) + int'(b8);
      checks += 3;
      if (si8 !== 8'(t + ((t >> 8) == 0 ? 1 : 0))) begin failures++; $display("FAIL IEAC8 %h+%h s=%h", a8, b8, si8); end
      if (int'({pi8, si8}) != (t + 1) % 257) begin failures++; $display("FAIL IEAC8 mod %h+%h", a8, b8); end
      if (se8 !== 8'(t + (t >> 8))) begin failures++; $display("FAIL EAC8 %h+%h s=%h", a8, b8, se8); end
      checks++;
      if (pe8 !== ((a8 ^ b8) == 8'hff)) begin failures++; $display("FAIL EAC8 all_prop"); end
    end
    // N = 16, corners
    a16 = 16'h0000; b16 = 16'h0000; check16();
    a16 = 16'hffff; b16 = 16'h0000; check16();
    a16 = 16'hffff; b16 = 16'hffff; check16();
    a16 = 16'haaaa; b16 = 16'h5555; check16();
    a16 = 16'h8000; b16 = 16'h8000; check16();
    a16 = 16'h0001; b16 = 16'hfffe; check16();
    a16 = 16'h0001; b16 = 16'hffff; check16();
    a16 = 16'h1234; b16 = 16'hedcb; check16();
    // N = 16, random, with a share of all-propagate pairs
    for (int i = 0; i < 100000; i++) begin
      a16 = 16'($urandom);
      b16 = (i % 8 == 0) ? ~a16 : 16'($urandom);
      check16();
    end
    // N = 32, random
    for (int i = 0; i < 20000; i++) begin
      longint t;
      a32 = $urandom;
      b32 = (i % 8 == 0) ? ~a32 : $urandom;
      #1;
      t = longint'(a32) + longint'(b32);
      checks += 4;
      if (si32 !== 32'(t + ((t >> 32) == 0 ? 1 : 0))) begin failures++; $display("FAIL IEAC32 %h+%h s=%h", a32, b32, si32); end
      if (longint'({pi32, si32}) != (t + 1) % ((longint'(1) << 32) + 1)) begin failures++; $display("FAIL IEAC32 mod %h+%h", a32, b32); end
      if (se32 !== 32'(t + (t >> 32))) begin failures++; $display("FAIL EAC32 %h+%h s=%h", a32, b32, se32); end
      if (pe32 !== ((a32 ^ b32) == 32'hffffffff)) begin failures++; $display("FAIL EAC32 all_prop"); end
    end
    checks++;
    if (n_allprop == 0) begin failures++; $display("FAIL no all-propagate case reached"); end
    $display("all-propagate sums: %0d", n_allprop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
