// Testbench for gdi_cell: six cells wired as in the GDI function table (F1,
// F2, OR, AND, MUX, NOT) are driven with every combination of A, B and S and
// compared with the Boolean function each configuration should give.
module tb_gdi_cell;
  int checks = 0, failures = 0;
  logic a, b, s;
  logic f1, f2, f_or, f_and, f_mux, f_not;

  gdi_cell u_f1  (.g(a), .p(b),    .n(1'b0), .d(f1));
  gdi_cell u_f2  (.g(a), .p(1'b1), .n(b),    .d(f2));
  gdi_cell u_or  (.g(a), .p(b),    .n(1'b1), .d(f_or));
  gdi_cell u_and (.g(a), .p(1'b0), .n(b),    .d(f_and));
  gdi_cell u_mux (.g(s), .p(a),    .n(b),    .d(f_mux));
  gdi_cell u_not (.g(a), .p(1'b1), .n(1'b0), .d(f_not));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b s=%0b got=%0b exp=%0b", what, a, b, s, got, exp);
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
    for (int v = 0; v < 8; v++) begin
      {s, b, a} = 3'(v);
      #1;
      check("F1",  f1,    !a && b);
      check("F2",  f2,    !a || b);
      check("OR",  f_or,  a || b);
      check("AND", f_and, a && b);
      check("MUX", f_mux, (!s && a) || (s && b));
      check("NOT", f_not, !a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
