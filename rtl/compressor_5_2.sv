// 5:2 compressor built from GDI cells:
//   x1 + x2 + x3 + x4 + x5 + cin1 + cin2 = sum + 2*(carry + cout1 + cout2).
//
// Structure (block diagram of the source: one CGEN, two XOR-XNOR cells, six
// multiplexers):
//   cout1 = CGEN(x1, x2, x3)                      majority of the first three
//   s1    = x1^x2^x3    XOR-XNOR(x1,x2), mux selected by x3 (both rails kept)
//   s2    = x4^x5^cin1  XOR-XNOR(x4,x5), mux selected by cin1
//   cout2 = (x4^x5) ? cin1 : x4                   majority of x4, x5, cin1
//   t     = s1^s2       mux selected by s2 (both rails kept)
//   sum   = t^cin2      mux selected by cin2
//   carry = t ? cin2 : s2                         majority of s1, s2, cin2
// cout1 and cout2 never depend on cin2 and cout1 not on cin1, so compressors
// in one row can pass carries sideways without a ripple. All carries have
// weight 2. Which rail sits on which multiplexer input is this design's choice,
// made so that the equation above holds; it agrees with the source's simulated
// vectors. Combinational.
module compressor_5_2 (
  input  logic [5:1] x,
  input  logic       cin1,
  input  logic       cin2,
  output logic       sum,
  output logic       carry,
  output logic       cout1,
  output logic       cout2
);
  logic x12, x12n, x45, x45n;
  logic s1, s1n, s2, t, tn;

  cgen     u_cgen (.x1(x[1]), .x2(x[2]), .x3(x[3]), .o(cout1));
  xor_xnor u_xx12 (.a(x[1]), .b(x[2]), .x(x12), .xn(x12n));
  xor_xnor u_xx45 (.a(x[4]), .b(x[5]), .x(x45), .xn(x45n));

  // first-level multiplexers
  gdi_cell u_s1   (.g(x[3]), .p(x12),  .n(x12n), .d(s1));
  gdi_cell u_s1n  (.g(x[3]), .p(x12n), .n(x12),  .d(s1n));
  gdi_cell u_s2   (.g(cin1), .p(x45),  .n(x45n), .d(s2));
  gdi_cell u_co2  (.g(x45),  .p(x[4]), .n(cin1), .d(cout2));

  // second level
  gdi_cell u_t    (.g(s2), .p(s1),  .n(s1n), .d(t));
  gdi_cell u_tn   (.g(s2), .p(s1n), .n(s1),  .d(tn));

  // outputs
  gdi_cell u_sum  (.g(cin2), .p(t),  .n(tn),   .d(sum));
  gdi_cell u_cry  (.g(t),    .p(s2), .n(cin2), .d(carry));
endmodule
