// 7:2 compressor built from GDI cells:
//   x1 + ... + x7 + cin1 + cin2 = sum + 2*(carry + cout1) + 4*cout2.
//
// Two full-adder fronts reduce x2..x4 and x5..x7 to a sum and a carry each:
//   ca = CGEN(x2,x3,x4), sa = x2^x3^x4;  cb = CGEN(x5,x6,x7), sb = x5^x6^x7.
// The sums are added to x1:  k = CGEN(sa,sb,x1) (weight 2),  v = sa^sb^x1.
// The three weight-2 bits ca, cb, k are added by an XOR-XNOR cell on (cb, ca)
// and two multiplexers:  cout1 = ca^cb^k (weight 2),
//                        cout2 = (ca^cb) ? k : cb (weight 4).
// The carry inputs join at the end:  w = v^cin2,  sum = w^cin1,
//                                    carry = w ? cin1 : v.
// Nine inputs need an output of weight 4 (one sum, two weight-2 bits and a
// weight-4 bit reach 9): in the reduction tree cout2 goes two columns up. The
// block diagram is the source's; the weight of cout2 follows the source's
// simulated vectors, and which rail sits on which multiplexer input is this
// design's choice. cout1 and cout2 do not depend on cin1, cin2. Combinational.
module compressor_7_2 (
  input  logic [7:1] x,
  input  logic       cin1,
  input  logic       cin2,
  output logic       sum,
  output logic       carry,
  output logic       cout1,
  output logic       cout2
);
  logic ca, cb, k;
  logic x23, x23n, x56, x56n, cc, ccn;
  logic sa, san, sb, u, un, v, vn, w, wn;

  // full-adder fronts
  cgen     u_cga  (.x1(x[2]), .x2(x[3]), .x3(x[4]), .o(ca));
  xor_xnor u_xx23 (.a(x[2]), .b(x[3]), .x(x23), .xn(x23n));
  gdi_cell u_sa   (.g(x[4]), .p(x23),  .n(x23n), .d(sa));
  gdi_cell u_san  (.g(x[4]), .p(x23n), .n(x23),  .d(san));

  cgen     u_cgb  (.x1(x[5]), .x2(x[6]), .x3(x[7]), .o(cb));
  xor_xnor u_xx56 (.a(x[5]), .b(x[6]), .x(x56), .xn(x56n));
  gdi_cell u_sb   (.g(x[7]), .p(x56),  .n(x56n), .d(sb));

  // sum path: sa ^ sb ^ x1
  gdi_cell u_u    (.g(sb),   .p(sa),  .n(san), .d(u));
  gdi_cell u_un   (.g(sb),   .p(san), .n(sa),  .d(un));
  gdi_cell u_v    (.g(x[1]), .p(u),   .n(un),  .d(v));
  gdi_cell u_vn   (.g(x[1]), .p(un),  .n(u),   .d(vn));
  cgen     u_cgk  (.x1(sa), .x2(sb), .x3(x[1]), .o(k));

  // carry outputs from ca, cb, k
  xor_xnor u_xxc  (.a(cb), .b(ca), .x(cc), .xn(ccn));
  gdi_cell u_co1  (.g(k),  .p(cc), .n(ccn), .d(cout1));
  gdi_cell u_co2  (.g(cc), .p(cb), .n(k),   .d(cout2));

  // carry inputs
  gdi_cell u_w    (.g(cin2), .p(v),  .n(vn),   .d(w));
  gdi_cell u_wn   (.g(cin2), .p(vn), .n(v),    .d(wn));
  gdi_cell u_sum  (.g(cin1), .p(w),  .n(wn),   .d(sum));
  gdi_cell u_cry  (.g(w),    .p(v),  .n(cin1), .d(carry));
endmodule
