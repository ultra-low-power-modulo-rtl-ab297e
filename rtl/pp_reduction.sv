// Partial product reduction tree for the modulo 2^N+1 multiplier.
//
// Seventeen N-bit operands are reduced to a Sum and a Carry vector by five rows
// of compressors, one compressor per column in each row:
//   row 1  7:2   operands 0..6 on x1..x7, operands 7, 8 on cin1, cin2
//   row 2  7:2   row-1 sum, operands 9..13, and the three row-1 carries
//   row 3  5:2   row-2 sum, operands 14..16, and the three row-2 carries
//   row 4  3:2   row-3 sum, row-3 cout1 and cout2
//   row 5  3:2   row-4 sum, row-3 carry, row-4 carry
// The carries of a row enter the next row: weight-2 outputs from column i-1,
// the weight-4 cout2 of a 7:2 from column i-2. There is no sideways carry inside
// a row, so the tree depth is five compressors.
//
// Modulo 2^N+1 a bit c of weight 2^(N+k) equals ~c at weight 2^k minus 2^k, so
// every carry that leaves column N-1 re-enters at column k inverted. Rows 1 and
// 2 wrap four bits each (carry, cout1 of column N-1 and cout2 of column N-2 into
// column 0; cout2 of column N-1 into column 1), row 3 wraps three, rows 4 and 5
// one each; the row-5 wrap is bit 0 of the Carry vector. Together the wraps add
// 3+2 + 3+2 + 3 + 1 + 1 = 15, so
//   Sum + Carry = sum of operands + 15   (mod 2^N + 1).
// With N = 16 that is N - 1, the same offset as an (N-1)-stage carry-save array,
// which is why the constant operand 2 of the multiplier is unchanged.
// The row order and operand groups follow the source's array diagram; which
// carry enters which compressor input is this design's choice. Combinational.
module pp_reduction #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] op [17],
  output logic [N-1:0] sum_vec,
  output logic [N-1:0] carry_vec
);
  // row outputs: s = sum, cy = carry (weight 2), c1 = cout1 (weight 2),
  // c2 = cout2 (weight 4 for 7:2, weight 2 for 5:2)
  logic [N-1:0] s1, cy1, c11, c12;
  logic [N-1:0] s2, cy2, c21, c22;
  logic [N-1:0] s3, cy3, c31, c32;
  logic [N-1:0] s4, cy4;
  logic [N-1:0] s5, cy5;

  // carries arriving at each column, wrapped and inverted at column 0 (and 1)
  logic [N-1:0] in2_cy, in2_c1, in2_c2;
  logic [N-1:0] in3_cy, in3_c1, in3_c2;
  logic [N-1:0] in4_c1, in4_c2;
  logic [N-1:0] in5_cy3, in5_cy4;

  // weight-2 carries: shift up one column, column N-1 wraps inverted to 0
  assign in2_cy  = {cy1[N-2:0], ~cy1[N-1]};
  assign in2_c1  = {c11[N-2:0], ~c11[N-1]};
  assign in3_cy  = {cy2[N-2:0], ~cy2[N-1]};
  assign in3_c1  = {c21[N-2:0], ~c21[N-1]};
  assign in4_c1  = {c31[N-2:0], ~c31[N-1]};
  assign in4_c2  = {c32[N-2:0], ~c32[N-1]};
  assign in5_cy3 = {cy3[N-2:0], ~cy3[N-1]};
  assign in5_cy4 = {cy4[N-2:0], ~cy4[N-1]};
  assign carry_vec = {cy5[N-2:0], ~cy5[N-1]};
  // weight-4 carries of the 7:2 rows: shift up two columns
  assign in2_c2  = {c12[N-3:0], ~c12[N-1], ~c12[N-2]};
  assign in3_c2  = {c22[N-3:0], ~c22[N-1], ~c22[N-2]};

  assign sum_vec = s5;

  for (genvar i = 0; i < N; i++) begin : g_col
    compressor_7_2 u_r1 (
      .x    ({op[6][i], op[5][i], op[4][i], op[3][i], op[2][i], op[1][i], op[0][i]}),
      .cin1 (op[7][i]),
      .cin2 (op[8][i]),
      .sum  (s1[i]), .carry(cy1[i]), .cout1(c11[i]), .cout2(c12[i])
    );
    compressor_7_2 u_r2 (
      .x    ({in2_cy[i], op[13][i], op[12][i], op[11][i], op[10][i], op[9][i], s1[i]}),
      .cin1 (in2_c1[i]),
      .cin2 (in2_c2[i]),
      .sum  (s2[i]), .carry(cy2[i]), .cout1(c21[i]), .cout2(c22[i])
    );
    compressor_5_2 u_r3 (
      .x    ({in3_cy[i], op[16][i], op[15][i], op[14][i], s2[i]}),
      .cin1 (in3_c1[i]),
      .cin2 (in3_c2[i]),
      .sum  (s3[i]), .carry(cy3[i]), .cout1(c31[i]), .cout2(c32[i])
    );
    compressor_3_2 u_r4 (
      .a(s3[i]), .b(in4_c1[i]), .c(in4_c2[i]), .sum(s4[i]), .carry(cy4[i])
    );
    compressor_3_2 u_r5 (
      .a(s4[i]), .b(in5_cy3[i]), .c(in5_cy4[i]), .sum(s5[i]), .carry(cy5[i])
    );
  end

  initial begin
    assert (N >= 3) else $error("pp_reduction: N must be at least 3");
  end
endmodule
