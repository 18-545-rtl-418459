// matrix_row_comp: one element of a matrix product per cycle.
//
// y = row[0]*col[0] + row[1]*col[1] + row[2]*col[2] + row[3]*col[3], built from
// four floating point multipliers and three floating point adders (two adding the
// product pairs, one adding the two sums). Purely combinational. The unit count
// follows the original design; the adder tree order is this design's choice.
module matrix_row_comp
  import gl_pkg::*;
(
    input  vec4_t  row,
    input  vec4_t  col,
    output float_t y
);
  float_t p0, p1, p2, p3, s01, s23;

  fp_mul u_m0 (.a(row[0]), .b(col[0]), .y(p0));
  fp_mul u_m1 (.a(row[1]), .b(col[1]), .y(p1));
  fp_mul u_m2 (.a(row[2]), .b(col[2]), .y(p2));
  fp_mul u_m3 (.a(row[3]), .b(col[3]), .y(p3));
  fp_add u_a0 (.a(p0), .b(p1), .sub(1'b0), .y(s01));
  fp_add u_a1 (.a(p2), .b(p3), .sub(1'b0), .y(s23));
  fp_add u_a2 (.a(s01), .b(s23), .sub(1'b0), .y(y));
endmodule
