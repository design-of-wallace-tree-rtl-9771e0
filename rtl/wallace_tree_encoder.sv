// wallace_tree_encoder: 15:4 thermometer-to-binary encoder for a 4-bit flash ADC.
//
// The encoder does not look for the 1-to-0 transition in the thermometer code;
// it counts the ones. Eleven full adders in three columns reduce the 15 inputs
// to a 4-bit sum:
//
//   column 1 (weight 1 in, weights 1 and 2 out)
//     X1 = FA(i13, i12, i11)   X2 = FA(i10, i9, i8)
//     X3 = FA(i6,  i5,  i4)    X4 = FA(i3,  i2, i1)
//   column 2
//     X5 = FA(i14, X1.sum, X2.sum)    weight-1 inputs
//     X6 = FA(X1.cout, X2.cout, X5.cout)   weight-2 inputs
//     X7 = FA(i7, X3.sum, X4.sum)     weight-1 inputs
//     X8 = FA(X3.cout, X4.cout, X7.cout)   weight-2 inputs
//   column 3 (a short ripple from bit 0 to bit 3)
//     X9  = FA(i15, X5.sum, X7.sum)       -> b[0]
//     X10 = FA(X6.sum, X8.sum, X9.cout)   -> b[1]
//     X11 = FA(X6.cout, X8.cout, X10.cout) -> b[2] (sum), b[3] (cout)
//
// The grouping of inputs into adders, the eleven-adder count and the adder
// names X1..X11 follow the published structure of this encoder. Which printed
// output pin carries which weight is fixed here by the arithmetic: X9 gives the
// bit of weight 1 and X11's carry the bit of weight 8.
//
// Because the result is the number of ones, a bubble (a stray 0 among the ones
// or a stray 1 among the zeros) changes the output by one per bubbled bit
// instead of producing a large error, which is the encoder's built-in bubble
// tolerance. Inputs i1..i6 and i8..i13 pass through a column-1 adder, i7 and
// i14 enter in column 2 and i15 in column 3, so every input reaches the bit-0
// adder X9 through at most two adders.
//
// Interface: therm[k-1] is input i_k (output of comparator k); bin is the
// unsigned count, 0..15. Purely combinational, no clock or reset.
module wallace_tree_encoder
  import flash_adc_pkg::*;
(
  input  therm_t therm,
  output code_t  bin
);

  // i[1..15] as in the adder table above.
  logic [N_THERM:1] i;
  assign i = therm;

  // Adder outputs, index = adder number.
  logic [11:1] s, c;

  // Column 1
  tg_full_adder x1 (.a(i[13]), .b(i[12]), .cin(i[11]), .sum(s[1]), .cout(c[1]));
  tg_full_adder x2 (.a(i[10]), .b(i[9]),  .cin(i[8]),  .sum(s[2]), .cout(c[2]));
  tg_full_adder x3 (.a(i[6]),  .b(i[5]),  .cin(i[4]),  .sum(s[3]), .cout(c[3]));
  tg_full_adder x4 (.a(i[3]),  .b(i[2]),  .cin(i[1]),  .sum(s[4]), .cout(c[4]));

  // Column 2
  tg_full_adder x5 (.a(i[14]), .b(s[1]), .cin(s[2]), .sum(s[5]), .cout(c[5]));
  tg_full_adder x6 (.a(c[1]),  .b(c[2]), .cin(c[5]), .sum(s[6]), .cout(c[6]));
  tg_full_adder x7 (.a(i[7]),  .b(s[3]), .cin(s[4]), .sum(s[7]), .cout(c[7]));
  tg_full_adder x8 (.a(c[3]),  .b(c[4]), .cin(c[7]), .sum(s[8]), .cout(c[8]));

  // Column 3
  tg_full_adder x9  (.a(i[15]), .b(s[5]), .cin(s[7]),  .sum(s[9]),  .cout(c[9]));
  tg_full_adder x10 (.a(s[6]),  .b(s[8]), .cin(c[9]),  .sum(s[10]), .cout(c[10]));
  tg_full_adder x11 (.a(c[6]),  .b(c[8]), .cin(c[10]), .sum(s[11]), .cout(c[11]));

  assign bin = {c[11], s[11], s[10], s[9]};

endmodule
