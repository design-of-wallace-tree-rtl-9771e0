// tg_full_adder: one-bit full adder in the transmission-gate style.
//
// sum  = a ^ b ^ cin
// cout = a & b | cin & (a | b)
//
// How it works: a first stage forms the propagate signal p = a XOR b and its
// complement (in the transistor cell, an inverter plus a pair of transmission
// gates). Both outputs are then two-input multiplexers steered by p, which is
// what a pair of complementary transmission gates is:
//   sum  = p ? ~cin : cin      (p high: the carry-in is inverted)
//   cout = p ?  cin : a        (p low: a and b are equal, so either one is the carry)
// The equations and the pin names A, B, Cin, Sum and Cout follow the cell the
// encoder is built from; the split into an XOR stage and two p-steered
// multiplexers is this design's reading of that transmission-gate cell.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational, no clock.
module tg_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p;      // propagate, a XOR b
  logic p_n;    // its complement, drives the other gate of each transmission pair

  always_comb begin
    p    = a ^ b;
    p_n  = ~p;
    sum  = p ? ~cin : cin;
    cout = p_n ? a : cin;
  end

endmodule
