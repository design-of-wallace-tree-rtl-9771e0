// comparator: behavioural model of one flash ADC comparator (analog part, not
// synthesizable logic).
//
// The output is high when the non-inverting input, plus the input-referred
// offset VOS, is above the inverting input. In the converter the input signal
// drives vinp and a ladder tap drives vinn. An offset larger than half a ladder
// step makes this comparator disagree with its neighbours, which is how a
// bubble gets into the thermometer code.
//
// The comparator's place in the converter follows its block diagram; the
// offset parameter and the ideal, delay-free decision are this model's choice.
//
// Interface: vinp, vinn in (volts); out is the one-bit decision. No clock: the
// output follows the inputs at once.
module comparator #(
  parameter real VOS = 0.0   // input-referred offset, volts
) (
  input  real  vinp,
  input  real  vinn,
  output logic out
);

  always_comb out = (vinp + VOS) > vinn;

endmodule
