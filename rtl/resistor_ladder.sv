// resistor_ladder: behavioural model of the flash ADC's reference ladder
// (analog part, not synthesizable logic).
//
// A string of N_TAPS + 1 equal resistors runs from vref to ground. The node
// above the k-th resistor from ground is tap k, so tap k sits at
// vref * k / (N_TAPS + 1). The model returns those ideal, unloaded voltages:
// the absolute resistor value drops out and is not modelled, and neither are
// mismatch, comparator loading or settling.
//
// The equal resistors and the 2**n - 1 taps follow the converter's block
// diagram; the unloaded, mismatch-free behaviour is this model's choice.
//
// Interface: vref in (volts); tap[k-1] out is the reference of comparator k.
// The outputs follow vref with no delay.
module resistor_ladder
  import flash_adc_pkg::*;
#(
  parameter int unsigned N_TAPS = N_THERM
) (
  input  real vref,
  output real tap [N_TAPS]
);

  always_comb begin
    for (int k = 0; k < int'(N_TAPS); k++)
      tap[k] = vref * real'(k + 1) / real'(N_TAPS + 1);
  end

endmodule
