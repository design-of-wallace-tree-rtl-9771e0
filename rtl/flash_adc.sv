// flash_adc: 4-bit flash analog-to-digital converter with a Wallace tree
// thermometer-to-binary encoder.
//
// A ladder of 16 equal resistors divides vref into 15 reference levels. Fifteen
// comparators compare the input vin with those levels at once; comparator k is
// high when vin is above k * vref / 16, so together they give a 15-bit
// thermometer code. The Wallace tree encoder counts the ones in that code with
// eleven transmission-gate full adders and delivers the count as the 4-bit
// result. Counting ones instead of locating the top of the ones makes a bubble
// in the thermometer code cost one LSB per bubbled bit.
//
// The chain ladder -> comparators -> encoder and the 15:4 encoder are the
// converter's own structure. The ladder and comparators are behavioural
// models with real-valued ports; CMP_OFFSET gives each comparator an
// input-referred offset (all zero by default) so that bubbles can be studied.
// Bringing the thermometer code out as a port is this design's choice.
//
// Interface: vin, vref in (volts); therm is the comparator output code
// (bit k-1 = comparator k); dout is the binary result, 0..15, with
// dout = floor(16 * vin / vref) clipped to 0..15 for ideal comparators.
// There is no clock: the result follows vin combinationally, as in the
// transistor-level encoder.
module flash_adc
  import flash_adc_pkg::*;
#(
  parameter real CMP_OFFSET [N_THERM] = '{default: 0.0}
) (
  input  real    vin,
  input  real    vref,
  output therm_t therm,
  output code_t  dout
);

  real tap [N_THERM];

  resistor_ladder #(.N_TAPS(N_THERM)) u_ladder (
    .vref (vref),
    .tap  (tap)
  );

  for (genvar k = 0; k < int'(N_THERM); k++) begin : g_cmp
    comparator #(.VOS(CMP_OFFSET[k])) u_cmp (
      .vinp (vin),
      .vinn (tap[k]),
      .out  (therm[k])
    );
  end

  wallace_tree_encoder u_enc (
    .therm (therm),
    .bin   (dout)
  );

endmodule
