// flash_adc_pkg: sizes and types shared by the 4-bit flash ADC.
//
// The converter resolves N_BITS = 4 bits. It therefore has 2**N_BITS - 1 = 15
// comparators, whose outputs form a 15-bit thermometer code, and 2**N_BITS = 16
// equal ladder resistors. Bit k-1 of a thermometer word is the output of
// comparator k (input i_k of the encoder), so a clean code has its ones at the
// bottom. The binary code is an ordinary unsigned number, bit 0 of weight 1.
package flash_adc_pkg;

  localparam int unsigned N_BITS   = 4;
  localparam int unsigned N_THERM  = (1 << N_BITS) - 1;   // comparators, encoder inputs
  localparam real         VDD      = 1.0;                 // supply, volts

  typedef logic [N_THERM-1:0] therm_t;
  typedef logic [N_BITS-1:0]  code_t;

endpackage
