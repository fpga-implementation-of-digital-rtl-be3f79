// dpll_pkg: widths and default constants shared by the DPLL frequency
// synthesizer. The numeric defaults (Nr = 1000, 12-bit ADC, /256 master
// clock prescaler, 8-bit observation DAC) are the values used in the
// reference experiments; the bit widths are this design's choice, sized so
// that the integrator never overflows for any legal Nin / Nr pair.
package dpll_pkg;
  localparam int unsigned NIN_W = 16;  // NCO input quantity Nin (unsigned)
  localparam int unsigned NR_W  = 16;  // NCO reference value Nr (unsigned)
  localparam int unsigned ACC_W = 20;  // integrator, signed, holds +/-(Nr+Nin)
  localparam int unsigned DIV_W = 8;   // programmable divider factor N' / M'
  localparam int unsigned ADC_W = 12;  // ADC code width
  localparam int unsigned PRE_W = 9;   // master-clock prescaler ratio (1..256)
  localparam int unsigned DAC_W = 8;   // observation DAC code width

  localparam int unsigned NR_DEFAULT       = 1000;

  typedef logic [NIN_W-1:0]        nin_t;
  typedef logic [NR_W-1:0]         nr_t;
  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic [DIV_W-1:0]        div_t;
  typedef logic [ADC_W-1:0]        adc_code_t;
endpackage
