// divider_pkg: constants and types shared by the multiband pulse-swallow divider.
//
// The divider is built around a 2/3 prescaler (N1 = 2) followed by a chain of
// AD_BITS divide-by-2 stages (AD = 2**AD_BITS = 16), giving the 32/33 and 47/48
// moduli. The programmable (P) counter is 7 bits wide and the swallow (S)
// counter 6 bits wide. These numbers are the published ones; the band-select
// encoding is a local choice.
package divider_pkg;

  // Base modulus of the 2/3 prescaler.
  localparam int unsigned N1 = 2;
  // Number of divide-by-2 stages after the 2/3 prescaler (AD = 16).
  localparam int unsigned AD_BITS_DEFAULT = 4;
  // Counter widths.
  localparam int unsigned P_W_DEFAULT = 7;
  localparam int unsigned S_W_DEFAULT = 6;

  // Band select (SEL): low band uses the 32/33 moduli, high band the 47/48 moduli.
  typedef enum logic {
    BAND_LOW  = 1'b0,
    BAND_HIGH = 1'b1
  } band_e;

endpackage
