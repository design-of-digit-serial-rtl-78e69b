// ds_pkg: shared constants of the digit-serial FIR filter.
//
// Every data word travels as a stream of D-bit digits, least significant
// digit first, one digit per clock. A word is WL bits long, so a word (one
// "frame") lasts WL/D clocks, and a one-clock "start" marker flags its first
// digit. The filter's coefficient set {29, 43, 2813} and the way its five taps
// use them are this design's own choice (the constants are the worked
// examples of the shift-adds method); the digit size and word length are
// design choices as well.
package ds_pkg;

  // Default digit size (bits per clock) and word length (bits per sample frame).
  localparam int unsigned D_DEFAULT  = 4;
  localparam int unsigned WL_DEFAULT = 24;
  // Width of the input samples the default word length is sized for: with a
  // 12-bit signed input the worst-case output magnitude is
  // (29+43+2813+43+29) * 2^11 < 2^23, so a 24-bit word never wraps.
  localparam int unsigned WIN_DEFAULT = 12;

  // The distinct constant products the multiplier block delivers.
  typedef enum int unsigned {
    PROD_29   = 0,
    PROD_43   = 1,
    PROD_2813 = 2
  } prod_e;
  localparam int unsigned NPROD = 3;
  localparam int COEF [NPROD] = '{29, 43, 2813};

  // Filter taps h[0..NTAPS-1] (linear phase, symmetric), given as the product
  // each tap uses: h = {29, 43, 2813, 43, 29}.
  localparam int unsigned NTAPS = 5;
  localparam prod_e TAP_PROD [NTAPS] = '{PROD_29, PROD_43, PROD_2813, PROD_43, PROD_29};

  // Latencies, in clocks from an input frame start to the output frame start.
  // Every digit-serial adder has a registered output and so costs one clock.
  localparam int unsigned LAT_ADD = 1;
  localparam int unsigned LAT_GB  = 3;  // 7x -> 29x -> 43x chain
  localparam int unsigned LAT_MAG = 3;  // 3x -> 11x -> 2813x chain
  localparam int unsigned LAT_MCM = (LAT_GB > LAT_MAG) ? LAT_GB : LAT_MAG;
  localparam int unsigned LAT_FIR = LAT_MCM + ((NTAPS > 1) ? LAT_ADD : 0);

endpackage
