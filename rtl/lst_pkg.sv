// lst_pkg: shared widths and fixed-point constants of the split-window
// land surface temperature (LST-SW) engine.
//
// Number formats on the pixel interface follow the AVHRR data set the engine
// was built for: T4 and T5 are unsigned kelvin x10, W is unsigned g/cm^2 x1000
// and epsilon is unsigned x1000, all 16 bits wide. The result LST1, LST2 and
// LST are kelvin x10 (the same unit as T4 and T5), 16 bits; LST2 is a
// two's-complement value because the emissivity correction can be negative.
//
// The fractional coefficients of LST1 (0.1, 0.14, 0.0032, 0.83) are held as
// fixed-point numbers with LST1_FRAC fractional bits. LST2 is computed exactly
// in integers and brought to kelvin x10 by one multiplication with 1e-5 held
// with LST2_FRAC fractional bits (the 0.001 scale of the LST2 formula times the
// 0.01 that turns kelvin x1000 into kelvin x10). Each constant is the nearest
// integer to coefficient * 2^FRAC.
package lst_pkg;

  localparam int unsigned DATA_W = 16;  // pixel and result width

  // Pipeline depth of both arithmetic parts: cycles from the pop of an input
  // FIFO to a valid result at the part's output register.
  localparam int unsigned PART_STAGES = 5;

  // ---- LST1 = 0.1 T4 + 0.14 (T4-T5) + 0.0032 (T4-T5)^2 + 0.83  [kelvin]
  localparam int unsigned LST1_FRAC = 24;
  localparam longint C1_T4   = 64'd1677722;   // 0.1    * 2^24
  localparam longint C1_DIFF = 64'd2348810;   // 0.14   * 2^24
  localparam longint C1_SQ   = 64'd53687;     // 0.0032 * 2^24
  localparam longint C1_OFS  = 64'd13925106;  // 0.83   * 2^24
  localparam longint C1_OUT  = 64'd10;        // kelvin -> kelvin x10

  // ---- LST2 = [(57000-5W)(1000-eps) - (161000-30W)*DEPS] * 0.001 [kelvin x1000]
  localparam longint C2_A0   = 64'd57000;
  localparam longint C2_A1   = 64'd5;
  localparam longint C2_B0   = 64'd1000;
  localparam longint C2_C0   = 64'd161000;
  localparam longint C2_C1   = 64'd30;
  localparam int unsigned LST2_FRAC = 40;
  localparam longint C2_OUT  = 64'd10995116;  // 1e-5 * 2^40

  // Spectral emissivity difference, x1000 (0.005 for the study area).
  localparam int unsigned DEPS_X1000 = 5;

endpackage
