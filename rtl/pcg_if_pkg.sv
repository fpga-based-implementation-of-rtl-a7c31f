// Shared constants of the phonocardiogram instantaneous-frequency processor.
//
// The processor turns a stream of PCG samples into an instantaneous frequency
// estimate in three stages: analytic signal (sliding Hilbert transform built
// on the moving discrete Hartley transform), phase (CORDIC + unwrap) and the
// central finite difference of the phase. All internal words are 26-bit two's
// complement fixed point, as in the reference design; the input samples are
// 20 bits wide (the resolution of the audio codec). The position of the binary
// point in each word is this design's own choice and is collected here:
//
//   samples, Y and Hilbert values   Q4.22  (sign, 3 integer bits, 22 fraction)
//   cotangent coefficients C(m)     Q1.25  (|C| < 2/pi)
//   phase, radians                  Q4.22  (unwrapped phase wraps modulo 16 rad,
//                                           which the phase difference tolerates)
//   instantaneous frequency         Q1.25  in cycles per sample (multiply by
//                                           the sample rate for Hz)
package pcg_if_pkg;

  localparam int PCG_DATA_W    = 26;   // word width of all internal and output data
  localparam int PCG_IN_W      = 20;   // input sample width (codec resolution)
  localparam int PCG_WIN_N     = 128;  // window size N of the moving transform
  localparam int PCG_SIG_FRAC  = 22;   // fraction bits of samples and Hilbert values
  localparam int PCG_COEF_W    = 26;   // cotangent coefficient width
  localparam int PCG_COEF_FRAC = 25;   // fraction bits of the coefficients
  localparam int PCG_PH_FRAC   = 22;   // fraction bits of the phase (radians)
  localparam int PCG_IF_FRAC   = 25;   // fraction bits of the frequency output
  localparam int PCG_CORDIC_ITER = 22; // micro-rotations of the CORDIC

  localparam real PI = 3.14159265358979323846;

  // Round a real value to the nearest integer, halves away from zero.
  function automatic longint round_real(real v);
    return (v >= 0.0) ? longint'($rtoi(v + 0.5)) : -longint'($rtoi(-v + 0.5));
  endfunction

endpackage
