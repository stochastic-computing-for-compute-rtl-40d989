// sc_pkg: constants and elaboration-time helpers shared by the stochastic
// JPEG front end.
//
// Stochastic numbers here are unipolar: a bit-stream whose fraction of ones
// is the value in [0,1]. Binary values are turned into streams by weighted
// binary generators (sc_sng) fed by maximal-length LFSRs (sc_lfsr). This
// package holds
//   * feedback tap masks of one maximal-length 8-bit LFSR (data streams, whose
//     full 255-state period makes a WBG stream exact) and four 16-bit ones
//     (constant-factor streams and adder selects). Streams that meet in an
//     AND gate come from different sequences whose periods (255 and 65535)
//     do not lock every data state to one partner state;
//   * the colour-conversion coefficients of the RGB to YCbCr equations and
//     the cosine magnitudes cos(k*pi/16) of the 8-point DCT, both as Q16
//     fractions, with a function that rounds them to the width of an SNG;
//   * the sign/magnitude table of the DCT basis, alpha(u)*cos((2m+1)u*pi/16).
// The equations are the standard JPEG ones; the tap choices, seeds and the
// Q16 storage are this design's own.
package sc_pkg;

  // Tap masks: bit (t-1) set for each tap t of the feedback polynomial.
  localparam logic [7:0]  TAPS8_A  = 8'hB8;    // x^8+x^6+x^5+x^4+1
  localparam logic [15:0] TAPS16_A = 16'hD008;  // x^16+x^15+x^13+x^4+1
  localparam logic [15:0] TAPS16_B = 16'hB400;  // x^16+x^14+x^13+x^11+1
  localparam logic [15:0] TAPS16_C = 16'h8805;  // x^16+x^12+x^3+x+1
  localparam logic [15:0] TAPS16_D = 16'hCA00;  // x^16+x^15+x^12+x^10+1

  // RGB to YCbCr coefficients (magnitudes), Q16.
  localparam int unsigned C_Y_R  = 19595;  // 0.299
  localparam int unsigned C_Y_G  = 38470;  // 0.587
  localparam int unsigned C_Y_B  = 7471;   // 0.114
  localparam int unsigned C_CB_R = 11076;  // 0.169
  localparam int unsigned C_CB_G = 21692;  // 0.331
  localparam int unsigned C_CB_B = 32768;  // 0.500
  localparam int unsigned C_CR_R = 32768;  // 0.500
  localparam int unsigned C_CR_G = 27459;  // 0.419
  localparam int unsigned C_CR_B = 5308;   // 0.081

  // cos(k*pi/16), k = 0..7, Q16 (cos 0 = 1.0 is 65536).
  localparam int unsigned COS_Q16 [8] = '{65536, 64277, 60547, 54491,
                                          46341, 36410, 25080, 12785};

  // Round a Q16 fraction to a W-bit SNG input, full scale 2^W-1 (= 1.0).
  function automatic logic [15:0] q16_to_sn(input int unsigned c, input int w);
    longint unsigned full;
    full = (longint'(1) << w) - 1;
    return 16'(((longint'(c) * full) + 32768) >> 16);
  endfunction

  // DCT basis factor alpha(u)*cos((2m+1)u*pi/16) as {negative, magnitude
  // index}. The index k selects cos(k*pi/16); k = 8 means zero. For u = 0,
  // alpha(0) = 1/sqrt(2) = cos(4*pi/16), so the index is 4.
  function automatic logic [4:0] dct_basis(input int u, input int m);
    int k;
    logic neg;
    if (u == 0) return {1'b0, 4'd4};
    k = ((2 * m + 1) * u) % 32;
    if (k > 16) k = 32 - k;
    neg = 1'b0;
    if (k > 8) begin
      k   = 16 - k;
      neg = 1'b1;
    end
    return {neg, 4'(k)};
  endfunction

  // Expand a P-bit pixel to W bits with the same fraction of full scale by
  // repeating its bits (exact when W is a multiple of P: 0xA -> 0xAA).
  function automatic logic [15:0] pix_to_sn(input logic [15:0] p, input int pw, input int w);
    logic [15:0] r;
    r = '0;
    for (int i = 0; i < w; i++) r[w-1-i] = p[pw-1-(i % pw)];
    return r;
  endfunction

endpackage
