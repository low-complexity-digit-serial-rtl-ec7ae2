// fir_ds_pkg -- constants shared by the digit-serial FIR filter.
//
// The filter is a 4-tap transposed-form FIR with the fixed coefficients
// 29, 43, 59 and 89, built from shift-and-add constant multipliers that
// process one digit of DIGIT_W bits per clock, least significant digit first.
// The coefficients and the digit sizes 2, 4 and 8 come from the published
// design; the word length of 16 bits is this implementation's choice: it holds
// 220 * x exactly for any 8-bit signed sample x (220 = sum of the coefficients).
package fir_ds_pkg;

  // Default digit size (bits processed per clock). 4 and 8 are the other
  // evaluated configurations.
  localparam int unsigned DIGIT_W_DEF = 2;

  // Default word length of every digit-serial stream (two's complement).
  // Must be a multiple of the digit size.
  localparam int unsigned WORD_W_DEF = 16;

  localparam int unsigned NUM_TAPS = 4;

  // Impulse response h[0..3]: y(n) = 89 x(n) + 59 x(n-1) + 43 x(n-2) + 29 x(n-3).
  localparam int COEF [NUM_TAPS] = '{89, 59, 43, 29};

  // Number of digits in one word.
  function automatic int unsigned digits_per_word(int unsigned word_w, int unsigned digit_w);
    return word_w / digit_w;
  endfunction

endpackage
