// fcn_pkg: types and helpers shared by the streaming ConvNet building blocks.
//
// Every data word is a Q8.8 two's-complement fixed-point number (16 bits,
// 8 fraction bits), the representation used for the evaluated designs.
// Products of two words are Q16.16; a dot product is accumulated at full
// precision and brought back to Q8.8 by an arithmetic right shift of FRAC_W
// bits (rounding toward minus infinity) followed by saturation. The shift
// and saturation rule is this design's own choice.
package fcn_pkg;

  localparam int WORD_W = 16;
  localparam int FRAC_W = 8;

  typedef logic signed [WORD_W-1:0] word_t;

  // Nonlinear function type of a nonlinear bank (parameter T).
  typedef enum logic [1:0] {
    NL_RELU    = 2'd0,
    NL_SIGMOID = 2'd1,
    NL_TANH    = 2'd2
  } nl_type_e;

  // Pooling operation of a pooling bank (parameter T).
  typedef enum logic {
    POOL_MAX = 1'b0,
    POOL_AVG = 1'b1
  } pool_type_e;

  localparam word_t WORD_MAX = word_t'(16'sh7FFF);
  localparam word_t WORD_MIN = word_t'(16'sh8000);

  // Saturate a 48-bit signed value to one word.
  function automatic word_t sat_word(input logic signed [47:0] v);
    if (v > 48'sd32767)       return WORD_MAX;
    else if (v < -48'sd32768) return WORD_MIN;
    else                      return word_t'(v[WORD_W-1:0]);
  endfunction

endpackage
