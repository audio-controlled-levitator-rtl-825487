// Shared types and constants of the audio-controlled levitator.
//
// The pitch path turns a detected FFT bin into a 6-bit height reference; the
// control path compares it with a 6-bit measured height and drives the fan.
// Widths here follow the controller description: 6-bit reference and height,
// 7-bit signed error, 9-bit signed controller terms, 11-bit signed command,
// 10-bit ADC codes. Pixels are 3-bit {R,G,B}.
package levitator_pkg;

  localparam int unsigned HEIGHT_W  = 6;   // reference / height
  localparam int unsigned ERROR_W   = 7;   // signed r[n]-h[n]
  localparam int unsigned TERM_W    = 9;   // signed p[n], s[n], d[n]
  localparam int unsigned COMMAND_W = 11;  // signed u[n]
  localparam int unsigned ADC_W     = 10;  // MCP3008 code

  typedef logic        [HEIGHT_W-1:0]  height_t;
  typedef logic signed [ERROR_W-1:0]   error_t;
  typedef logic signed [TERM_W-1:0]    term_t;
  typedef logic signed [COMMAND_W-1:0] command_t;
  typedef logic        [ADC_W-1:0]     adc_code_t;

  localparam term_t TERM_MAX = term_t'(255);
  localparam term_t TERM_MIN = term_t'(-256);

  // Colour of one pixel, one bit per gun.
  typedef logic [2:0] pixel_t;
  localparam pixel_t PIX_BLACK   = 3'b000;
  localparam pixel_t PIX_RED     = 3'b100;
  localparam pixel_t PIX_GREEN   = 3'b010;
  localparam pixel_t PIX_BLUE    = 3'b001;
  localparam pixel_t PIX_MAGENTA = 3'b101;

  // Saturate a wide signed value into the 9-bit term range.
  function automatic term_t sat_term(input logic signed [31:0] v);
    if (v > 32'sd255)       return TERM_MAX;
    else if (v < -32'sd256) return TERM_MIN;
    else                    return term_t'(v);
  endfunction

  // Clamp a gain (base + tuner offset) into [lo, hi].
  function automatic logic signed [7:0] clamp_gain(input logic signed [31:0] v,
                                                   input logic signed [31:0] lo,
                                                   input logic signed [31:0] hi);
    if (v < lo)      return 8'(lo);
    else if (v > hi) return 8'(hi);
    else             return 8'(v);
  endfunction

endpackage
