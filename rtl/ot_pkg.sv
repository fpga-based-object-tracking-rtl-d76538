// ot_pkg: types and constants shared by the VGA trace-display accelerator.
//
// The processor hands each centre-of-gravity (COG) result to the hardware as one
// FSL word holding 512*x + y: bits [8:0] carry y (the row, compared with vcount)
// and bits [17:9] carry x (the column, compared with hcount). Nine bits per
// coordinate follow the report, which bounds both coordinates below 500.
// Colours are 8-bit RGB332 (three bits red, three green, two blue), the format of
// the board's resistor-ladder VGA port. The display timing is the common
// 640x480 at 60 Hz mode (25 MHz pixel rate); the report defers these numbers to
// the board manual, so the porch and sync widths here are the standard ones.
package ot_pkg;

  // FSL word and coordinate widths
  localparam int unsigned FSL_W   = 32;
  localparam int unsigned COORD_W = 9;

  // 640x480 @ 60 Hz timing, in pixels and lines
  localparam int unsigned H_VISIBLE = 640;
  localparam int unsigned H_FRONT   = 16;
  localparam int unsigned H_SYNC    = 96;
  localparam int unsigned H_BACK    = 48;
  localparam int unsigned V_VISIBLE = 480;
  localparam int unsigned V_FRONT   = 10;
  localparam int unsigned V_SYNC    = 2;
  localparam int unsigned V_BACK    = 33;
  localparam int unsigned CNT_W     = 10;  // holds 0..799 and 0..524

  // 8-bit colour, RGB332
  typedef struct packed {
    logic [2:0] r;
    logic [2:0] g;
    logic [1:0] b;
  } rgb_t;

  localparam rgb_t RGB_BLACK = '{r: 3'd0, g: 3'd0, b: 2'd0};
  localparam rgb_t RGB_WHITE = '{r: 3'd7, g: 3'd7, b: 2'd3};
  localparam rgb_t RGB_RED   = '{r: 3'd7, g: 3'd0, b: 2'd0};

  // One COG point as carried in an FSL word
  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } cog_t;

  // Unpack 512*x + y; pass the low 2*COORD_W bits of the word (the rest is zero)
  function automatic cog_t decode_cog(input logic [2*COORD_W-1:0] word);
    cog_t c;
    c.y = word[COORD_W-1:0];
    c.x = word[2*COORD_W-1:COORD_W];
    return c;
  endfunction

  // Pack x and y as the processor does
  function automatic logic [FSL_W-1:0] encode_cog(input logic [COORD_W-1:0] x,
                                                  input logic [COORD_W-1:0] y);
    return FSL_W'({x, y});
  endfunction

endpackage
