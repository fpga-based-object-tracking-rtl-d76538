// vga_display: colour generator of the VGA trace display.
//
// It takes centre-of-gravity (COG) points from the processor's FSL link and
// paints each pixel the controller names. When fsl_s_exists is high and no read
// is in progress, the word on fsl_s_data (512*x + y) is stored as the current
// point and fsl_s_read is pulsed for one cycle, which pops the word from the
// link. The accepted word is returned on the master FSL port (fsl_m_write with
// fsl_m_data) as an acknowledgement; while fsl_m_full is high no new word is
// accepted, so the slave link stalls instead of losing an acknowledgement.
//
// Pixel colour, from highest priority: black while blank is high; POINT_RGB
// inside a DOT x DOT square whose top-left corner is the stored (x, y) (5x5 = 25
// times the area of one pixel, so it can be seen); AXIS_RGB on the X axis (rows
// 0..AXIS_W-1) and the Y axis (columns 0..AXIS_W-1); BG_RGB elsewhere. No point
// is drawn until the first word has arrived. Only the latest point is held;
// the processor animates the trace by sending one point after another.
//
// Interface: clk, rst (synchronous, active high); hcount, vcount, blank from
// vga_controller; FSL slave (exists, data, read) and master (full, data, write)
// signals; rgb out. Timing: a word is taken the cycle after fsl_s_exists rises
// (one cycle per word at most every two cycles); the new point shows from the
// next pixel on. rgb is a combinational function of the counters and registers.
//
// From the report: the ports of its block diagram, axes of width 5, storing x
// and y and pulsing the read acknowledge when 'exist' is high, plotting where
// hcount and vcount equal x and y, and the 25-fold enlargement. The colours, the
// axis placement along the top and left edges, the corner of the square, the
// 8-bit rgb width and the acknowledgement on the master port are this design's
// choices.
module vga_display
  import ot_pkg::*;
#(
  parameter int unsigned AXIS_W    = 5,
  parameter int unsigned DOT       = 5,
  parameter rgb_t        AXIS_RGB  = RGB_WHITE,
  parameter rgb_t        POINT_RGB = RGB_RED,
  parameter rgb_t        BG_RGB    = RGB_BLACK
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             blank,
  input  logic [CNT_W-1:0] hcount,
  input  logic [CNT_W-1:0] vcount,
  // FSL slave side: COG words from the processor
  input  logic             fsl_s_exists,
  input  logic [FSL_W-1:0] fsl_s_data,
  output logic             fsl_s_read,
  // FSL master side: acknowledgement back to the processor
  input  logic             fsl_m_full,
  output logic [FSL_W-1:0] fsl_m_data,
  output logic             fsl_m_write,
  output rgb_t             rgb
);

  cog_t cog_q;
  logic valid_q;
  logic take;
  logic in_dot, on_axis;

  assign take = fsl_s_exists && !fsl_s_read && !fsl_m_full;

  always_ff @(posedge clk) begin
    if (rst) begin
      cog_q       <= '0;
      valid_q     <= 1'b0;
      fsl_s_read  <= 1'b0;
      fsl_m_write <= 1'b0;
      fsl_m_data  <= '0;
    end else begin
      fsl_s_read  <= take;
      fsl_m_write <= take;
      if (take) begin
        cog_q      <= decode_cog(fsl_s_data[2*COORD_W-1:0]);
        valid_q    <= 1'b1;
        fsl_m_data <= fsl_s_data;
      end
    end
  end

  always_comb begin
    in_dot  = valid_q
           && ({1'b0, hcount} >= (CNT_W+1)'(cog_q.x))
           && ({1'b0, hcount} <  (CNT_W+1)'(cog_q.x) + (CNT_W+1)'(DOT))
           && ({1'b0, vcount} >= (CNT_W+1)'(cog_q.y))
           && ({1'b0, vcount} <  (CNT_W+1)'(cog_q.y) + (CNT_W+1)'(DOT));
    on_axis = (hcount < CNT_W'(AXIS_W)) || (vcount < CNT_W'(AXIS_W));
    if (blank)        rgb = RGB_BLACK;
    else if (in_dot)  rgb = POINT_RGB;
    else if (on_axis) rgb = AXIS_RGB;
    else              rgb = BG_RGB;
  end

  // FSL rules: pop only a word that exists, push only into a link with room
  a_read_needs_word : assert property (@(posedge clk) disable iff (rst)
                                       fsl_s_read |-> fsl_s_exists);
  a_write_needs_room : assert property (@(posedge clk) disable iff (rst)
                                        fsl_m_write |-> !$past(fsl_m_full));

endmodule
