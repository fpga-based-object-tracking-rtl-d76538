// fsl_hwa: VGA trace-display accelerator of the object tracking system.
//
// The processor computes, for each video frame, the centre of gravity (COG) of
// the moving object and sends it as one FSL word, 512*x + y. This block turns
// those words into a picture on a 640x480, 60 Hz VGA monitor: two axes of width
// 5 along the top and left edges and a 5x5 square at the latest COG. Sending the
// points one after another with a delay between them animates the object's path.
//
// Inside, vga_controller counts pixels and lines and makes the sync and blank
// signals; vga_display holds the latest point, answers the FSL handshake and
// picks each pixel's colour. Both run on the 50 MHz FSL clock.
//
// Interface: clk, rst (synchronous, active high); the FSL slave link from the
// processor (fsl_s_exists, fsl_s_data, fsl_s_read); the FSL master link back to
// it (fsl_m_full, fsl_m_data, fsl_m_write), which carries an acknowledgement of
// each accepted word; the VGA pins hs, vs (active low) and rgb (RGB332).
// Timing: hs, vs and the counters are registered; rgb follows the counters
// combinationally, so all VGA pins describe the same pixel.
//
// The split into controller and display and their ports follow the report's
// block diagram; the acknowledgement contents and pin polarities are this
// design's choices.
module fsl_hwa
  import ot_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             fsl_s_exists,
  input  logic [FSL_W-1:0] fsl_s_data,
  output logic             fsl_s_read,
  input  logic             fsl_m_full,
  output logic [FSL_W-1:0] fsl_m_data,
  output logic             fsl_m_write,
  output logic             hs,
  output logic             vs,
  output rgb_t             rgb
);

  logic [CNT_W-1:0] hcount, vcount;
  logic             blank;

  vga_controller u_ctrl (
    .clk    (clk),
    .rst    (rst),
    .hcount (hcount),
    .vcount (vcount),
    .blank  (blank),
    .hs     (hs),
    .vs     (vs)
  );

  vga_display u_disp (
    .clk          (clk),
    .rst          (rst),
    .blank        (blank),
    .hcount       (hcount),
    .vcount       (vcount),
    .fsl_s_exists (fsl_s_exists),
    .fsl_s_data   (fsl_s_data),
    .fsl_s_read   (fsl_s_read),
    .fsl_m_full   (fsl_m_full),
    .fsl_m_data   (fsl_m_data),
    .fsl_m_write  (fsl_m_write),
    .rgb          (rgb)
  );

endmodule
