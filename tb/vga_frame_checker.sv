// vga_frame_checker: testbench monitor that rebuilds the picture from VGA pins.
//
// It knows nothing of the design's counters. Pixel positions come only from the
// sync pulses, assuming standard 640x480 timing at two clocks per pixel: the
// visible part of a line starts 2*(96+48) = 288 clocks after the falling edge of
// hs, and visible line 0 follows the 35th hs falling edge after the falling
// edge of vs (2 sync + 33 back-porch lines). Outside the visible area rgb must
// be black at all times (blank_bad counts violations). grab_frame(have, x, y)
// waits for the next vs edge, compares every clock of the following visible
// frame with the expected picture (white axes 5 wide along row 0 and column 0,
// a red 5x5 square with top-left corner (x, y) if have is set, black elsewhere)
// and returns the number of wrong samples and the number of samples seen.
module vga_frame_checker
  import ot_pkg::*;
(
  input logic clk,
  input logic rst,
  input logic hs,
  input logic vs,
  input rgb_t rgb
);
  localparam int W = 640;
  localparam int H = 480;

  bit hs_q = 1'b1, vs_q = 1'b1, synced = 1'b0;
  int hcyc = 0, lcnt = 0;
  bit exp_have = 1'b0;
  int exp_x = 0, exp_y = 0;
  bit grab = 1'b0;
  int grab_bad = 0, grab_pix = 0;
  int n_axis = 0, n_dot = 0, n_blank = 0, n_hs = 0, n_vs = 0, blank_bad = 0;
  int row, off;
  logic [7:0] e;

  function automatic logic [7:0] ref_rgb(input int c, input int r);
    if (exp_have && c >= exp_x && c < exp_x + 5 && r >= exp_y && r < exp_y + 5) return 8'hE0;
    if (c < 5 || r < 5) return 8'hFF;
    return 8'h00;
  endfunction

  always @(negedge clk) begin
    if (!rst) begin
      if (hs_q && !hs) begin hcyc = 0; lcnt++; n_hs++; end
      else hcyc++;
      if (vs_q && !vs) begin lcnt = 0; synced = 1'b1; n_vs++; end
      if (synced) begin
        row = lcnt - 35;
        off = hcyc - 288;
        if (row >= 0 && row < H && off >= 0 && off < 2 * W) begin
          if (grab) begin
            e = ref_rgb(off / 2, row);
            if (rgb != e) grab_bad++;
            if (rgb == 8'hE0) n_dot++;
            if (rgb == 8'hFF) n_axis++;
            grab_pix++;
          end
        end else begin
          n_blank++;
          if (rgb != 8'h00) blank_bad++;
        end
      end
      hs_q = hs;
      vs_q = vs;
    end
  end

  task automatic grab_frame(input bit have, input int x, input int y,
                            output int bad, output int pix);
    exp_have = have;
    exp_x = x;
    exp_y = y;
    @(negedge vs);
    grab_bad = 0;
    grab_pix = 0;
    grab = 1'b1;
    @(negedge vs);
    grab = 1'b0;
    bad = grab_bad;
    pix = grab_pix;
  endtask
endmodule
