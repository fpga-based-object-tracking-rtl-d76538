// vga_controller: sync and position generator for a 640x480, 60 Hz VGA display.
//
// A divider turns the 50 MHz system clock into a one-in-CLK_DIV pixel enable
// (25 MHz for the default of 2). On each enable the horizontal counter hcount
// steps through H_VISIBLE + front porch + sync + back porch pixels; at its wrap
// the vertical counter vcount steps through the lines the same way. hcount and
// vcount give the column and row of the pixel being sent; blank is high whenever
// either is outside the visible area. hs and vs are active-low pulses placed
// after the front porches.
//
// Interface: clk, rst (synchronous, active high) in; hcount, vcount, blank, hs,
// vs out. Timing: all outputs are registers and change together, on the clock
// edge that carries the pixel enable, so blank, hs and vs always describe the
// pixel that hcount/vcount name. A frame lasts CLK_DIV*800*525 clock cycles.
//
// The report gives the ports (clk, rst, blank, hcount, vcount), the 640x480 at
// 60 Hz mode, the 50 MHz clock and the job of generating HS and VS; it leaves
// porch and sync widths to the board manual. Those widths, the sync polarity,
// the clock-enable divider and the registered outputs are this design's choice.
module vga_controller
  import ot_pkg::*;
#(
  parameter int unsigned CLK_DIV   = 2,
  parameter int unsigned H_VIS     = H_VISIBLE,
  parameter int unsigned H_FP      = H_FRONT,
  parameter int unsigned H_SW      = H_SYNC,
  parameter int unsigned H_BP      = H_BACK,
  parameter int unsigned V_VIS     = V_VISIBLE,
  parameter int unsigned V_FP      = V_FRONT,
  parameter int unsigned V_SW      = V_SYNC,
  parameter int unsigned V_BP      = V_BACK
) (
  input  logic             clk,
  input  logic             rst,
  output logic [CNT_W-1:0] hcount,
  output logic [CNT_W-1:0] vcount,
  output logic             blank,
  output logic             hs,
  output logic             vs
);

  localparam int unsigned H_TOTAL = H_VIS + H_FP + H_SW + H_BP;
  localparam int unsigned V_TOTAL = V_VIS + V_FP + V_SW + V_BP;
  localparam int unsigned DIV_W   = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  logic [DIV_W-1:0] div_cnt;
  logic             pix_en;
  logic [CNT_W-1:0] h_next, v_next;

  // Pixel-rate enable
  always_ff @(posedge clk) begin
    if (rst || div_cnt == DIV_W'(CLK_DIV - 1)) div_cnt <= '0;
    else                                     div_cnt <= div_cnt + 1'b1;
  end
  assign pix_en = (div_cnt == DIV_W'(CLK_DIV - 1));

  // Next position
  always_comb begin
    h_next = hcount;
    v_next = vcount;
    if (hcount == CNT_W'(H_TOTAL - 1)) begin
      h_next = '0;
      v_next = (vcount == CNT_W'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
    end else begin
      h_next = hcount + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      blank  <= 1'b0;
      hs     <= 1'b1;
      vs     <= 1'b1;
    end else if (pix_en) begin
      hcount <= h_next;
      vcount <= v_next;
      blank  <= (h_next >= CNT_W'(H_VIS)) || (v_next >= CNT_W'(V_VIS));
      hs     <= !((h_next >= CNT_W'(H_VIS + H_FP)) && (h_next < CNT_W'(H_VIS + H_FP + H_SW)));
      vs     <= !((v_next >= CNT_W'(V_VIS + V_FP)) && (v_next < CNT_W'(V_VIS + V_FP + V_SW)));
    end
  end

endmodule
