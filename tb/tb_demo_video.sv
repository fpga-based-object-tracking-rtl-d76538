// tb_demo_video: the tracking workload, 100 frames of 640x480 video.
//
// The evaluation video lasts 4 s at 25 frames/s, 100 frames, with the object
// drifting from the top-left towards the bottom-right: its COG plot covers x up
// to about 495 and y up to about 435. This test makes 100 synthetic frames along
// such a path (object centre from (12, 12) to (495, 435)), runs the tracking
// software model on each, and checks that the COG equals the object centre. As
// the software does, it sends each COG to the accelerator and then waits 100
// clock cycles before the next one, so the display animates the path. Every
// acknowledgement must come back in order. On every tenth frame the test holds
// the point and compares a whole displayed frame, pixel by pixel, with the
// expected picture; the final picture must show the last point.
module tb_demo_video;
  import ot_pkg::*;

  localparam int W = 640;
  localparam int H = 480;
  localparam int NFRAMES = 100;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = ~clk;  // 50 MHz

  logic             p_wr = 1'b0, p_full;
  logic [FSL_W-1:0] p_wdata = '0;
  logic             s_exists, s_read;
  logic [FSL_W-1:0] s_data;
  logic             m_write, m_full;
  logic [FSL_W-1:0] m_data;
  logic             a_exists, a_rd;
  logic [FSL_W-1:0] a_data;
  logic             hs, vs;
  rgb_t             rgb;

  fsl_link_model #(.DEPTH(16), .W(FSL_W)) u_down (
    .clk, .rst, .wr(p_wr), .wdata(p_wdata), .full(p_full),
    .exists(s_exists), .rdata(s_data), .rd(s_read));
  fsl_link_model #(.DEPTH(16), .W(FSL_W)) u_up (
    .clk, .rst, .wr(m_write), .wdata(m_data), .full(m_full),
    .exists(a_exists), .rdata(a_data), .rd(a_rd));

  fsl_hwa dut (
    .clk, .rst,
    .fsl_s_exists(s_exists), .fsl_s_data(s_data), .fsl_s_read(s_read),
    .fsl_m_full(m_full), .fsl_m_data(m_data), .fsl_m_write(m_write),
    .hs, .vs, .rgb);

  tracking_sw_model #(.W(W), .H(H), .THRESH(40)) u_sw ();
  vga_frame_checker u_grab (.clk, .rst, .hs, .vs, .rgb);

  int checks = 0;
  int failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [FSL_W-1:0] acks[$];
  always @(negedge clk) a_rd = a_exists && !rst;
  always @(posedge clk) if (a_rd && a_exists) acks.push_back(a_data);

  task automatic put(input logic [FSL_W-1:0] w);
    @(negedge clk);
    while (p_full) @(negedge clk);
    p_wr = 1'b1;
    p_wdata = w;
    @(negedge clk);
    p_wr = 1'b0;
  endtask

  initial begin
    int cx, cy, x, y, bad, pix, n_grabbed, n_cog_ok;
    n_grabbed = 0;
    n_cog_ok = 0;
    u_sw.make_background();
    repeat (5) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < NFRAMES; i++) begin
      cx = 12 + (483 * i) / (NFRAMES - 1);
      cy = 12 + (423 * i) / (NFRAMES - 1) + ((i % 8) < 4 ? (i % 4) * 6 : 0);
      if (cy > 435) cy = 435;
      u_sw.make_frame(cx, cy, i);
      u_sw.track(x, y);
      check(x == cx && y == cy, "COG equals object centre");
      if (x == cx && y == cy) n_cog_ok++;
      put(encode_cog(COORD_W'(x), COORD_W'(y)));
      repeat (100) @(negedge clk);  // the software's delay between points
      check(acks.size() == i + 1, "point acknowledged within the delay");
      if (acks.size() == i + 1)
        check(acks[i] == encode_cog(COORD_W'(x), COORD_W'(y)), "acknowledged word");
      if (i % 10 == 9) begin
        u_grab.grab_frame(1'b1, x, y, bad, pix);
        check(pix == 2 * W * H && bad == 0, "displayed frame matches");
        if (bad != 0) $display("  frame %0d: %0d samples wrong", i, bad);
        n_grabbed++;
      end
    end
    check(n_grabbed == NFRAMES / 10, "frames compared");
    check(u_grab.blank_bad == 0, "black outside the visible area");
    check(u_sw.n_median_removed > 0 && u_sw.n_rejected > 0, "noise present and removed");
    $display("frames=%0d cog_ok=%0d acks=%0d grabbed=%0d median_removed=%0d rejected=%0d",
             NFRAMES, n_cog_ok, acks.size(), n_grabbed, u_sw.n_median_removed, u_sw.n_rejected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
