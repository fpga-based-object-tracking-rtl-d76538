// tb_fsl_hwa: end-to-end test of the object tracking display path at full size.
//
// The test plays the processor. It builds 640x480 RGB332 video frames: a
// textured background frame and frames in which a white 21x21 object moves along
// a path, with isolated noise pixels and faint background flicker added. For each
// frame it runs the tracking software: grey conversion, the delta frame against
// the background, thresholding (object where the difference exceeds 40), a 3x3
// median filter and the centre of gravity (COG). The COG must equal the object's
// centre, which the test knows independently. It sends 512*x + y over an FSL link
// model to the accelerator, at its default parameters, and collects the
// acknowledgements on a second link model.
//
// A frame grabber locates pixels only from the hs and vs pulses (standard
// 640x480 timing, two clocks per pixel) and compares each visible pixel of a
// whole frame with the expected picture: white axes 5 wide on row 0 and column 0
// and a red 5x5 square at the COG. Outside the visible area rgb must be black.
//
// Mechanisms counted (each must occur): words read from the link, acks written,
// stall cycles while the ack link is full, axis pixels and square pixels seen,
// blanked samples, hs and vs pulses, frames checked, and, on the software side,
// pixels rejected by the threshold and noise pixels removed by the median filter.
module tb_fsl_hwa;
  import ot_pkg::*;

  localparam int W = 640;
  localparam int H = 480;
  localparam int NPTS = 6;
  localparam int PX[NPTS] = '{60, 150, 260, 370, 450, 490};
  localparam int PY[NPTS] = '{40, 100, 180, 260, 350, 440};

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #10 clk = ~clk;  // 50 MHz

  // Processor -> accelerator link
  logic             p_wr;
  logic [FSL_W-1:0] p_wdata;
  logic             p_full;
  logic             s_exists, s_read;
  logic [FSL_W-1:0] s_data;
  // Accelerator -> processor link (acks)
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

  // Software model: frames and the tracking algorithm
  tracking_sw_model #(.W(W), .H(H), .THRESH(40)) u_sw ();

  // ------------------------------------------------------------------
  // Processor-side link access
  // ------------------------------------------------------------------
  task automatic put(input logic [FSL_W-1:0] w);
    @(negedge clk);
    while (p_full) @(negedge clk);
    p_wr = 1'b1;
    p_wdata = w;
    @(negedge clk);
    p_wr = 1'b0;
  endtask

  logic [FSL_W-1:0] acks[$];
  bit drain = 1'b1;
  always @(negedge clk) a_rd = drain && a_exists && !rst;
  always @(posedge clk) if (a_rd && a_exists) acks.push_back(a_data);

  // ------------------------------------------------------------------
  // Frame grabber: pixel position from hs/vs only
  // ------------------------------------------------------------------
  vga_frame_checker u_grab (.clk, .rst, .hs, .vs, .rgb);
  bit exp_have = 1'b0;
  int exp_x = 0, exp_y = 0;

  task automatic grab_frame(input string what);
    int bad, pix;
    u_grab.grab_frame(exp_have, exp_x, exp_y, bad, pix);
    check(pix == 2 * W * H, {what, ": whole frame seen"});
    check(bad == 0, {what, ": picture matches"});
    if (bad != 0) $display("  %0d samples wrong (x=%0d y=%0d have=%0d)", bad, exp_x, exp_y, exp_have);
  endtask

  // ------------------------------------------------------------------
  // Stimulus
  // ------------------------------------------------------------------
  int stall_cycles = 0;
  always @(posedge clk) if (!rst && s_exists && m_full) stall_cycles++;

  int n_reads = 0;
  always @(posedge clk) if (!rst && s_read) n_reads++;

  initial begin
    int x, y, n0;
    p_wr = 1'b0;
    p_wdata = '0;
    u_sw.make_background();
    repeat (5) @(posedge clk);
    rst = 1'b0;

    // Axes only until the first point arrives
    grab_frame("before first point");

    // Track the object frame by frame; show each point for a whole frame
    for (int i = 0; i < NPTS; i++) begin
      u_sw.make_frame(PX[i], PY[i], i * 11 + 3);
      u_sw.track(x, y);
      check(x == PX[i] && y == PY[i], "software COG equals object centre");
      n0 = acks.size();
      put(encode_cog(COORD_W'(x), COORD_W'(y)));
      while (acks.size() == n0) @(negedge clk);
      check(acks[n0] == encode_cog(COORD_W'(x), COORD_W'(y)), "ack carries the point");
      exp_have = 1'b1;
      exp_x = x;
      exp_y = y;
      grab_frame("tracked point");
    end

    // Animated trace as the software sends it: one point every 100 clocks
    n0 = acks.size();
    for (int i = 0; i < NPTS; i++) begin
      put(encode_cog(COORD_W'(PX[i]), COORD_W'(PY[i])));
      repeat (100) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check(acks.size() == n0 + NPTS, "every animated point acknowledged");
    for (int i = 0; i < NPTS && n0 + i < acks.size(); i++)
      check(acks[n0 + i] == encode_cog(COORD_W'(PX[i]), COORD_W'(PY[i])), "animation order");

    // Stall: the processor stops reading acks, the ack link fills, the display
    // must hold further words back until the processor drains it again
    drain = 1'b0;
    n0 = acks.size();
    for (int i = 0; i < 20; i++) put(encode_cog(COORD_W'(i * 20), COORD_W'(i * 20 + 5)));
    repeat (200) @(negedge clk);
    check(stall_cycles > 0, "stall seen");
    check(n_reads == 2 * NPTS + 16, "reads stop at a full ack link");
    drain = 1'b1;
    repeat (200) @(negedge clk);
    check(acks.size() == n0 + 20, "all words acknowledged after the stall");
    for (int i = 0; i < 20 && n0 + i < acks.size(); i++)
      check(acks[n0 + i] == encode_cog(COORD_W'(i * 20), COORD_W'(i * 20 + 5)), "order kept across stall");
    exp_x = 19 * 20;
    exp_y = 19 * 20 + 5;
    grab_frame("after stall");

    // Every mechanism must have happened
    check(n_reads > 0,           "mechanism: link reads");
    check(acks.size() > 0,       "mechanism: acks");
    check(stall_cycles > 0,      "mechanism: stall");
    check(u_grab.n_axis > 0,            "mechanism: axes drawn");
    check(u_grab.n_dot > 0,             "mechanism: square drawn");
    check(u_grab.n_blank > 0,           "mechanism: blanking");
    check(u_grab.blank_bad == 0,        "black outside the visible area");
    check(u_grab.n_hs > 0 && u_grab.n_vs > 0,  "mechanism: sync pulses");
    check(u_sw.n_rejected > 0,        "mechanism: threshold rejects");
    check(u_sw.n_median_removed > 0,  "mechanism: median filter removes noise");
    $display("counts: reads=%0d acks=%0d stall_cycles=%0d axis=%0d square=%0d blank=%0d hs=%0d vs=%0d rejected=%0d median_removed=%0d",
             n_reads, acks.size(), stall_cycles, u_grab.n_axis, u_grab.n_dot, u_grab.n_blank, u_grab.n_hs, u_grab.n_vs,
             u_sw.n_rejected, u_sw.n_median_removed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
