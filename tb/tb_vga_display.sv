// tb_vga_display: self-checking test of the trace-display colour generator.
//
// The test stands in for both neighbours of the block: it drives hcount, vcount
// and blank directly, and it models the processor's FSL link as a queue whose
// head is shown on fsl_s_data while fsl_s_exists is high and which is popped on
// every clock with fsl_s_read high. It checks:
//   - the read handshake: one pop per word, the cycle after the word appears,
//     words taken in order at most every second cycle;
//   - the acknowledgement on the master side carries each accepted word, and no
//     word is accepted while fsl_m_full is high (the stall);
//   - the colour of every visible pixel of a 640x480 scan against a reference
//     picture: black when blanked, a 5x5 red square with its top-left corner at
//     (x, y), white axes 5 pixels wide along row 0 and column 0, black elsewhere,
//     and no square before the first word.
module tb_vga_display;
  import ot_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic blank;
  logic [CNT_W-1:0] hcount, vcount;
  logic fsl_s_exists, fsl_s_read, fsl_m_full, fsl_m_write;
  logic [FSL_W-1:0] fsl_s_data, fsl_m_data;
  rgb_t rgb;

  int checks = 0;
  int failures = 0;

  vga_display dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t h=%0d v=%0d rgb=%h", what, $time, hcount, vcount, rgb);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FSL link model (processor to display)
  logic [FSL_W-1:0] q[$];
  logic [FSL_W-1:0] acks[$];
  int reads = 0;
  assign fsl_s_exists = (q.size() != 0);
  assign fsl_s_data   = (q.size() != 0) ? q[0] : '0;
  always @(posedge clk) begin
    if (!rst) begin
      if (fsl_s_read && q.size() != 0) begin
        void'(q.pop_front());
        reads++;
      end
      if (fsl_m_write) acks.push_back(fsl_m_data);
    end
  end

  // Reference colour
  function automatic logic [7:0] ref_rgb(input int h, input int v, input bit bl,
                                         input bit have, input int x, input int y);
    if (bl) return 8'h00;
    if (have && h >= x && h < x + 5 && v >= y && v < y + 5) return 8'hE0;
    if (h < 5 || v < 5) return 8'hFF;
    return 8'h00;
  endfunction

  // Full-screen scan against the reference, one pixel per clock
  task automatic scan(input bit have, input int x, input int y);
    int bad = 0;
    for (int v = 0; v < 480; v++) begin
      for (int h = 0; h < 640; h++) begin
        hcount = CNT_W'(h);
        vcount = CNT_W'(v);
        blank  = 1'b0;
        #1;
        if (rgb != ref_rgb(h, v, 0, have, x, y)) bad++;
        @(posedge clk);
      end
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL scan (have=%0d x=%0d y=%0d): %0d pixels wrong", have, x, y, bad);
    end
  endtask

  // Blanked positions, including ones inside the square and on the axes
  task automatic blank_probe(input int x, input int y);
    int pts[4][2] = '{'{x, y}, '{0, 0}, '{700, 100}, '{100, 500}};
    foreach (pts[i]) begin
      hcount = CNT_W'(pts[i][0]);
      vcount = CNT_W'(pts[i][1]);
      blank  = 1'b1;
      #1;
      check(rgb == 8'h00, "black while blanked");
      @(posedge clk);
    end
    blank = 1'b0;
  endtask

  task automatic send(input int x, input int y);
    q.push_back(encode_cog(COORD_W'(x), COORD_W'(y)));
  endtask

  int r0, t0;
  initial begin
    blank = 1'b0; hcount = '0; vcount = '0; fsl_m_full = 1'b0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    @(posedge clk);

    // Before any word: axes only
    scan(0, 0, 0);

    // One word: read pulse comes the cycle after exists, lasts one cycle
    @(negedge clk);
    send(100, 200);
    check(!fsl_s_read, "no read before the word is seen");
    @(negedge clk);
    check(fsl_s_read, "read pulse one cycle after exists");
    check(fsl_m_write && fsl_m_data == encode_cog(9'd100, 9'd200), "ack carries the word");
    @(negedge clk);
    check(!fsl_s_read && !fsl_m_write, "single-cycle handshake");
    check(reads == 1 && acks.size() == 1, "one pop, one ack");
    @(posedge clk);
    scan(1, 100, 200);
    blank_probe(100, 200);

    // Stall: the ack link is full, the word must wait
    @(negedge clk);
    fsl_m_full = 1'b1;
    send(300, 50);
    r0 = reads;
    repeat (20) begin
      @(negedge clk);
      check(!fsl_s_read, "no read while ack link full");
    end
    check(reads == r0 && q.size() == 1, "word held during stall");
    fsl_m_full = 1'b0;
    @(negedge clk);
    check(fsl_s_read, "read after stall ends");
    @(posedge clk);
    @(posedge clk);
    scan(1, 300, 50);

    // Burst of three words: taken in order, every second cycle, last one shown
    @(negedge clk);
    send(7, 9); send(250, 251); send(499, 476);
    t0 = 0;
    r0 = reads;
    while (q.size() != 0 && t0 < 20) begin @(negedge clk); t0++; end
    check(reads == r0 + 3 && t0 == 6, "burst taken at one word per two cycles");
    @(posedge clk);
    check(acks.size() == 5, "five acks in total");
    if (acks.size() == 5) begin
      check(acks[2] == encode_cog(9'd7, 9'd9), "ack order 1");
      check(acks[3] == encode_cog(9'd250, 9'd251), "ack order 2");
      check(acks[4] == encode_cog(9'd499, 9'd476), "ack order 3");
    end
    scan(1, 499, 476);

    // A point on the axes corner: square drawn over the axes
    @(negedge clk);
    send(2, 3);
    repeat (4) @(posedge clk);
    scan(1, 2, 3);

    // Reset clears the stored point
    rst = 1'b1;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    @(posedge clk);
    scan(0, 0, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
