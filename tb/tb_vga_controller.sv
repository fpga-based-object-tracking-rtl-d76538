// tb_vga_controller: self-checking test of the 640x480 @ 60 Hz sync generator.
//
// Runs the controller at its default timing from a 50 MHz clock for two full
// frames. Every cycle it checks that hcount/vcount advance by one pixel every
// second clock and wrap at 800 and 525, and that blank, hs and vs agree with the
// visible area and sync windows of the standard mode. It also measures the line
// period (1600 clocks), the hs low time (192 clocks), the vs low time (2 lines)
// and the frame period (840000 clocks, 59.5 Hz), and counts visible pixels.
module tb_vga_controller;
  import ot_pkg::*;

  localparam int H_TOT = 800;
  localparam int V_TOT = 525;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [CNT_W-1:0] hcount, vcount;
  logic blank, hs, vs;

  int checks = 0;
  int failures = 0;

  vga_controller dut (.clk, .rst, .hcount, .vcount, .blank, .hs, .vs);

  always #10 clk = ~clk;  // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: h=%0d v=%0d", what, $time, hcount, vcount);
    end
  endtask

  // Watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned cyc = 0;
  int unsigned same = 0;          // cycles hcount has held its value
  logic [CNT_W-1:0] h_prev, v_prev;
  logic hs_prev, vs_prev;
  longint hs_fall_t = -1, hs_rise_t, vs_fall_t = -1, vs_rise_t;
  int n_hs = 0, n_vs = 0, n_frames_seen = 0;
  longint visible_cycles = 0;
  bit counting = 0;

  initial begin
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(hcount == 0 && vcount == 0 && !blank && hs && vs, "reset state");
  end

  always @(negedge clk) begin
    if (!rst) begin
      cyc++;
      // Counter stepping
      if (cyc > 1) begin
        if (hcount == h_prev) begin
          same++;
          check(same <= 1, "hcount held too long");
          check(vcount == v_prev, "vcount moved without hcount wrap");
        end else begin
          check(same == 1, "hcount stepped early");
          same = 0;
          if (h_prev == CNT_W'(H_TOT - 1)) begin
            check(hcount == 0, "hcount wrap");
            check(vcount == ((v_prev == CNT_W'(V_TOT - 1)) ? 0 : v_prev + 1), "vcount step");
          end else begin
            check(hcount == h_prev + 1, "hcount step");
            check(vcount == v_prev, "vcount steady");
          end
        end
      end
      // Output decoding against the standard windows
      check(blank == (hcount >= 640 || vcount >= 480), "blank window");
      check(hs == !(hcount >= 656 && hcount < 752), "hs window");
      check(vs == !(vcount >= 490 && vcount < 492), "vs window");
      check(hcount < H_TOT && vcount < V_TOT, "counter range");

      // Periods and pulse widths
      if (hs_prev && !hs) begin
        if (hs_fall_t >= 0) check(cyc - hs_fall_t == 1600, "line period");
        hs_fall_t = cyc;
        n_hs++;
      end
      if (!hs_prev && hs && hs_fall_t >= 0) check(cyc - hs_fall_t == 192, "hs width");
      if (vs_prev && !vs) begin
        if (vs_fall_t >= 0) begin
          check(cyc - vs_fall_t == 840_000, "frame period");
          check(visible_cycles == 640 * 480 * 2, "visible pixels per frame");
          n_frames_seen++;
        end
        vs_fall_t = cyc;
        visible_cycles = 0;
        counting = 1;
        n_vs++;
      end
      if (!vs_prev && vs && vs_fall_t >= 0) check(cyc - vs_fall_t == 2 * 1600, "vs width");
      if (counting && !blank) visible_cycles++;

      h_prev = hcount;
      v_prev = vcount;
      hs_prev = hs;
      vs_prev = vs;
      if (n_frames_seen == 2) begin
        check(n_hs >= 2 * 525, "line count");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end else begin
      hs_prev = 1'b1;
      vs_prev = 1'b1;
    end
  end
endmodule
