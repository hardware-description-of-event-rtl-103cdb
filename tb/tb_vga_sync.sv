// Testbench of vga_sync: over two full frames it measures line and frame
// length, sync pulse widths and positions, and the visible area size.
module tb_vga_sync;
  logic clk = 0, rst = 1;
  logic hsync, vsync, video_on, frame_start;
  logic [9:0] px, py;
  int checks = 0, failures = 0;
  longint cyc = 0, fs_last = -1, hs_fall_last = -1;
  int hs_low = 0, vis_in_frame = 0, vs_low_lines = 0;
  logic hs_prev = 1;

  vga_sync dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    check(frame_start && px == 0 && py == 0, "frame starts at 0,0 after reset");
    repeat (2 * 800 * 525 + 10) begin
      // sample current pixel
      if (hs_prev && !hsync) begin
        check(px == 656, $sformatf("hsync falls at px %0d", px));
        if (hs_fall_last >= 0) check(cyc - hs_fall_last == 800, "line length 800");
        hs_fall_last = cyc;
      end
      if (!hsync && hs_prev == 0 && px == 752) check(0, "hsync too long");
      if (px == 0 && !vsync) vs_low_lines++;
      if (!vsync) check(py == 490 || py == 491, "vsync lines 490-491");
      if (frame_start) begin
        if (fs_last >= 0) begin
          check(cyc - fs_last == 800 * 525, "frame length 420000");
          check(vis_in_frame == 640 * 480, $sformatf("visible pixels %0d", vis_in_frame));
          check(hs_low == 96 * 525, $sformatf("hsync low clocks %0d", hs_low));
          check(vs_low_lines == 2, "vsync 2 lines");
        end
        fs_last = cyc; vis_in_frame = 0; hs_low = 0; vs_low_lines = 0;
      end
      if (video_on) begin
        vis_in_frame++;
        if (px >= 640 || py >= 480) check(0, "video_on outside 640x480");
      end
      if (!hsync) hs_low++;
      hs_prev = hsync;
      @(negedge clk);
      cyc++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * 800 * 525) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
