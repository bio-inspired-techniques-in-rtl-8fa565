// Self-checking testbench of lcd_monitor at its default 640x480 timing.
// Measures the Hsync and Vsync periods and pulse widths in clock cycles
// (1600 / 192 cycles per line, 840000 / 3200 cycles per frame, i.e. a
// 59.5 Hz refresh from 50 MHz), the number of active colour cycles per line,
// and checks that each switch setting selects the right colour source.
module tb_lcd_monitor;
  import lln_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] sw = 3'b001;
  rgb_t rgb_fm = 12'h111, rgb_syn = 12'h222, rgb_cm = 12'h333;
  pix_pos_t pos;
  logic frame_start, hsync_n, vsync_n;
  rgb_t vga_rgb;

  lcd_monitor dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #30_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    longint h0, h1, h2, v0, v1, v2;
    int act, wrong;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Hsync
    @(negedge hsync_n); h0 = cyc;
    @(posedge hsync_n); h1 = cyc;
    @(negedge hsync_n); h2 = cyc;
    check(h1 - h0 == 192, $sformatf("hsync width %0d", h1 - h0));
    check(h2 - h0 == 1600, $sformatf("line period %0d", h2 - h0));
    // active cycles on one line and source selection
    act = 0; wrong = 0;
    repeat (1600) begin
      @(posedge clk); #1;
      if (vga_rgb != 0) begin act++; if (vga_rgb != 12'h111) wrong++; end
    end
    check(act == 1280, $sformatf("active cycles per line %0d", act));
    check(wrong == 0, "SW0 selects O12");
    // Vsync
    @(negedge vsync_n); v0 = cyc;
    @(posedge vsync_n); v1 = cyc;
    sw = 3'b010;
    @(negedge vsync_n); v2 = cyc;
    check(v1 - v0 == 3200, $sformatf("vsync width %0d", v1 - v0));
    check(v2 - v0 == 840000, $sformatf("frame period %0d", v2 - v0));
    for (int s = 0; s < 8; s++) begin
      rgb_t exp_c;
      sw = 3'(s);
      exp_c = sw[0] ? 12'h111 : sw[1] ? 12'h222 : sw[2] ? 12'h333 : 12'h000;
      @(posedge clk iff (pos.y == 10'(20 + 2 * s) && pos.x == 0));
      act = 0; wrong = 0;
      repeat (1600) begin
        @(posedge clk); #1;
        if (vga_rgb != 0) begin act++; if (vga_rgb != exp_c) wrong++; end
      end
      check(wrong == 0 && (exp_c == 0 ? act == 0 : act > 0), $sformatf("switches %b", sw));
    end
    // position outputs track the counters
    @(posedge frame_start); #1;
    check(pos.x == 0 && pos.y == 0, "frame starts at (0,0)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
