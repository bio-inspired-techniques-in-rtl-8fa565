// Block 6: monitor control (VGA).
//
// Generates 640x480 VGA timing at a 60 Hz refresh rate from the 50 MHz master
// clock (pixel rate = clock / PIX_DIV = 25 MHz, 800 x 525 pixel periods per
// frame, active-low sync pulses) and hands the current screen position to
// the three drawing blocks. Their 12-bit colours (4 bits per channel) come
// back combinationally and the switches choose which one is shown:
//   SW0 -> O12 (average feature maps), SW1 -> O43 (synapses),
//   SW2 -> O52 (confusion matrix); the lowest-numbered closed switch wins,
//   and the screen is black with no switch closed.
// Colour, Hsync and Vsync are registered together, one clock after the
// position. The 60 Hz refresh, the 12-bit colour and the three switches
// follow the design; the resolution, the sync timing and the switch priority
// are choices of this implementation.
module lcd_monitor
  import lln_pkg::*;
#(
  parameter int unsigned PIX_DIV = 2,
  parameter int unsigned H_ACT = 640, H_FP = 16, H_SYNC = 96, H_BP = 48,
  parameter int unsigned V_ACT = 480, V_FP = 10, V_SYNC = 2,  V_BP = 33
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] sw,
  input  rgb_t       rgb_fm,     // O12
  input  rgb_t       rgb_syn,    // O43
  input  rgb_t       rgb_cm,     // O52
  output pix_pos_t   pos,
  output logic       frame_start,
  output logic       hsync_n,
  output logic       vsync_n,
  output rgb_t       vga_rgb
);
  localparam int unsigned H_TOT = H_ACT + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_ACT + V_FP + V_SYNC + V_BP;

  logic [$clog2(PIX_DIV)-1:0] div;
  logic [9:0] hc, vc;
  wire        pix_en = (32'(div) == PIX_DIV - 1);
  wire        active = (32'(hc) < H_ACT) && (32'(vc) < V_ACT);

  assign pos.x = hc;
  assign pos.y = vc;

  rgb_t sel_rgb;
  always_comb begin
    if      (sw[0]) sel_rgb = rgb_fm;
    else if (sw[1]) sel_rgb = rgb_syn;
    else if (sw[2]) sel_rgb = rgb_cm;
    else            sel_rgb = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0;
      hc  <= '0;
      vc  <= '0;
      hsync_n <= 1'b1;
      vsync_n <= 1'b1;
      vga_rgb <= '0;
      frame_start <= 1'b0;
    end else begin
      frame_start <= 1'b0;
      div <= pix_en ? '0 : div + 1'b1;
      if (pix_en) begin
        if (32'(hc) == H_TOT - 1) begin
          hc <= '0;
          if (32'(vc) == V_TOT - 1) begin
            vc <= '0;
            frame_start <= 1'b1;
          end else vc <= vc + 10'd1;
        end else hc <= hc + 10'd1;
      end
      hsync_n <= !((32'(hc) >= H_ACT + H_FP) && (32'(hc) < H_ACT + H_FP + H_SYNC));
      vsync_n <= !((32'(vc) >= V_ACT + V_FP) && (32'(vc) < V_ACT + V_FP + V_SYNC));
      vga_rgb <= active ? sel_rgb : '0;
    end
  end

endmodule
