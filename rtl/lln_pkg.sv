// Shared constants and types of the hybrid convolutional / spiking network.
//
// The network classifies 28x28 8-bit images in three stages: a bank of 16
// convolutional filters (20x20) gives a 16-bit binary response bus, an
// equalization table maps that bus to a 4x4 pattern of 25 % density, and a
// winner-take-all layer of spiking neurons with counter synapses learns the
// patterns by STDP. Sizes that come from the design description (image and
// filter sides, 8-bit data, 16 filters, 16 neurons, 8-bit synapses, 4-bit
// labels, a 50 MHz clock and 10 ms presentation windows) are the defaults
// here; the remaining widths are choices of this implementation and are
// marked as such.
package lln_pkg;

  // Image and filter geometry.
  localparam int unsigned IMG_SIDE  = 28;
  localparam int unsigned FLT_SIDE  = 20;
  localparam int unsigned CONV_SIDE = IMG_SIDE - FLT_SIDE + 1;   // 9
  localparam int unsigned N_FILT    = 16;
  localparam int unsigned PIX_W     = 8;                          // unsigned pixels
  localparam int unsigned WGT_W     = 8;                          // signed weights
  localparam int unsigned CONV_W    = 16;                         // stored convolution result

  // Equalized patterns and the spiking layer.
  localparam int unsigned PAT_BITS  = 16;                         // 4x4 pattern
  localparam int unsigned N_NEUR    = 16;
  localparam int unsigned SYN_W     = 8;                          // counter 0..255
  localparam int unsigned N_CLASS   = 10;
  localparam int unsigned LABEL_W   = 4;

  // Timing: 50 MHz master clock, 10 ms per pattern or noise presentation.
  localparam int unsigned CLK_HZ      = 50_000_000;
  localparam int unsigned WIN_CYCLES  = CLK_HZ / 100;             // 10 ms

  localparam int unsigned RGB_W = 12;                             // 4 bits per channel

  typedef logic [RGB_W-1:0] rgb_t;

  // Screen position supplied by the monitor controller to the blocks that
  // draw (the "Vsync/Hsync" return paths of the system diagram).
  typedef struct packed {
    logic [9:0] x;
    logic [9:0] y;
  } pix_pos_t;

  // Configuration write from the processor side, decoded per block.
  typedef struct packed {
    logic        we;
    logic [15:0] addr;     // word address inside the selected region
    logic [31:0] data;
  } cfg_wr_t;

  // Map an 8-bit level to a colour ramp (dark blue -> yellow), used by all
  // three displays.
  function automatic rgb_t level_to_rgb(input logic [7:0] lvl);
    logic [3:0] v;
    v = lvl[7:4];
    return {v, v, 4'hF - v};
  endfunction

endpackage
