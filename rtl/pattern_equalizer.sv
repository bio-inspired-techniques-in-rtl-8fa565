// Block 2: pattern equalization.
//
// Turns the binary response bus of the convolutional filters into a 4x4
// "equalized" pattern with a uniform density of 25 % (4 of 16 pixels on), so
// that every pattern presented to the spiking layer excites the neurons
// equally. The response bus is split as in the design's logic diagram:
// bits R[N_FF-1:0] come from the feature filters and bits
// R[N_FF+N_CF-1:N_FF] from the class filters.
//
//  * If a class filter responds, its trained pattern T[i] is selected; the
//    feature-filter bits are then ignored.
//  * Otherwise the feature-filter bits, read as a binary number, address one
//    of the 2^N_FF generic patterns NT[0..2^N_FF-1].
//
// The patterns live in registers written by the processor before operation
// (table address 0..2^N_FF-1 for NT, 2^N_FF..2^N_FF+N_CF-1 for T). The
// selection is purely combinational. When more than one class filter
// responds, the lowest-numbered one wins; this priority is a choice of this
// implementation, the design only states that class filters take precedence
// over feature filters.
module pattern_equalizer
  import lln_pkg::*;
#(
  parameter int unsigned N_CF = 7,
  parameter int unsigned N_FF = 9,
  parameter int unsigned PW   = PAT_BITS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          pat_we,
  input  logic [$clog2((1<<N_FF)+N_CF)-1:0] pat_addr,
  input  logic [PW-1:0]                 pat_data,
  input  logic [N_CF+N_FF-1:0]          resp,      // O11
  output logic [PW-1:0]                 pattern,   // O21
  output logic                          cf_hit,    // a class filter responded
  output logic [$clog2((1<<N_FF)+N_CF)-1:0] sel    // table entry used
);
  localparam int unsigned N_NT = 1 << N_FF;
  localparam int unsigned N_T  = N_NT + N_CF;
  localparam int unsigned SW   = $clog2(N_T);

  logic [PW-1:0] table_q [N_T];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_T; i++) table_q[i] <= '0;
    end else if (pat_we && 32'(pat_addr) < N_T) begin
      table_q[pat_addr] <= pat_data;
    end
  end

  always_comb begin
    cf_hit = 1'b0;
    sel    = SW'(resp[N_FF-1:0]);
    for (int i = N_CF - 1; i >= 0; i--) begin
      if (resp[N_FF + i]) begin
        cf_hit = 1'b1;
        sel    = SW'(N_NT + i);
      end
    end
    pattern = table_q[sel];
  end

endmodule
