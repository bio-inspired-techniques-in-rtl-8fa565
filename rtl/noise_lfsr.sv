// Block 3: noise generator for the STDP layer.
//
// A 4-bit linear feedback shift register (Fibonacci form, polynomial
// x^4 + x^3 + 1, 15-state maximal sequence) produces the position of the one
// pixel that is on in each 4x4 noise pattern (1 of 16 pixels, the noise
// density the design uses). The 16-bit one-hot noise bus is O31. The register
// steps once per 'advance' pulse, which the STDP block sends each time a
// noise pattern has been shown, so every noise window shows a new pixel.
//
// Seeding: a free-running 4-bit counter, clocked through a prescaler of
// PRESC cycles, measures how long the user takes to press button B0. On each
// press (synchronised, rising edge) the counter value becomes the new LFSR
// state, so the sequence start depends on the user's timing. A zero seed is
// replaced by 1 so the register never locks up. The LFSR width and the
// button seeding follow the design; the polynomial, the prescaler value and
// the mapping state -> pixel index (pixel = state, so pixel 0 is never used)
// are choices of this implementation.
module noise_lfsr #(
  parameter int unsigned PRESC = 50_000,    // 1 kHz seed counter at 50 MHz
  parameter int unsigned PW    = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          btn_b0,     // asynchronous push button
  input  logic          advance,    // O41: step to the next noise pattern
  output logic [3:0]    state,
  output logic [PW-1:0] noise       // O31
);
  logic [$clog2(PRESC)-1:0] pre_cnt;
  logic [3:0]               seed_cnt;
  logic [2:0]               btn_sync;
  wire                      btn_rise = btn_sync[1] & ~btn_sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_cnt  <= '0;
      seed_cnt <= '0;
      btn_sync <= '0;
      state    <= 4'h1;
    end else begin
      btn_sync <= {btn_sync[1:0], btn_b0};
      if (32'(pre_cnt) == PRESC - 1) begin
        pre_cnt  <= '0;
        seed_cnt <= seed_cnt + 4'd1;
      end else begin
        pre_cnt <= pre_cnt + 1'b1;
      end

      if (btn_rise)     state <= (seed_cnt == 4'h0) ? 4'h1 : seed_cnt;
      else if (advance) state <= {state[2:0], state[3] ^ state[2]};
    end
  end

  always_comb begin
    noise = '0;
    noise[state] = 1'b1;
  end

  // The register must never reach the all-zero lock-up state.
  a_no_lockup: assert property (@(posedge clk) disable iff (!rst_n) state != 4'h0);

endmodule
