// Block 4: STDP timing and winner-take-all spiking layer.
//
// N_N output neurons each see the N_IN inputs of a 4x4 pattern through
// excitatory synapses held in 8-bit saturating counters (0..255). One run,
// started per image, shows two 10 ms windows: first the equalized pattern of
// the image (O21), then the one-pixel noise pattern from the LFSR (O31), a
// 50 % share for each.
//
// At the first cycle of every window each neuron adds the sum of the weights
// of the active inputs to its integrator (one adder per neuron). Every
// neuron whose integrator then exceeds its own threshold is a candidate; the
// candidate with the largest integrator wins (lowest index on a tie) and
// fires:
//   * its fire line (bus O42) stays high for the rest of the window (10 ms);
//   * all integrators are cleared (lateral inhibition);
//   * its threshold counter grows by TH_STEP, up to TH_MAX (spike-frequency
//     adaptation: a neuron that keeps firing becomes harder to excite);
//   * the input it fired on is kept, and on the falling edge of the fire line
//     (end of the window) its synapses are updated: active inputs are
//     potentiated by LTP_STEP, inactive ones depressed by LTD_STEP.
// When the noise window ends, a one-cycle 'noise_adv' pulse (O41) asks the
// LFSR for the next noise pattern, and the run ends.
//
// The design gives the counter synapses, the adders, comparators and
// threshold counters per neuron, the inhibition by reset, the 10 ms windows
// and the update on the falling edge of the fire signal. The step sizes,
// initial weights and thresholds, the tie rule between simultaneous
// candidates and the integrator width are choices of this implementation.
//
// Display (O43): the synapses of the 16 neurons are drawn as a 4x4 grid of
// 4x4 images, 8x8 screen pixels per synapse, in the top left 128x128 pixels.
//
// Timing: 'start' is taken when 'busy' is low; the run lasts 2*WIN cycles.
// 'fire_evt' pulses in the cycle the fire line rises, with fire_idx,
// fire_label (label of the running image) and fire_pat (fired during the
// pattern window).
module stdp_wta
  import lln_pkg::*;
#(
  parameter int unsigned N_IN     = PAT_BITS,
  parameter int unsigned N_N      = N_NEUR,
  parameter int unsigned SW       = SYN_W,
  parameter int unsigned WIN      = WIN_CYCLES,
  parameter int unsigned INT_W    = 16,
  parameter int unsigned W_INIT   = 128,
  parameter int unsigned TH_INIT  = 600,
  parameter int unsigned TH_STEP  = 8,
  parameter int unsigned TH_MAX   = 1000,
  parameter int unsigned LTP_STEP = 64,
  parameter int unsigned LTD_STEP = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [N_IN-1:0]        pattern,     // O21
  input  logic [LABEL_W-1:0]     label_in,
  input  logic [N_IN-1:0]        noise,       // O31
  output logic                   noise_adv,   // O41
  output logic                   busy,
  output logic                   in_pattern,  // pattern window shown
  output logic [N_N-1:0]         fire,        // O42
  output logic                   fire_evt,
  output logic [$clog2(N_N)-1:0] fire_idx,
  output logic [LABEL_W-1:0]     fire_label,
  output logic                   fire_pat,
  output logic                   stdp_evt,    // synapse update done
  // read-out of synapses and thresholds
  input  logic [$clog2(N_N*N_IN)-1:0] syn_rd_addr,  // neuron*N_IN + input
  output logic [SW-1:0]          syn_rd_data,
  input  logic [$clog2(N_N)-1:0] th_rd_addr,
  output logic [INT_W-1:0]       th_rd_data,
  // display
  input  pix_pos_t               pos,
  output rgb_t                   rgb          // O43
);
  localparam int unsigned NW  = $clog2(N_N);
  localparam int unsigned IW  = $clog2(N_IN);
  localparam int unsigned CW  = $clog2(WIN);
  localparam int unsigned SUMW = SW + IW + 1;

  typedef enum logic [1:0] {IDLE, PAT_WIN, NOISE_WIN} phase_t;
  phase_t phase;

  logic [SW-1:0]    w     [N_N][N_IN];
  logic [INT_W-1:0] integ [N_N];
  logic [INT_W-1:0] th    [N_N];
  logic [CW-1:0]    wcnt;
  logic             win_first, win_last;
  logic [N_IN-1:0]  pat_q, x_mem;
  logic [LABEL_W-1:0] label_q;
  logic             fired;          // a neuron fired in this window
  logic [NW-1:0]    winner;

  wire [N_IN-1:0] x = (phase == PAT_WIN) ? pat_q : noise;
  assign win_first = (phase != IDLE) && (wcnt == '0);
  assign win_last  = (phase != IDLE) && (32'(wcnt) == WIN - 1);
  assign busy       = (phase != IDLE);
  assign in_pattern = (phase == PAT_WIN);

  // ---------------- integration and comparison ----------------
  logic [INT_W-1:0] integ_next [N_N];
  logic             cand_any;
  logic [NW-1:0]    cand_idx;

  always_comb begin
    logic [SUMW-1:0]  s;
    logic [INT_W:0]   t;
    logic [INT_W-1:0] best;
    cand_any = 1'b0;
    cand_idx = '0;
    best     = '0;
    for (int j = 0; j < N_N; j++) begin
      s = '0;
      for (int i = 0; i < N_IN; i++) if (x[i]) s = s + SUMW'(w[j][i]);
      t = {1'b0, integ[j]} + (INT_W+1)'(s);
      integ_next[j] = t[INT_W] ? '1 : t[INT_W-1:0];
      if (integ_next[j] > th[j] && (!cand_any || integ_next[j] > best)) begin
        cand_any = 1'b1;
        cand_idx = NW'(j);
        best     = integ_next[j];
      end
    end
  end

  // ---------------- sequencing, fire, adaptation, STDP ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= IDLE;
      wcnt       <= '0;
      pat_q      <= '0;
      x_mem      <= '0;
      label_q    <= '0;
      fired      <= 1'b0;
      winner     <= '0;
      fire       <= '0;
      fire_evt   <= 1'b0;
      fire_idx   <= '0;
      fire_label <= '0;
      fire_pat   <= 1'b0;
      stdp_evt   <= 1'b0;
      noise_adv  <= 1'b0;
      for (int j = 0; j < N_N; j++) begin
        integ[j] <= '0;
        th[j]    <= INT_W'(TH_INIT);
        for (int i = 0; i < N_IN; i++) w[j][i] <= SW'(W_INIT);
      end
    end else begin
      fire_evt  <= 1'b0;
      stdp_evt  <= 1'b0;
      noise_adv <= 1'b0;

      // window timing
      if (phase == IDLE) begin
        wcnt <= '0;
        if (start) begin
          phase   <= PAT_WIN;
          pat_q   <= pattern;
          label_q <= label_in;
        end
      end else if (win_last) begin
        wcnt <= '0;
        if (phase == PAT_WIN) phase <= NOISE_WIN;
        else begin
          phase     <= IDLE;
          noise_adv <= 1'b1;
        end
      end else begin
        wcnt <= wcnt + 1'b1;
      end

      // integrate once per window, fire and inhibit
      if (win_first) begin
        if (cand_any) begin
          for (int j = 0; j < N_N; j++) integ[j] <= '0;
          fire[cand_idx] <= 1'b1;
          fired      <= 1'b1;
          winner     <= cand_idx;
          x_mem      <= x;
          fire_evt   <= 1'b1;
          fire_idx   <= cand_idx;
          fire_label <= label_q;
          fire_pat   <= (phase == PAT_WIN);
          if (32'(th[cand_idx]) + TH_STEP <= TH_MAX)
            th[cand_idx] <= th[cand_idx] + INT_W'(TH_STEP);
          else
            th[cand_idx] <= INT_W'(TH_MAX);
        end else begin
          for (int j = 0; j < N_N; j++) integ[j] <= integ_next[j];
        end
      end

      // falling edge of the fire line: potentiation / depression
      if (win_last && fired) begin
        fire     <= '0;
        fired    <= 1'b0;
        stdp_evt <= 1'b1;
        for (int i = 0; i < N_IN; i++) begin
          if (x_mem[i])
            w[winner][i] <= (32'(w[winner][i]) + LTP_STEP > (1 << SW) - 1)
                            ? '1 : w[winner][i] + SW'(LTP_STEP);
          else
            w[winner][i] <= (32'(w[winner][i]) < LTD_STEP)
                            ? '0 : w[winner][i] - SW'(LTD_STEP);
        end
      end
    end
  end

  assign syn_rd_data = w[NW'(32'(syn_rd_addr) / N_IN)][IW'(32'(syn_rd_addr) % N_IN)];
  assign th_rd_data  = th[th_rd_addr];

  // ---------------- display ----------------
  always_comb begin
    logic [3:0] nidx, sidx;
    nidx = {pos.y[6:5], pos.x[6:5]};
    sidx = {pos.y[4:3], pos.x[4:3]};
    rgb  = '0;
    if (pos.x < 10'd128 && pos.y < 10'd128 && 32'(nidx) < N_N && 32'(sidx) < N_IN)
      rgb = level_to_rgb(8'(w[NW'(nidx)][IW'(sidx)] << (8 - SW)));
  end

  // Only one neuron may fire at a time (winner-take-all).
  a_one_winner: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(fire));

endmodule
