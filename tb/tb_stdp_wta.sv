// Self-checking testbench of stdp_wta with 16 inputs and 16 neurons and the
// presentation window shortened to WIN cycles.
//
// Part 1 drives random 25 %-density patterns and one-pixel noise, and runs an
// independent cycle-free model of the layer next to it: integration once per
// window, candidates above threshold, winner = largest integrator, reset of
// all integrators, threshold adaptation and the LTP/LTD update at the end of
// the window. After every image the fire events, all 256 synapses and all 16
// thresholds are compared with the model, the run length is checked to be
// 2*WIN cycles and each fire line to stay high WIN-1 cycles.
// Part 2 presents four non-overlapping patterns in random order and checks
// that the layer specialises: each pattern ends up firing its own neuron.
module tb_stdp_wta;
  import lln_pkg::*;
  localparam int WIN = 20, NI = 16, NN = 16;
  localparam int TH_INIT = 600, TH_STEP = 8, TH_MAX = 1000, LTP = 64, LTD = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic [15:0] pattern = '0, noise = 16'h0002;
  logic [3:0]  label_in = '0;
  logic noise_adv, busy, in_pattern, fire_evt, fire_pat, stdp_evt;
  logic [15:0] fire;
  logic [3:0]  fire_idx, fire_label, th_rd_addr = '0;
  logic [7:0]  syn_rd_addr = '0, syn_rd_data;
  logic [15:0] th_rd_data;
  pix_pos_t pos = '0;
  rgb_t rgb;

  stdp_wta #(.WIN(WIN), .TH_INIT(TH_INIT), .TH_STEP(TH_STEP), .TH_MAX(TH_MAX),
             .LTP_STEP(LTP), .LTD_STEP(LTD)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  int mw [NN][NI];
  int mi [NN];
  int mt [NN];

  // monitor: fire events and fire-high cycles
  int ev_idx [$];
  bit ev_pat [$];
  int ev_lbl [$];
  int fire_cycles = 0;
  always @(posedge clk) begin
    if (rst_n && fire_evt) begin
      ev_idx.push_back(int'(fire_idx));
      ev_pat.push_back(fire_pat);
      ev_lbl.push_back(int'(fire_label));
    end
    if (fire != 0) fire_cycles++;
    if (noise_adv) noise <= 16'(1 << $urandom_range(0, 15));
  end

  // model one window; returns winner or -1
  function automatic int model_window(logic [15:0] x);
    int best, bi, s;
    int nx [NN];
    bi = -1; best = 0;
    for (int j = 0; j < NN; j++) begin
      s = 0;
      for (int i = 0; i < NI; i++) if (x[i]) s += mw[j][i];
      nx[j] = mi[j] + s;
      if (nx[j] > 65535) nx[j] = 65535;
      if (nx[j] > mt[j] && (bi < 0 || nx[j] > best)) begin bi = j; best = nx[j]; end
    end
    if (bi >= 0) begin
      for (int j = 0; j < NN; j++) mi[j] = 0;
      mt[bi] = (mt[bi] + TH_STEP > TH_MAX) ? TH_MAX : mt[bi] + TH_STEP;
      for (int i = 0; i < NI; i++)
        if (x[i]) mw[bi][i] = (mw[bi][i] + LTP > 255) ? 255 : mw[bi][i] + LTP;
        else      mw[bi][i] = (mw[bi][i] < LTD) ? 0 : mw[bi][i] - LTD;
    end else begin
      for (int j = 0; j < NN; j++) mi[j] = nx[j];
    end
    return bi;
  endfunction

  function automatic logic [15:0] rand_pat();
    logic [15:0] p;
    p = '0;
    while ($countones(p) < 4) p[$urandom_range(0, 15)] = 1'b1;
    return p;
  endfunction

  // present one image; returns list of model fires through the queues
  task automatic run_image(input logic [15:0] p, input logic [3:0] lbl,
                           output int w_pat, output int w_noise, output int cyc);
    logic [15:0] nz;
    int t0;
    @(posedge clk iff !busy);
    nz = noise;
    start <= 1; pattern <= p; label_in <= lbl;
    @(posedge clk);
    start <= 0;
    t0 = $time;
    @(negedge busy);
    cyc = (int'($time) - t0) / 10;
    w_pat   = model_window(p);
    w_noise = model_window(nz);
    @(posedge clk);
  endtask

  initial begin
    int wp, wn, cyc, nf, nev, fc0;
    int owner [4];
    int hits [4][NN];
    logic [15:0] pats [4];
    for (int j = 0; j < NN; j++) begin
      mi[j] = 0; mt[j] = TH_INIT;
      for (int i = 0; i < NI; i++) mw[j][i] = 128;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // ---------- part 1: random stream against the model ----------
    nev = 0;
    for (int n = 0; n < 120; n++) begin
      fc0 = fire_cycles;
      run_image(rand_pat(), 4'(n % 10), wp, wn, cyc);
      check(cyc == 2 * WIN + 1 || cyc == 2 * WIN, $sformatf("run length %0d", cyc));
      nf = int'(wp >= 0) + int'(wn >= 0);
      check(ev_idx.size() == nf, $sformatf("image %0d: %0d fire events, model %0d", n, ev_idx.size(), nf));
      if (wp >= 0 && ev_idx.size() > 0) begin
        check(ev_idx[0] == wp && ev_pat[0] && ev_lbl[0] == n % 10, "pattern-window winner");
        void'(ev_idx.pop_front()); void'(ev_pat.pop_front()); void'(ev_lbl.pop_front());
      end
      if (wn >= 0 && ev_idx.size() > 0) begin
        check(ev_idx[0] == wn && !ev_pat[0], "noise-window winner");
        void'(ev_idx.pop_front()); void'(ev_pat.pop_front()); void'(ev_lbl.pop_front());
      end
      ev_idx.delete(); ev_pat.delete(); ev_lbl.delete();
      check(fire_cycles - fc0 == nf * (WIN - 1), $sformatf("fire high %0d cycles", fire_cycles - fc0));
      nev += nf;
      for (int j = 0; j < NN; j++) begin
        th_rd_addr = 4'(j); #1;
        check(int'(th_rd_data) == mt[j], $sformatf("threshold %0d: %0d model %0d", j, th_rd_data, mt[j]));
        for (int i = 0; i < NI; i++) begin
          syn_rd_addr = 8'(j * NI + i); #1;
          if (int'(syn_rd_data) != mw[j][i]) begin
            checks++; failures++;
            $display("FAIL: image %0d synapse %0d/%0d = %0d model %0d", n, j, i, syn_rd_data, mw[j][i]);
          end
        end
      end
      checks++;
    end
    check(nev > 10, $sformatf("enough fire events (%0d)", nev));

    // display shows synapse (neuron 5, input 6): neuron 5 at (32,32), input 6 at (16,8)
    pos.x = 10'(32 + 16 + 3); pos.y = 10'(32 + 8 + 3); #1;
    check(rgb == level_to_rgb(8'(mw[5][6])), "display of synapse 5/6");

    // ---------- part 2: specialisation on four patterns ----------
    pats[0] = 16'h000F; pats[1] = 16'h00F0; pats[2] = 16'h0F00; pats[3] = 16'hF000;
    for (int a = 0; a < 4; a++) for (int j = 0; j < NN; j++) hits[a][j] = 0;
    for (int n = 0; n < 400; n++) begin
      int a;
      a = $urandom_range(0, 3);
      run_image(pats[a], 4'(a), wp, wn, cyc);
      if (n >= 300 && wp >= 0) hits[a][wp]++;
      ev_idx.delete(); ev_pat.delete(); ev_lbl.delete();
    end
    for (int a = 0; a < 4; a++) begin
      int best, tot;
      best = 0; tot = 0; owner[a] = 0;
      for (int j = 0; j < NN; j++) begin
        tot += hits[a][j];
        if (hits[a][j] > best) begin best = hits[a][j]; owner[a] = j; end
      end
      $display("pattern %0d: neuron %0d fired %0d of %0d pattern-window fires", a, owner[a], best, tot);
      check(tot > 0 && best * 10 >= tot * 9, $sformatf("pattern %0d fires one neuron", a));
      for (int b = 0; b < a; b++) check(owner[a] != owner[b], "distinct neurons per pattern");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
