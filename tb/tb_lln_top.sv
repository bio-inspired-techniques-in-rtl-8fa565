// End-to-end testbench of lln_top with shortened timing (presentation
// windows of WIN = 20000 cycles instead of 10 ms, seed prescaler 16, neurons
// linked after
// LINK = 20 fire events); all sizes (28x28 images, sixteen 20x20 filters,
// 519-entry equalization table, 16 neurons) are the defaults.
//
// A synthetic 10-class data set is generated: one random prototype image per
// class, samples are the prototype plus uniform pixel noise. Classes 0..6 are
// "trained": filter 9+i is a matched filter of prototype i with a threshold
// half way between its response to class i and to the other classes. Filters
// 0..8 are random feature filters with median thresholds. The equalization
// table holds 4-of-16 patterns that share at most 2 pixels.
//
// Checked: the filter responses of the first samples against a reference
// convolution, the equalized pattern of every sample against the table, the
// linking of neurons, an accuracy of at least twice chance (20 %) on
// the neurons once linked, and that each mechanism
// occurred: class-filter path, feature-filter path, the one-entry buffer
// waiting for a busy STDP layer, fires in pattern and noise windows,
// threshold adaptation, synapse updates, LFSR stepping and button seeding,
// neuron linking, VGA frames and all three display sources.
module tb_lln_top;
  import lln_pkg::*;
  localparam int WIN = 20000, PRESC = 16, LINK = 20;
  localparam int NSAMP = 700, NREF = 12;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;       // 50 MHz

  // AXI4-Lite master signals and word write / read tasks
  logic [17:0] awaddr = '0, araddr = '0;
  logic        awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [31:0] wdata = '0, rdata;
  logic [1:0]  bresp, rresp;

  // Signals change at the falling clock edge and are sampled by the design
  // at the rising edge.
  task automatic axi_write(input logic [15:0] waddr, input logic [31:0] dat);
    @(negedge clk);
    awaddr = {waddr, 2'b00}; wdata = dat; awvalid = 1; wvalid = 1; bready = 1;
    while (!(awready && wready)) @(negedge clk);
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    @(negedge clk);
    bready = 0;
  endtask

  task automatic axi_read(input logic [15:0] waddr, output logic [31:0] dat);
    @(negedge clk);
    araddr = {waddr, 2'b00}; arvalid = 1; rready = 1;
    while (!arready) @(negedge clk);
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(negedge clk);
    dat = rdata;
    @(negedge clk);
    rready = 0;
  endtask
  logic btn_b0 = 0;
  logic [2:0] sw = 3'b001;
  logic hsync_n, vsync_n;
  rgb_t vga_rgb;
  logic [15:0] fire;

  lln_top #(.WIN(WIN), .PRESC(PRESC), .LINK_FIRES(LINK)) dut (
    .clk, .rst_n,
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready),
    .s_wdata(wdata), .s_wstrb(4'hF), .s_wvalid(wvalid), .s_wready(wready),
    .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready),
    .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid), .s_rready(rready),
    .btn_b0, .sw, .hsync_n, .vsync_n, .vga_rgb, .fire
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- data set ----------------
  logic [7:0]        proto [10][784];
  logic [7:0]        img   [784];
  logic signed [7:0] w     [16][400];
  int                thr   [16];
  logic [15:0]       tbl   [519];
  logic [15:0]       fam   [$];

  int rt_cs, rt_fs;   // loop bounds set at run time keep the reference loops rolled

  function automatic int conv_max(input int f, input int src_proto, input int pc);
    int best, s, cs, fs;
    cs = rt_cs; fs = rt_fs;
    best = -40000;
    for (int py = 0; py < cs; py++)
      for (int px = 0; px < cs; px++) begin
        s = 0;
        for (int ky = 0; ky < fs; ky++)
          for (int kx = 0; kx < fs; kx++)
            s += int'(src_proto >= 0 ? proto[pc][(py+ky)*28+px+kx] : img[(py+ky)*28+px+kx])
                 * int'(w[f][ky*20+kx]);
        if (s > 32767) s = 32767;
        if (s < -32768) s = -32768;
        if (s > best) best = s;
      end
    return best;
  endfunction

  // ---------------- monitors ----------------
  int frames_sw [3];
  int lit_sw    [3];
  always @(posedge clk) if (rst_n && vga_rgb != 0) begin
    if (sw[0]) lit_sw[0]++; else if (sw[1]) lit_sw[1]++; else if (sw[2]) lit_sw[2]++;
  end
  always @(negedge vsync_n) if (rst_n) begin
    if (sw[0]) frames_sw[0]++; else if (sw[1]) frames_sw[1]++; else if (sw[2]) frames_sw[2]++;
  end

  initial begin
    logic [31:0] d, st;
    int n_cf, n_ff, n_wait, n_seed, lfsr_seen, th_up, r [10][16], cm_tot, nf;
    int nlen, pn, pl, ok_acc, lbl, ncls, ncor;
    n_cf = 0; n_ff = 0; n_wait = 0; n_seed = 0; lfsr_seen = 0; th_up = 0;
    for (int k = 0; k < 3; k++) begin frames_sw[k] = 0; lit_sw[k] = 0; end
    rt_cs = 9; rt_fs = 20;

    // prototypes, filters, thresholds
    for (int c = 0; c < 10; c++) for (int p = 0; p < 784; p++) proto[c][p] = 8'($urandom_range(0, 255));
    for (int f = 0; f < 16; f++)
      for (int k = 0; k < 400; k++)
        if (f >= 9) begin
          int v;
          v = (int'(proto[f-9][(4 + k/20)*28 + 4 + k%20]) - 128) / 32;
          w[f][k] = 8'(v);
        end else w[f][k] = 8'(int'($urandom_range(0, 8)) - 4);
    for (int f = 0; f < 16; f++) for (int c = 0; c < 10; c++) r[c][f] = conv_max(f, 1, c);
    for (int f = 0; f < 16; f++) begin
      if (f >= 9) begin
        int other;
        other = -40000;
        for (int c = 0; c < 10; c++) if (c != f - 9 && r[c][f] > other) other = r[c][f];
        thr[f] = (r[f-9][f] + other) / 2;
      end else begin
        int srt [10];
        for (int c = 0; c < 10; c++) srt[c] = r[c][f];
        srt.sort();
        thr[f] = (srt[4] + srt[5]) / 2;
      end
    end
    // pattern family: 4 pixels on, at most 2 in common
    for (int m = 0; m < 65536; m++)
      if ($countones(16'(m)) == 4) begin
        bit good;
        good = 1;
        foreach (fam[i]) if ($countones(fam[i] & 16'(m)) > 2) good = 0;
        if (good) fam.push_back(16'(m));
      end
    for (int e = 0; e < 519; e++)
      tbl[e] = (e >= 512) ? fam[e - 512] : fam[7 + (e * 37) % (fam.size() - 7)];

    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int f = 0; f < 16; f++)
      for (int k = 0; k < 400; k++) axi_write(16'(16'h2000 + f * 512 + k), 32'(w[f][k]));
    for (int f = 0; f < 16; f++) axi_write(16'(16'h1000 + f), 32'(thr[f]));
    for (int e = 0; e < 519; e++) axi_write(16'(16'h1400 + e), 32'(tbl[e]));

    for (int n = 0; n < NSAMP; n++) begin
      lbl = $urandom_range(0, 9);
      for (int p = 0; p < 784; p++) begin
        int v;
        v = int'(proto[lbl][p]) + int'($urandom_range(0, 48)) - 24;
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        img[p] = 8'(v);
        axi_write(16'(p), 32'(v));
      end
      // wait until the convolution and the hand-over buffer are free
      do begin
        axi_read(16'h0800, st);
        if (st[2]) n_wait++;
      end while (st[0] || st[2]);
      axi_read(16'h0805, d);
      nlen = int'(d[15:0]);
      axi_write(16'h0800, 32'(lbl));
      do axi_read(16'h0805, d); while (int'(d[15:0]) == nlen);
      axi_read(16'h0802, d);
      if (n < NREF) begin
        logic [15:0] expr;
        for (int f = 0; f < 16; f++) expr[f] = conv_max(f, -1, 0) > thr[f];
        check(d[15:0] == expr, $sformatf("sample %0d responses %h exp %h", n, d[15:0], expr));
      end
      begin
        logic [15:0] rsp;
        int e;
        rsp = d[15:0];
        e = int'(rsp[8:0]);
        for (int i = 6; i >= 0; i--) if (rsp[9 + i]) e = 512 + i;
        axi_read(16'h0806, d);
        check(d[15:0] == tbl[e] && d[16] == (e >= 512), $sformatf("sample %0d equalized pattern", n));
        if (d[16]) n_cf++; else n_ff++;
        if (n < 7 * 5 && lbl < 7) check(e == 512 + lbl, $sformatf("class filter of class %0d", lbl));
      end
      axi_read(16'h0807, d);
      lfsr_seen |= 1 << d[3:0];
      if (n == NSAMP / 2) begin
        btn_b0 = 1; repeat (5) @(posedge clk); btn_b0 = 0;
        repeat (4) @(posedge clk);
        axi_read(16'h0807, d);
        if (d[3:0] != 0) n_seed++;
      end
      if (n == NSAMP / 3) sw = 3'b010;
      if (n == 2 * NSAMP / 3) sw = 3'b100;
    end
    do axi_read(16'h0800, st); while (st[1] || st[2]);

    // ---------------- results ----------------
    cm_tot = 0;
    for (int j = 0; j < 16; j++) begin
      axi_read(16'(16'h1900 + j), d);
      cm_tot += int'(d[15:0]);
      axi_read(16'(16'h1B00 + j), d);
      if (d[15:0] > 16'd600) th_up++;
    end
    axi_read(16'h0803, d); nf = int'(d[31:16]);
    axi_read(16'h0804, d); ncor = int'(d[31:16]); ncls = int'(d[15:0]);
    axi_read(16'h0807, st);
    axi_read(16'h0808, d);
    $display("class-filter path %0d, feature-filter path %0d, buffer waits %0d", n_cf, n_ff, n_wait);
    $display("fires %0d (pattern window %0d), synapse updates %0d, adapted thresholds %0d",
             nf, cm_tot, st[31:16], th_up);
    $display("linked neurons %0d, classified %0d, correct %0d", st[15:8], ncls, ncor);
    $display("LFSR states seen %b, seeds %0d, frames %0d (per source %0d %0d %0d)",
             lfsr_seen, n_seed, d[15:0], frames_sw[0], frames_sw[1], frames_sw[2]);
    check(n_cf > 0, "class-filter path used");
    check(n_ff > 0, "feature-filter path used");
    check(n_wait > 0, "hand-over buffer waited for the STDP layer");
    check(cm_tot > 0, "fires in pattern windows");
    check(nf > cm_tot, "fires in noise windows");
    check(int'(st[31:16]) == nf, "one synapse update per fire");
    check(th_up > 0, "threshold adaptation");
    check($countones(lfsr_seen) > 4, "LFSR stepped");
    check(n_seed == 1, "button seeding");
    check(st[15:8] > 0, "neurons linked");
    check(ncls > 0 && ncor * 100 >= ncls * 20, $sformatf("accuracy %0d/%0d at least twice chance", ncor, ncls));
    check(int'(d[15:0]) > 0, "VGA frames");
    for (int k = 0; k < 3; k++) check(frames_sw[k] > 0 && lit_sw[k] > 0, $sformatf("display source %0d shown", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
