// Self-checking testbench of confusion_matrix (16 neurons, 10 classes,
// linking after 100 fire events). Random fire events, biased so that each
// neuron prefers one class, are counted by a model here. Checked: every
// count and total, the linking of each neuron to its most frequent class
// once it has 100 events, the classified / correct counters after linking,
// the accuracy levels (floor(256*count/total), 255 at 100 %) after the
// background divider has swept, the display colour of a cell, and clear.
module tb_confusion_matrix;
  import lln_pkg::*;
  localparam int NN = 16, NC = 10, LINK = 100;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear = 0, evt = 0;
  logic [3:0] evt_neuron = '0, evt_label = '0, rd_neuron = '0, rd_class = '0;
  logic [15:0] rd_count, rd_total, n_class, n_correct;
  logic [7:0]  rd_level;
  logic        rd_linked, link_evt;
  logic [3:0]  rd_link_cls;
  pix_pos_t    pos = '0;
  rgb_t        rgb;

  confusion_matrix #(.N_N(NN), .N_C(NC), .LINK_FIRES(LINK)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cnt [NN][NC];
  int tot [NN];
  int lnk [NN];     // -1 = not linked
  int mcls, mcor, nlinks;

  function automatic int argmax(int n);
    int b, bc;
    b = cnt[n][0]; bc = 0;
    for (int c = 1; c < NC; c++) if (cnt[n][c] > b) begin b = cnt[n][c]; bc = c; end
    return bc;
  endfunction

  always @(posedge clk) if (rst_n && link_evt) nlinks++;

  initial begin
    mcls = 0; mcor = 0; nlinks = 0;
    for (int n = 0; n < NN; n++) begin
      tot[n] = 0; lnk[n] = -1;
      for (int c = 0; c < NC; c++) cnt[n][c] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int e = 0; e < 2400; e++) begin
      int n, c;
      n = $urandom_range(0, NN - 1);
      c = ($urandom_range(0, 99) < 70) ? (n * 3) % NC : $urandom_range(0, NC - 1);
      evt <= 1; evt_neuron <= 4'(n); evt_label <= 4'(c);
      @(posedge clk);
      evt <= 0;
      if (lnk[n] >= 0) begin mcls++; if (lnk[n] == c) mcor++; end
      cnt[n][c]++; tot[n]++;
      @(posedge clk);
      if (lnk[n] < 0 && tot[n] >= LINK) lnk[n] = argmax(n);
    end
    @(posedge clk);
    for (int n = 0; n < NN; n++) begin
      rd_neuron = 4'(n);
      for (int c = 0; c < NC; c++) begin
        rd_class = 4'(c); #1;
        check(int'(rd_count) == cnt[n][c], $sformatf("count %0d/%0d", n, c));
      end
      check(int'(rd_total) == tot[n], $sformatf("total %0d", n));
      check(rd_linked == (lnk[n] >= 0), $sformatf("linked %0d", n));
      if (lnk[n] >= 0) check(int'(rd_link_cls) == lnk[n], $sformatf("link class %0d: %0d exp %0d", n, rd_link_cls, lnk[n]));
    end
    check(int'(n_class) == mcls && int'(n_correct) == mcor,
          $sformatf("classified %0d/%0d exp %0d/%0d", n_correct, n_class, mcor, mcls));
    check(mcls > 0, "some classifications after linking");
    // accuracy levels after two sweeps of 160 cells x 10 cycles
    repeat (3300) @(posedge clk);
    for (int n = 0; n < NN; n++)
      for (int c = 0; c < NC; c++) begin
        int ex;
        ex = (tot[n] == 0) ? 0 : (cnt[n][c] * 256) / tot[n];
        if (ex > 255) ex = 255;
        rd_neuron = 4'(n); rd_class = 4'(c); #1;
        check(int'(rd_level) == ex, $sformatf("level %0d/%0d = %0d exp %0d", n, c, rd_level, ex));
      end
    // display: neuron 3 = column 3, class 9 = row 9
    pos.x = 10'(3 * 16 + 4); pos.y = 10'(9 * 16 + 4);
    rd_neuron = 4'd3; rd_class = 4'd9; #1;
    check(rgb == level_to_rgb(rd_level), "display cell 3/9");
    // clear
    clear <= 1; @(posedge clk); clear <= 0; @(posedge clk); #1;
    check(rd_total == 0 && rd_count == 0 && !rd_linked && n_class == 0, "clear");
    $display("links: %0d", nlinks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
