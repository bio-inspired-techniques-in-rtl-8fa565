// Self-checking testbench of pattern_equalizer (7 class filters, 9 feature
// filters, 519-entry table). The table is filled with random patterns, then
// random response buses are applied: with no class-filter bit set the output
// must be the generic pattern addressed by the feature-filter bits; with one
// or more class-filter bits set it must be the trained pattern of the
// lowest-numbered responding class filter, whatever the feature bits.
module tb_pattern_equalizer;
  localparam int N_CF = 7, N_FF = 9, N_T = (1 << N_FF) + N_CF;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        pat_we = 0;
  logic [9:0]  pat_addr = '0, sel;
  logic [15:0] pat_data = '0, pattern;
  logic [15:0] resp = '0;
  logic        cf_hit;

  pattern_equalizer #(.N_CF(N_CF), .N_FF(N_FF)) dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] tbl [N_T];

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first;
    logic [15:0] exp_p;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < N_T; e++) begin
      tbl[e] = 16'($urandom);
      pat_we <= 1; pat_addr <= 10'(e); pat_data <= tbl[e];
      @(posedge clk);
    end
    pat_we <= 0;
    @(posedge clk);
    for (int t = 0; t < 2000; t++) begin
      logic [15:0] r;
      r = 16'($urandom);
      if (t % 3 == 0) r[15:9] = '0;                 // feature-filter path
      else if (t % 3 == 1) r[15:9] = 7'(1 << (t % 7));  // one class filter
      resp = r;
      #1;
      first = -1;
      for (int i = N_CF - 1; i >= 0; i--) if (r[N_FF + i]) first = i;
      exp_p = (first < 0) ? tbl[r[8:0]] : tbl[(1 << N_FF) + first];
      checks++;
      if (pattern !== exp_p || cf_hit !== (first >= 0)) begin
        failures++;
        $display("FAIL: resp=%h pattern=%h exp=%h", r, pattern, exp_p);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
