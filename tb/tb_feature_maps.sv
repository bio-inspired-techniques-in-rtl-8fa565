// Self-checking testbench of feature_maps at full size (28x28 image,
// sixteen 20x20 filters). Two random images are convolved with filters of
// mixed weight ranges (some saturate the 16-bit result); the max-pooled
// results and the response bits are compared with a reference computed here,
// the thresholds are set one below / equal to the expected maximum to check
// the strict comparison, the second image is written while the first is
// being convolved (double buffering), the cycle count of one image is
// checked against 81*400 cycles, and the display colours are checked after
// both images.
module tb_feature_maps;
  import lln_pkg::*;
  localparam int IMG = 28, FLT = 20, NF = 16, CS = IMG - FLT + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic img_we = 0, flt_we = 0, thr_we = 0, start = 0;
  logic [9:0] img_addr = '0;
  logic [7:0] img_data = '0;
  logic [3:0] flt_sel = '0, thr_sel = '0;
  logic [8:0] flt_addr = '0;
  logic signed [7:0]  flt_data = '0;
  logic signed [15:0] thr_data = '0;
  logic busy, done;
  logic [NF-1:0] resp;
  logic signed [15:0] max_val [NF];
  pix_pos_t pos;
  rgb_t rgb;

  feature_maps dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0]        img  [2][IMG*IMG];
  logic signed [7:0] w    [NF][FLT*FLT];
  int                refm [2][NF];

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1, ones [NF];
    int fs, cs;          // run-time loop bounds keep the reference loops rolled
    fs = FLT; cs = CS;
    pos = '0;
    for (int b = 0; b < 2; b++)
      for (int p = 0; p < IMG*IMG; p++) img[b][p] = 8'($urandom_range(0, 255));
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < FLT*FLT; k++)
        w[f][k] = (f < 12) ? 8'(int'($urandom_range(0, 8)) - 4) : 8'($urandom_range(0, 255));
    // reference
    for (int b = 0; b < 2; b++)
      for (int f = 0; f < NF; f++) begin
        refm[b][f] = -40000;
        for (int py = 0; py < cs; py++)
          for (int px = 0; px < cs; px++) begin
            longint s;
            s = 0;
            for (int ky = 0; ky < fs; ky++)
              for (int kx = 0; kx < fs; kx++)
                s += longint'(img[b][(py+ky)*IMG + px + kx]) * longint'(w[f][ky*FLT+kx]);
            if (sat16(s) > refm[b][f]) refm[b][f] = sat16(s);
          end
      end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // filters
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < FLT*FLT; k++) begin
        flt_we <= 1; flt_sel <= 4'(f); flt_addr <= 9'(k); flt_data <= w[f][k];
        @(posedge clk);
      end
    flt_we <= 0;
    // thresholds for image 0: even filters fire (thr = max-1), odd do not (thr = max)
    for (int f = 0; f < NF; f++) begin
      thr_we <= 1; thr_sel <= 4'(f);
      thr_data <= 16'((f % 2 == 0) ? refm[0][f] - 1 : refm[0][f]);
      @(posedge clk);
    end
    thr_we <= 0;
    for (int p = 0; p < IMG*IMG; p++) begin
      img_we <= 1; img_addr <= 10'(p); img_data <= img[0][p];
      @(posedge clk);
    end
    img_we <= 0;
    start <= 1; @(posedge clk); start <= 0;
    t0 = $time;
    // load image 1 while image 0 is convolved
    for (int p = 0; p < IMG*IMG; p++) begin
      img_we <= 1; img_addr <= 10'(p); img_data <= img[1][p];
      @(posedge clk);
    end
    img_we <= 0;
    check(busy, "busy while convolving");
    @(posedge clk iff done);
    t1 = $time;
    check((t1 - t0) / 10 >= 32400 && (t1 - t0) / 10 <= 32405,
          $sformatf("cycles per image %0d, expected 32400..32405", (t1 - t0) / 10));
    for (int f = 0; f < NF; f++) begin
      check(int'(max_val[f]) == refm[0][f],
            $sformatf("img0 filter %0d max %0d exp %0d", f, max_val[f], refm[0][f]));
      check(resp[f] == (f % 2 == 0), $sformatf("img0 resp bit %0d", f));
    end
    @(posedge clk);
    // image 1 with thresholds unchanged
    start <= 1; @(posedge clk); start <= 0;
    @(posedge clk iff done);
    for (int f = 0; f < NF; f++) begin
      logic expb;
      expb = refm[1][f] > ((f % 2 == 0) ? refm[0][f] - 1 : refm[0][f]);
      check(int'(max_val[f]) == refm[1][f],
            $sformatf("img1 filter %0d max %0d exp %0d", f, max_val[f], refm[1][f]));
      check(resp[f] == expb, $sformatf("img1 resp bit %0d", f));
      ones[f] = int'(f % 2 == 0) + int'(expb);
    end
    // display: wait for two full sweeps of the ratio table
    repeat (400) @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      logic [7:0] lv;
      lv = (ones[f] == 2) ? 8'd255 : (ones[f] == 1 ? 8'd128 : 8'd0);
      pos.x = 10'((f % 4) * 32 + 5);
      pos.y = 10'((f / 4) * 32 + 7);
      #1;
      check(rgb == level_to_rgb(lv), $sformatf("display cell %0d", f));
    end
    pos.x = 10'd300; pos.y = 10'd10; #1;
    check(rgb == '0, "display outside grid is black");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
