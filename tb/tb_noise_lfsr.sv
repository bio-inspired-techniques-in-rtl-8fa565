// Self-checking testbench of noise_lfsr (prescaler shortened to 8 cycles).
// Checks the one-hot noise bus, the register sequence against an
// independent model of x^4 + x^3 + 1 (period 15, never zero), that the
// state holds without 'advance', and that button presses PRESC cycles
// apart give seeds one count apart.
module tb_noise_lfsr;
  localparam int PRESC = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic btn_b0 = 0, advance = 0;
  logic [3:0]  state;
  logic [15:0] noise;

  noise_lfsr #(.PRESC(PRESC), .PW(16)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] nxt(logic [3:0] s);
    logic fb;
    fb = s[3] ^ s[2];
    return {s[2:0], fb};
  endfunction

  initial begin
    logic [3:0] m, prev;
    int seen;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(state == 4'h1, "reset state 1");
    m = state;
    seen = 0;
    for (int i = 0; i < 30; i++) begin
      advance <= 1; @(posedge clk); #1;
      m = nxt(m);
      check(state == m, $sformatf("step %0d state %h exp %h", i, state, m));
      check(noise == 16'(1 << state), "one-hot noise bus");
      check(state != 0, "never zero");
      if (i < 15) seen |= 1 << state;
      if (i == 14) check(state == 4'h1, "period 15");
    end
    check(seen == 32'hFFFE, "all 15 non-zero states visited");
    advance <= 0;
    repeat (5) @(posedge clk); #1;
    check(state == m, "holds without advance");
    // button seeding
    prev = 0;
    for (int k = 0; k < 20; k++) begin
      btn_b0 <= 1; @(posedge clk); btn_b0 <= 0;
      repeat (PRESC - 1) @(posedge clk);
      #1;
      if (k > 0 && prev != 4'h1 && prev != 4'hF)
        check(state == prev + 4'd1, $sformatf("seed %h after %h", state, prev));
      check(state != 0, "seed never zero");
      prev = state;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
