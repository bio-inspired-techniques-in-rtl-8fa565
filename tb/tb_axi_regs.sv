// Self-checking testbench of axi_regs. A small AXI4-Lite master issues
// writes with the address and data channels arriving in random order and
// random response back-pressure, and reads with random RREADY delays. The
// word bus must show exactly one strobe per write with address = byte
// address / 4 and the written data; read data must equal what the read
// source returns for that word address and stay stable until accepted.
module tb_axi_regs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [17:0] s_awaddr = '0, s_araddr = '0;
  logic s_awvalid = 0, s_wvalid = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic [31:0] s_wdata = '0, s_rdata;
  logic [3:0]  s_wstrb = 4'hF;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0] s_bresp, s_rresp;
  logic wr;
  logic [15:0] wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;

  axi_regs #(.ADDR_W(18), .DATA_W(32)) dut (.*);

  assign rd_data = {rd_addr ^ 16'hA5A5, rd_addr};

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nwr = 0;
  logic [15:0] last_wa;
  logic [31:0] last_wd;
  always @(posedge clk) if (rst_n && wr) begin nwr++; last_wa <= wr_addr; last_wd <= wr_data; end

  task automatic axi_write(input logic [17:0] a, input logic [31:0] d);
    int n0;
    n0 = nwr;
    if ($urandom_range(0, 1)) begin
      s_awaddr <= a; s_awvalid <= 1;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      s_wdata <= d; s_wvalid <= 1;
    end else begin
      s_wdata <= d; s_wvalid <= 1;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      s_awaddr <= a; s_awvalid <= 1;
    end
    @(posedge clk iff (s_awready && s_wready));
    s_awvalid <= 0; s_wvalid <= 0;
    repeat ($urandom_range(0, 4)) begin
      @(posedge clk); #1;
      check(s_bvalid, "bvalid held until bready");
    end
    s_bready <= 1;
    @(posedge clk iff s_bvalid);
    s_bready <= 0;
    @(posedge clk); #1;
    check(nwr == n0 + 1, "one write strobe");
    check(last_wa == a[17:2] && last_wd == d, $sformatf("write %h", a));
    check(s_bresp == 2'b00, "OKAY");
  endtask

  task automatic axi_read(input logic [17:0] a);
    logic [31:0] first;
    s_araddr <= a; s_arvalid <= 1;
    @(posedge clk iff s_arready);
    s_arvalid <= 0;
    @(posedge clk iff s_rvalid); #1;
    first = s_rdata;
    repeat ($urandom_range(0, 4)) begin
      @(posedge clk); #1;
      check(s_rvalid && s_rdata == first, "rdata held until rready");
    end
    s_rready <= 1;
    @(posedge clk);
    s_rready <= 0;
    check(first == {a[17:2] ^ 16'hA5A5, a[17:2]}, $sformatf("read %h got %h", a, first));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < 100; i++) begin
      axi_write({$urandom_range(0, 65535), 2'b00}, $urandom);
      axi_read({$urandom_range(0, 65535), 2'b00});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
