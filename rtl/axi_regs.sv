// AXI4-Lite slave: the programmable-logic end of the processor link.
//
// The processor writes the filters, thresholds, equalized patterns, test
// images and labels through this port, and reads back feature maps, fire
// events, synapses and accuracies. The slave turns AXI4-Lite transfers into
// a simple word bus: a write appears as a one-cycle 'wr' strobe with a word
// address (byte address / 4) and 32-bit data; a read presents 'rd_addr' and
// samples 'rd_data' in the same cycle, so the read source must answer
// combinationally. The address map itself is decoded by the top level.
//
// Handshake: a write is taken when AWVALID and WVALID are both high and no
// response is pending (AWREADY and WREADY rise together for one cycle);
// BVALID then holds until BREADY. A read is taken when ARVALID is high and
// no read data is pending; RVALID holds until RREADY. Responses are always
// OKAY and WSTRB is ignored (all registers are written whole). The design
// says only that the processor and the logic talk over AXI; this
// lightweight slave is a choice of this implementation.
module axi_regs #(
  parameter int unsigned ADDR_W = 18,   // byte address
  parameter int unsigned DATA_W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  // AXI4-Lite
  input  logic [ADDR_W-1:0]   s_awaddr,
  input  logic                s_awvalid,
  output logic                s_awready,
  input  logic [DATA_W-1:0]   s_wdata,
  input  logic [DATA_W/8-1:0] s_wstrb,
  input  logic                s_wvalid,
  output logic                s_wready,
  output logic [1:0]          s_bresp,
  output logic                s_bvalid,
  input  logic                s_bready,
  input  logic [ADDR_W-1:0]   s_araddr,
  input  logic                s_arvalid,
  output logic                s_arready,
  output logic [DATA_W-1:0]   s_rdata,
  output logic [1:0]          s_rresp,
  output logic                s_rvalid,
  input  logic                s_rready,
  // word bus
  output logic                wr,
  output logic [ADDR_W-3:0]   wr_addr,
  output logic [DATA_W-1:0]   wr_data,
  output logic [ADDR_W-3:0]   rd_addr,
  input  logic [DATA_W-1:0]   rd_data
);
  wire w_take = s_awvalid && s_wvalid && !s_bvalid;
  wire r_take = s_arvalid && !s_rvalid;

  assign s_awready = w_take;
  assign s_wready  = w_take;
  assign s_arready = r_take;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;
  assign rd_addr   = s_araddr[ADDR_W-1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_bvalid <= 1'b0;
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
      wr       <= 1'b0;
      wr_addr  <= '0;
      wr_data  <= '0;
    end else begin
      wr <= 1'b0;
      if (w_take) begin
        wr       <= 1'b1;
        wr_addr  <= s_awaddr[ADDR_W-1:2];
        wr_data  <= s_wdata;
        s_bvalid <= 1'b1;
      end else if (s_bvalid && s_bready) begin
        s_bvalid <= 1'b0;
      end
      if (r_take) begin
        s_rdata  <= rd_data;
        s_rvalid <= 1'b1;
      end else if (s_rvalid && s_rready) begin
        s_rvalid <= 1'b0;
      end
    end
  end

  // Responses stay valid until accepted.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_bvalid && !s_bready |=> s_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));

endmodule
