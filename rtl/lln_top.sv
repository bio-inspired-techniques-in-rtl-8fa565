// Hybrid supervised / unsupervised network for continual learning: the
// programmable-logic part of the system.
//
// Data flow (one image per inference cycle):
//   processor --AXI--> image, label  -> feature_maps (block 1): 16 binary
//   filter responses O11 -> pattern_equalizer (block 2): 4x4 pattern O21 ->
//   stdp_wta (block 4), which alternates that pattern with the noise pattern
//   O31 of noise_lfsr (block 3) and learns by STDP; its fire events O42 feed
//   confusion_matrix (block 5). lcd_monitor (block 6) drives the VGA port
//   with the colour output of block 1, 4 or 5 chosen by the switches.
// Convolution and equalization of one image take well under a millisecond;
// the STDP run takes 20 ms (10 ms pattern, 10 ms noise). A finished feature
// map waits in a one-entry buffer while the STDP layer is busy with the
// previous image, and the image memory is double buffered, so loading,
// convolution and learning overlap as in the design.
//
// Word address map of the AXI port (byte address = 4 x word address):
//   write 0x0000+p        image pixel p (0..783), data[7:0]
//   write 0x0800          start: convolve the loaded image, label = data[3:0]
//   write 0x0801          clear the confusion matrix
//   write 0x1000+f        threshold of filter f, data[15:0] signed
//   write 0x1400+e        equalized pattern table entry e (0..511 generic,
//                         512..518 trained), data[15:0]
//   write 0x2000+512f+k   weight k (0..399, row-major) of filter f, data[7:0]
//   read  0x0800          status {pending, stdp busy, conv busy}
//   read  0x0802          filter responses O11
//   read  0x0803          {fire events[15:0], fire bus O42}
//   read  0x0804          {correct[15:0], classified[15:0]}
//   read  0x0805          {STDP runs[15:0], convolutions[15:0]}
//   read  0x0806          {class-filter hit, equalized pattern O21}
//   read  0x0807          {STDP updates[15:0], linked neurons[7:0], 0, pattern
//                         window, LFSR state[3:0]}
//   read  0x0808          VGA frames
//   read  0x0809          equalization table entry in use
//   read  0x1000+f        max-pooled convolution result of filter f
//   read  0x1800+16n+c    {accuracy level[7:0], count[15:0]} of neuron n, class c (O51)
//   read  0x1900+n        {linked, linked class[3:0], total fires[15:0]}
//   read  0x1A00+16n+i    synapse i of neuron n
//   read  0x1B00+n        threshold of neuron n
// The address map and the buffering are choices of this implementation.
module lln_top
  import lln_pkg::*;
#(
  parameter int unsigned WIN   = WIN_CYCLES,
  parameter int unsigned PRESC = 50_000,
  parameter int unsigned LINK_FIRES = 100
) (
  input  logic        clk,          // 50 MHz master clock
  input  logic        rst_n,
  // AXI4-Lite from the processor system
  input  logic [17:0] s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [17:0] s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  // board
  input  logic        btn_b0,
  input  logic [2:0]  sw,
  output logic        hsync_n,
  output logic        vsync_n,
  output rgb_t        vga_rgb,
  output logic [N_NEUR-1:0] fire     // O42
);
  localparam int unsigned N_CF = 7;
  localparam int unsigned N_FF = 9;

  // ---------------- AXI ----------------
  logic        wr;
  logic [15:0] wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;

  axi_regs #(.ADDR_W(18), .DATA_W(32)) u_axi (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .wr, .wr_addr, .wr_data, .rd_addr, .rd_data
  );

  wire img_we  = wr && (wr_addr[15:10] == 6'h00) && (wr_addr[9:0] < 10'(IMG_SIDE*IMG_SIDE));
  wire go_we   = wr && (wr_addr == 16'h0800);
  wire clr_we  = wr && (wr_addr == 16'h0801);
  wire thr_we  = wr && (wr_addr[15:4] == 12'h100);
  wire pat_we  = wr && (wr_addr[15:10] == 6'b000101);
  wire flt_we  = wr && (wr_addr[15:13] == 3'b001) && (wr_addr[8:0] < 9'(FLT_SIDE*FLT_SIDE));

  // ---------------- block 1: feature maps ----------------
  pix_pos_t pos;
  rgb_t     rgb_fm, rgb_syn, rgb_cm;
  logic     conv_busy, conv_done;
  logic [N_FILT-1:0] resp;
  logic signed [CONV_W-1:0] max_val [N_FILT];
  logic [LABEL_W-1:0] conv_label;

  feature_maps u_fm (
    .clk, .rst_n,
    .img_we(img_we), .img_addr(wr_addr[9:0]), .img_data(wr_data[7:0]),
    .flt_we(flt_we), .flt_sel(wr_addr[12:9]), .flt_addr(wr_addr[8:0]),
    .flt_data(wr_data[7:0]),
    .thr_we(thr_we), .thr_sel(wr_addr[3:0]), .thr_data(wr_data[15:0]),
    .start(go_we), .busy(conv_busy), .done(conv_done), .resp(resp),
    .max_val(max_val), .pos(pos), .rgb(rgb_fm)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                   conv_label <= '0;
    else if (go_we && !conv_busy) conv_label <= wr_data[LABEL_W-1:0];

  // ---------------- block 2: equalization ----------------
  logic [PAT_BITS-1:0] eq_pat;
  logic                cf_hit;
  logic [9:0]          eq_sel;

  pattern_equalizer #(.N_CF(N_CF), .N_FF(N_FF)) u_eq (
    .clk, .rst_n,
    .pat_we(pat_we), .pat_addr(wr_addr[9:0]), .pat_data(wr_data[PAT_BITS-1:0]),
    .resp(resp), .pattern(eq_pat), .cf_hit(cf_hit), .sel(eq_sel)
  );

  // one-entry buffer between the feature-map pipeline and the STDP layer
  logic                pend;
  logic [PAT_BITS-1:0] pend_pat;
  logic [LABEL_W-1:0]  pend_label;
  logic                stdp_busy, stdp_start;
  logic                conv_done_d;
  assign stdp_start = pend && !stdp_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend       <= 1'b0;
      pend_pat   <= '0;
      pend_label <= '0;
    end else begin
      if (stdp_start) pend <= 1'b0;
      // conv_done comes one cycle after resp settles; eq_pat is combinational
      if (conv_done_d) begin
        pend       <= 1'b1;
        pend_pat   <= eq_pat;
        pend_label <= conv_label;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) conv_done_d <= 1'b0;
    else        conv_done_d <= conv_done;

  // ---------------- block 3: LFSR ----------------
  logic                noise_adv;
  logic [PAT_BITS-1:0] noise;
  logic [3:0]          lfsr_state;

  noise_lfsr #(.PRESC(PRESC), .PW(PAT_BITS)) u_lfsr (
    .clk, .rst_n, .btn_b0, .advance(noise_adv), .state(lfsr_state), .noise(noise)
  );

  // ---------------- block 4: STDP / WTA ----------------
  logic                      fire_evt, fire_pat, stdp_evt, in_pattern;
  logic [$clog2(N_NEUR)-1:0] fire_idx;
  logic [LABEL_W-1:0]        fire_label;
  logic [SYN_W-1:0]          syn_rd;
  logic [15:0]               th_rd;

  stdp_wta #(.WIN(WIN)) u_stdp (
    .clk, .rst_n,
    .start(stdp_start), .pattern(pend_pat), .label_in(pend_label),
    .noise(noise), .noise_adv(noise_adv), .busy(stdp_busy), .in_pattern(in_pattern),
    .fire(fire), .fire_evt(fire_evt), .fire_idx(fire_idx), .fire_label(fire_label),
    .fire_pat(fire_pat), .stdp_evt(stdp_evt),
    .syn_rd_addr(rd_addr[7:0]), .syn_rd_data(syn_rd),
    .th_rd_addr(rd_addr[3:0]), .th_rd_data(th_rd),
    .pos(pos), .rgb(rgb_syn)
  );

  // ---------------- block 5: confusion matrix ----------------
  logic [15:0] cm_count, cm_total, n_class, n_correct;
  logic [7:0]  cm_level;
  logic        cm_linked, link_evt;
  logic [LABEL_W-1:0] cm_link_cls;

  confusion_matrix #(.LINK_FIRES(LINK_FIRES)) u_cm (
    .clk, .rst_n, .clear(clr_we),
    .evt(fire_evt && fire_pat), .evt_neuron(fire_idx), .evt_label(fire_label),
    .rd_neuron(rd_addr[11:8] == 4'h9 ? rd_addr[3:0] : rd_addr[7:4]),
    .rd_class(rd_addr[3:0]),
    .rd_count(cm_count), .rd_total(cm_total), .rd_level(cm_level),
    .rd_linked(cm_linked), .rd_link_cls(cm_link_cls),
    .n_class(n_class), .n_correct(n_correct), .link_evt(link_evt),
    .pos(pos), .rgb(rgb_cm)
  );

  // ---------------- block 6: monitor ----------------
  logic frame_start;
  lcd_monitor u_lcd (
    .clk, .rst_n, .sw(sw), .rgb_fm(rgb_fm), .rgb_syn(rgb_syn), .rgb_cm(rgb_cm),
    .pos(pos), .frame_start(frame_start), .hsync_n, .vsync_n, .vga_rgb
  );

  // ---------------- statistics ----------------
  logic [15:0] n_conv, n_stdp, n_fire, n_upd, n_frame;
  logic [7:0]  n_link;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_conv <= '0; n_stdp <= '0; n_fire <= '0; n_upd <= '0; n_frame <= '0;
      n_link <= '0;
    end else begin
      if (conv_done)   n_conv  <= n_conv + 1'b1;
      if (stdp_start)  n_stdp  <= n_stdp + 1'b1;
      if (fire_evt)    n_fire  <= n_fire + 1'b1;
      if (stdp_evt)    n_upd   <= n_upd + 1'b1;
      if (frame_start) n_frame <= n_frame + 1'b1;
      if (link_evt)    n_link  <= n_link + 1'b1;
    end
  end

  // ---------------- read mux ----------------
  always_comb begin
    rd_data = '0;
    unique casez (rd_addr)
      16'h0800: rd_data = {29'd0, pend, stdp_busy, conv_busy};
      16'h0802: rd_data = {16'd0, resp};
      16'h0803: rd_data = {n_fire, fire};
      16'h0804: rd_data = {n_correct, n_class};
      16'h0805: rd_data = {n_stdp, n_conv};
      16'h0806: rd_data = {15'd0, cf_hit, eq_pat};
      16'h0807: rd_data = {n_upd, n_link, 3'd0, in_pattern, lfsr_state};
      16'h0808: rd_data = {16'd0, n_frame};
      16'h0809: rd_data = {22'd0, eq_sel};
      16'h100?: rd_data = 32'($signed(max_val[rd_addr[3:0]]));
      16'h18??: rd_data = {8'd0, cm_level, cm_count};
      16'h190?: rd_data = {11'd0, cm_linked, cm_link_cls, cm_total};
      16'h1A??: rd_data = {24'd0, syn_rd};
      16'h1B0?: rd_data = {16'd0, th_rd};
      default:  rd_data = '0;
    endcase
  end

endmodule
