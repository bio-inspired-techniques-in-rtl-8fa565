// Block 1: feature-map calculation (convolution, max pooling, threshold).
//
// A 28x28 image of unsigned 8-bit pixels is convolved with N_FILT signed
// 8-bit 20x20 filters. The 20x20 window slides over the (28-20+1)^2 = 81
// positions; at each position every filter multiplies the window pixel by
// pixel with its weights and sums the products. The largest of the 81 sums
// (max pooling) is compared with the filter's threshold, and the filter's
// response bit is '1' if the maximum is above it. The 16 response bits form
// the bus O11 that feeds the equalization table.
//
// Data path: one multiply-accumulate unit per filter, all fed by the same
// pixel each cycle, so the filters run in parallel and one image takes
// 81*400 = 32400 cycles plus a 3-cycle pipeline (about 0.65 ms at 50 MHz,
// well inside the 20 ms budget). Each sum is saturated to CONV_W bits, the
// width of one convolution output in the design's bus description
// (81 x 16 bits per filter).
//
// The image memory is double buffered: the processor writes the next image
// into one bank while the other is convolved; 'start' swaps the banks, which
// is how data transfer and computation overlap. Filters and thresholds are
// written through their own ports. The design gives the algorithm, the sizes
// and the parallel MAC organisation; the memory organisation, the pipeline
// and the saturation are choices of this implementation.
//
// Display (O12): the block counts, per filter, the images that gave '1' and
// shows the share as a colour in a 4x4 grid of 32x32-pixel cells in the top
// left corner of the screen (filter index = 4*row + column).
//
// Timing: 'start' is accepted when 'busy' is low; 'done' pulses for one cycle
// with 'resp' valid, and 'resp' holds until the next 'done'.
module feature_maps
  import lln_pkg::*;
#(
  parameter int unsigned IMG  = IMG_SIDE,
  parameter int unsigned FLT  = FLT_SIDE,
  parameter int unsigned NF   = N_FILT,
  parameter int unsigned CW   = CONV_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // image write (into the bank not being convolved)
  input  logic                     img_we,
  input  logic [$clog2(IMG*IMG)-1:0] img_addr,
  input  logic [PIX_W-1:0]         img_data,
  // filter weight write
  input  logic                     flt_we,
  input  logic [$clog2(NF)-1:0]    flt_sel,
  input  logic [$clog2(FLT*FLT)-1:0] flt_addr,
  input  logic signed [WGT_W-1:0]  flt_data,
  // threshold write
  input  logic                     thr_we,
  input  logic [$clog2(NF)-1:0]    thr_sel,
  input  logic signed [CW-1:0]     thr_data,
  // control
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output logic [NF-1:0]            resp,       // O11
  output logic signed [CW-1:0]     max_val [NF],
  // display
  input  pix_pos_t                 pos,
  output rgb_t                     rgb         // O12
);
  localparam int unsigned CS    = IMG - FLT + 1;
  localparam int unsigned NPIX  = IMG * IMG;
  localparam int unsigned NW    = FLT * FLT;
  localparam int unsigned AW    = $clog2(NPIX);
  localparam int unsigned KW    = $clog2(NW);
  localparam int unsigned ACC_W = PIX_W + 1 + WGT_W + KW;
  localparam int unsigned FW    = $clog2(NF);

  // ---------------- memories ----------------
  logic [PIX_W-1:0]        img_mem [2][NPIX];
  logic signed [WGT_W-1:0] flt_mem [NF][NW];
  logic signed [CW-1:0]    thr     [NF];
  logic                    wr_bank;

  // ---------------- sequencer ----------------
  logic [$clog2(CS)-1:0]  px, py;
  logic [$clog2(FLT)-1:0] kx, ky;
  logic                   run;

  logic [AW-1:0] rd_addr;
  logic [KW-1:0] w_addr;
  assign rd_addr = AW'((32'(py) + 32'(ky)) * IMG + 32'(px) + 32'(kx));
  assign w_addr  = KW'(32'(ky) * FLT + 32'(kx));

  wire first_k  = (kx == '0) && (ky == '0);
  wire last_k   = (32'(kx) == FLT-1) && (32'(ky) == FLT-1);
  wire first_p  = (px == '0) && (py == '0);
  wire last_p   = (32'(px) == CS-1) && (32'(py) == CS-1);

  // pipeline stage 1: memory outputs
  logic [PIX_W-1:0]        pix_q;
  logic signed [WGT_W-1:0] w_q [NF];
  logic                    v1, first_k1, last_k1, first_p1, last_p1;
  // pipeline stage 2: accumulators
  logic signed [ACC_W-1:0] acc [NF];
  logic                    fin;   // last position finished, go compare

  always_ff @(posedge clk) begin
    if (img_we) img_mem[wr_bank][img_addr] <= img_data;
    if (flt_we) flt_mem[flt_sel][flt_addr] <= flt_data;
    pix_q <= img_mem[~wr_bank][rd_addr];
    for (int f = 0; f < NF; f++) w_q[f] <= flt_mem[f][w_addr];
  end

  function automatic logic signed [CW-1:0] sat(input logic signed [ACC_W-1:0] a);
    localparam logic signed [ACC_W-1:0] MAXV = ACC_W'({1'b0, {(CW-1){1'b1}}});
    localparam logic signed [ACC_W-1:0] MINV = -MAXV - 1;
    if (a > MAXV)      return CW'(MAXV);
    else if (a < MINV) return CW'(MINV);
    else               return CW'(a);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank  <= 1'b0;
      run      <= 1'b0;
      px <= '0; py <= '0; kx <= '0; ky <= '0;
      v1 <= 1'b0; first_k1 <= 1'b0; last_k1 <= 1'b0; first_p1 <= 1'b0; last_p1 <= 1'b0;
      fin  <= 1'b0;
      done <= 1'b0;
      resp <= '0;
      for (int f = 0; f < NF; f++) begin
        acc[f]     <= '0;
        max_val[f] <= '0;
        thr[f]     <= '0;
      end
    end else begin
      done <= 1'b0;
      if (thr_we) thr[thr_sel] <= thr_data;

      // stage 0: address generation
      if (start && !busy) begin
        wr_bank <= ~wr_bank;
        run     <= 1'b1;
        px <= '0; py <= '0; kx <= '0; ky <= '0;
      end else if (run) begin
        if (32'(kx) != FLT-1) kx <= kx + 1'b1;
        else begin
          kx <= '0;
          if (32'(ky) != FLT-1) ky <= ky + 1'b1;
          else begin
            ky <= '0;
            if (32'(px) != CS-1) px <= px + 1'b1;
            else begin
              px <= '0;
              if (32'(py) != CS-1) py <= py + 1'b1;
              else begin
                py  <= '0;
                run <= 1'b0;
              end
            end
          end
        end
      end
      v1       <= run;
      first_k1 <= first_k;
      last_k1  <= last_k;
      first_p1 <= first_p;
      last_p1  <= last_p;

      // stage 2: multiply-accumulate and max pooling
      fin <= 1'b0;
      if (v1) begin
        for (int f = 0; f < NF; f++) begin
          logic signed [ACC_W-1:0] prod, sum;
          logic signed [CW-1:0]    r;
          prod = ACC_W'($signed({1'b0, pix_q}) * w_q[f]);
          sum  = first_k1 ? prod : acc[f] + prod;
          acc[f] <= sum;
          if (last_k1) begin
            r = sat(sum);
            if (first_p1 || r > max_val[f]) max_val[f] <= r;
          end
        end
        if (last_k1 && last_p1) fin <= 1'b1;
      end

      // stage 3: threshold
      if (fin) begin
        for (int f = 0; f < NF; f++) resp[f] <= (max_val[f] > thr[f]);
        done <= 1'b1;
      end
    end
  end

  assign busy = run | v1 | fin;

  // ---------------- display: share of '1' responses ----------------
  logic [15:0] ones_cnt [NF];
  logic [15:0] img_cnt;
  logic [15:0] den_arr  [NF];
  logic [7:0]  lvl      [NF];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      img_cnt <= '0;
      for (int f = 0; f < NF; f++) ones_cnt[f] <= '0;
    end else if (fin && img_cnt != '1) begin
      img_cnt <= img_cnt + 1'b1;
      for (int f = 0; f < NF; f++)
        if (max_val[f] > thr[f]) ones_cnt[f] <= ones_cnt[f] + 1'b1;
    end
  end

  always_comb for (int f = 0; f < NF; f++) den_arr[f] = img_cnt;

  ratio_sweep #(.N(NF), .W(16)) u_ratio (
    .clk(clk), .rst_n(rst_n), .num(ones_cnt), .den(den_arr), .lvl(lvl)
  );

  always_comb begin
    logic [3:0] cidx;
    rgb  = '0;
    cidx = {pos.y[6:5], pos.x[6:5]};
    if (pos.x < 10'd128 && pos.y < 10'd128) begin
      if (32'(cidx) < NF) rgb = level_to_rgb(lvl[FW'(cidx)]);
    end
  end

endmodule
