// Block 5: real-time confusion matrix and neuron-to-class linking.
//
// Every classification fire event (neuron n fired while an image of label c
// was shown) increments count[n][c] and the neuron's total. The share
// count[n][c]/total[n] is the accuracy of neuron n for class c; it is kept up
// to date for all cells by a background divider (ratio_sweep) as an 8-bit
// level, 255 = 100 %. When a neuron reaches LINK_FIRES fire events (the test
// phase), it is linked to the class with the largest count (lowest class on a
// tie). From then on each of its fire events is a classification: 'n_class'
// counts them and 'n_correct' counts those whose label equals the linked
// class, giving the running accuracy.
//
// Read-out (O51): rd_neuron/rd_class select a cell; rd_count, rd_level,
// rd_total, rd_linked and rd_link_cls return it combinationally.
// Display (O52): the matrix is drawn with classes as rows and neurons as
// columns, 16x16 screen pixels per cell, from the top left corner.
//
// The counting, the per-neuron accuracies and the linking after 100 fire
// events follow the design; counter widths, the tie rule and the layout on
// screen are choices of this implementation.
module confusion_matrix
  import lln_pkg::*;
#(
  parameter int unsigned N_N        = N_NEUR,
  parameter int unsigned N_C        = N_CLASS,
  parameter int unsigned CNT_W      = 16,
  parameter int unsigned LINK_FIRES = 100
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   evt,
  input  logic [$clog2(N_N)-1:0] evt_neuron,
  input  logic [LABEL_W-1:0]     evt_label,
  // read-out (O51)
  input  logic [$clog2(N_N)-1:0] rd_neuron,
  input  logic [LABEL_W-1:0]     rd_class,
  output logic [CNT_W-1:0]       rd_count,
  output logic [CNT_W-1:0]       rd_total,
  output logic [7:0]             rd_level,
  output logic                   rd_linked,
  output logic [LABEL_W-1:0]     rd_link_cls,
  output logic [CNT_W-1:0]       n_class,
  output logic [CNT_W-1:0]       n_correct,
  output logic                   link_evt,
  // display (O52)
  input  pix_pos_t               pos,
  output rgb_t                   rgb
);
  localparam int unsigned NW = $clog2(N_N);
  localparam int unsigned NCELL = N_N * N_C;

  logic [CNT_W-1:0]   cnt   [N_N][N_C];
  logic [CNT_W-1:0]   tot   [N_N];
  logic               linked [N_N];
  logic [LABEL_W-1:0] link_cls [N_N];
  logic               chk;
  logic [NW-1:0]      chk_n;

  // argmax of the row being linked
  logic [LABEL_W-1:0] best_c;
  always_comb begin
    logic [CNT_W-1:0] best;
    best   = cnt[chk_n][0];
    best_c = '0;
    for (int c = 1; c < N_C; c++)
      if (cnt[chk_n][c] > best) begin
        best   = cnt[chk_n][c];
        best_c = LABEL_W'(c);
      end
  end

  wire lbl_ok = (32'(evt_label) < N_C);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < N_N; n++) begin
        tot[n]      <= '0;
        linked[n]   <= 1'b0;
        link_cls[n] <= '0;
        for (int c = 0; c < N_C; c++) cnt[n][c] <= '0;
      end
      chk       <= 1'b0;
      chk_n     <= '0;
      n_class   <= '0;
      n_correct <= '0;
      link_evt  <= 1'b0;
    end else if (clear) begin
      for (int n = 0; n < N_N; n++) begin
        tot[n]    <= '0;
        linked[n] <= 1'b0;
        for (int c = 0; c < N_C; c++) cnt[n][c] <= '0;
      end
      chk       <= 1'b0;
      n_class   <= '0;
      n_correct <= '0;
      link_evt  <= 1'b0;
    end else begin
      link_evt <= 1'b0;
      chk      <= 1'b0;
      if (evt && lbl_ok) begin
        if (tot[evt_neuron] != '1) begin
          tot[evt_neuron] <= tot[evt_neuron] + 1'b1;
          cnt[evt_neuron][evt_label] <= cnt[evt_neuron][evt_label] + 1'b1;
        end
        if (linked[evt_neuron]) begin
          n_class <= n_class + 1'b1;
          if (link_cls[evt_neuron] == evt_label) n_correct <= n_correct + 1'b1;
        end
        chk   <= 1'b1;
        chk_n <= evt_neuron;
      end
      // one cycle later the counts include the event: link after the test phase
      if (chk && !linked[chk_n] && 32'(tot[chk_n]) >= LINK_FIRES) begin
        linked[chk_n]   <= 1'b1;
        link_cls[chk_n] <= best_c;
        link_evt        <= 1'b1;
      end
    end
  end

  // ---------------- accuracies ----------------
  logic [CNT_W-1:0] num_f [NCELL];
  logic [CNT_W-1:0] den_f [NCELL];
  logic [7:0]       lvl   [NCELL];
  always_comb
    for (int n = 0; n < N_N; n++)
      for (int c = 0; c < N_C; c++) begin
        num_f[n*N_C + c] = cnt[n][c];
        den_f[n*N_C + c] = tot[n];
      end

  ratio_sweep #(.N(NCELL), .W(CNT_W)) u_ratio (
    .clk(clk), .rst_n(rst_n), .num(num_f), .den(den_f), .lvl(lvl)
  );

  wire rd_ok = (32'(rd_class) < N_C);
  assign rd_count    = rd_ok ? cnt[rd_neuron][rd_class] : '0;
  assign rd_total    = tot[rd_neuron];
  assign rd_level    = rd_ok ? lvl[32'(rd_neuron) * N_C + 32'(rd_class)] : '0;
  assign rd_linked   = linked[rd_neuron];
  assign rd_link_cls = link_cls[rd_neuron];

  // ---------------- display ----------------
  always_comb begin
    int unsigned col, row;
    col = 32'(pos.x) / 16;
    row = 32'(pos.y) / 16;
    rgb = '0;
    if (col < N_N && row < N_C) rgb = level_to_rgb(lvl[col * N_C + row]);
  end

endmodule
