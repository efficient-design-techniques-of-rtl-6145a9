// cnn_accelerator: streamline FPGA accelerator for a shallow CNN that decides
// whether an 80x80 RGB patch of a satellite image contains a vessel.
//
// Network (all layers in hardware at once, each with its own module):
//   80x80x3 image -> conv 5x5, 32 filters, ReLU (76x76x32)
//   -> max-pool 4x4 (19x19x32) -> conv 4x4, 32 filters, ReLU (16x16x32)
//   -> max-pool 4x4 (4x4x32 = 512) -> fully connected 128, ReLU
//   -> output layer, 2 classes.
// The first convolution layer produces one feature map at a time and pipes
// it without a buffer through the first pooling block into the Second Input
// Layer; the second convolution layer computes all 32 filters in parallel on
// each arriving map and accumulates in 32 RAMs of 16x16 words; after the last
// map those RAMs stream through the second pooling block into the 128 vector
// multipliers; their outputs feed the output layer.
//
// Interface: write the image first, one row of one channel per img_we
// (img_data pixel c at bits [8c +: 8]); pulse `start`; `done` pulses when
// score[0..1] (Q11.6) and is_ship (score[1] > score[0]) are valid. `busy`
// is high from start to done; a start while busy is ignored.
//
// Timing: the first convolution layer sets the pace: NF*(IMG-4)^2 = 184,832
// cycles of one window per cycle, followed by the tail of the last map
// through the second layer (OUT^2 windows), the readout of the accumulator
// RAMs (NF*OUT^2 = 8192 cycles) and a few dozen pipeline cycles. Only one
// image is in flight: overlapping the next image's first layer with the
// current image's tail is not built. Weights come from cnn_weight() in
// cnn_pkg, not from a trained model.
//
// The busy/last/filter side outputs of the layers are not needed by this
// chain (the layers are started by the data itself) and stay unconnected.
module cnn_accelerator
  import cnn_pkg::*;
#(
  parameter int IMG     = 80,
  parameter int NF      = 32,
  parameter int FC_N    = 128,
  parameter int N_CLASS = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    img_we,
  input  logic [1:0]              img_ch,
  input  logic [$clog2(IMG)-1:0]  img_row,
  input  logic [IMG*PIX_W-1:0]    img_data,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output act_t                    score [N_CLASS],
  output logic                    is_ship
);
  localparam int K1   = 5;
  localparam int C1   = IMG - K1 + 1;     // 76
  localparam int P1   = C1 / 4;           // 19
  localparam int K2   = 4;
  localparam int C2   = P1 - K2 + 1;      // 16
  localparam int P2   = C2 / 4;           // 4
  localparam int NIN  = NF * P2 * P2;     // 512
  localparam int MW   = $clog2(NF);
  localparam int CIW  = (N_CLASS > 1) ? $clog2(N_CLASS) : 1;

  // First convolution layer (with the input layer).
  logic c1_busy, c1_v, c1_last;
  act_t c1_d;
  logic [MW-1:0] c1_f;
  logic go;
  assign go = start && !busy;
  conv1_layer #(.IMG(IMG), .K(K1), .NF(NF), .CH(3)) u_conv1 (
    .clk, .rst_n, .img_we, .img_ch, .img_row, .img_data, .start(go),
    .busy(c1_busy), .out_valid(c1_v), .out_data(c1_d), .out_filt(c1_f), .out_last(c1_last));

  // First pooling layer.
  logic p1_v;
  act_t p1_d;
  pooling_block #(.KIN(C1), .L(4)) u_pool1 (
    .clk, .rst_n, .in_valid(c1_v), .in_data(c1_d), .out_valid(p1_v), .out_data(p1_d));

  // Second input layer.
  logic fm_busy, fm_v, fm_last;
  logic [K2*K2*ACT_W-1:0] fm_win;
  logic [MW-1:0] fm_map;
  feature_map_input #(.IMG(P1), .K(K2), .NM(NF)) u_in2 (
    .clk, .rst_n, .in_valid(p1_v), .in_data(p1_d), .busy(fm_busy),
    .win_valid(fm_v), .win(fm_win), .win_map(fm_map), .win_last(fm_last));

  // Second convolution layer.
  logic c2_busy, c2_v, c2_last;
  act_t c2_d;
  conv2_layer #(.K(K2), .NF(NF), .NM(NF), .OUT(C2)) u_conv2 (
    .clk, .rst_n, .win_valid(fm_v), .win(fm_win), .win_map(fm_map), .win_last(fm_last),
    .busy(c2_busy), .out_valid(c2_v), .out_data(c2_d), .out_last(c2_last));

  // Second pooling layer.
  logic p2_v;
  act_t p2_d;
  pooling_block #(.KIN(C2), .L(4)) u_pool2 (
    .clk, .rst_n, .in_valid(c2_v), .in_data(c2_d), .out_valid(p2_v), .out_data(p2_d));

  // Fully connected layer: flattened index = order of arrival.
  logic [$clog2(NIN)-1:0] fidx;
  logic fc_done;
  act_t fc_y [FC_N];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    fidx <= '0;
    else if (go)   fidx <= '0;
    else if (p2_v) fidx <= fidx + 1'b1;
  end
  fc_layer #(.FC_N(FC_N), .N_IN(NIN)) u_fc (
    .clk, .rst_n, .in_valid(p2_v), .in_last(p2_v && fidx == ($clog2(NIN))'(NIN-1)),
    .in_idx(fidx), .in_data(p2_d), .y(fc_y), .done(fc_done));

  // Output layer.
  logic ob_v;
  logic [CIW-1:0] ob_c;
  act_t ob_s;
  output_block #(.N_IN(FC_N), .N_CLASS(N_CLASS)) u_out (
    .clk, .rst_n, .start(fc_done), .x(fc_y), .out_valid(ob_v), .out_class(ob_c), .out_score(ob_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; is_ship <= 1'b0;
      for (int c = 0; c < N_CLASS; c++) score[c] <= '0;
    end else begin
      done <= 1'b0;
      if (go) busy <= 1'b1;
      if (ob_v) begin
        score[ob_c] <= ob_s;
        if (ob_c == CIW'(N_CLASS-1)) begin
          done    <= 1'b1;
          busy    <= 1'b0;
          is_ship <= ob_s > score[0];
        end
      end
    end
  end
endmodule
