// conv1_layer: the Input Layer and First Convolution Layer of the CNN.
//
// The three colour channels of the image are written row by row into three
// Channel Block RAMs (one row per write, 80 8-bit pixels). `start` launches
// the three channel window generators together, each for NF passes over its
// channel, so that at every cycle the three 5x5 windows at the same position
// reach the three Channel Convolution Blocks; the pass number selects the
// filter in the blocks' kernel ROMs. The three channel sums are added, the
// filter bias (Q2.6, cnn_weight(T_BIAS1, f, 0, 0)) is added and a ReLU
// follows. Output: one value of one 76x76 feature map per cycle, map after
// map (filter 0 first), with no buffer: NF*(IMG-K+1)^2 consecutive cycles.
//
// Timing: out_valid rises K+2 (window start-up) + 2+ceil(log2(K*K)) (conv
// block) + 4 (sum, bias, ReLU registers) cycles after start. Structure and
// rate follow the design description; the write port, handshake and register
// placement are this implementation's.
module conv1_layer
  import cnn_pkg::*;
#(
  parameter int IMG = 80,
  parameter int K   = 5,
  parameter int NF  = 32,
  parameter int CH  = 3
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        img_we,
  input  logic [$clog2(CH)-1:0]       img_ch,
  input  logic [$clog2(IMG)-1:0]      img_row,
  input  logic [IMG*PIX_W-1:0]        img_data,
  input  logic                        start,
  output logic                        busy,
  output logic                        out_valid,
  output act_t                        out_data,
  output logic [$clog2(NF)-1:0]       out_filt,
  output logic                        out_last
);
  localparam int FW = $clog2(NF);
  localparam int TW = FW + 1;          // tag: {last, filter}

  logic [CH-1:0]          wg_busy, wg_v;
  logic [K*K*PIX_W-1:0]   wg_win [CH];
  logic [7:0]             wg_pass [CH];
  logic [CH-1:0]          wg_last;
  logic [CH-1:0]          cb_v;
  act_t                   cb_out [CH];
  logic [TW-1:0]          cb_tag [CH];

  for (genvar c = 0; c < CH; c++) begin : g_ch
    logic [K*K*(PIX_W+1)-1:0] x;
    window_generator #(.IMG(IMG), .K(K), .DW(PIX_W), .BANKS(1)) u_wg (
      .clk, .rst_n,
      .wr_en(img_we && img_ch == c[$clog2(CH)-1:0]), .wr_addr(img_row), .wr_data(img_data),
      .start, .start_bank(1'b0), .npass(8'(NF)),
      .busy(wg_busy[c]), .win_valid(wg_v[c]), .win(wg_win[c]),
      .win_pass(wg_pass[c]), .win_last(wg_last[c]));
    always_comb
      for (int i = 0; i < K*K; i++) x[i*(PIX_W+1) +: PIX_W+1] = {1'b0, wg_win[c][i*PIX_W +: PIX_W]};
    conv_block #(.K(K), .NROM(NF), .IN_W(PIX_W+1), .SHIFT(0), .TBL(T_CONV1), .SEL(c),
                 .ADDR_IS_OUT(1'b1), .TAG_W(TW)) u_cb (
      .clk, .rst_n, .in_valid(wg_v[c]), .win(x), .addr(wg_pass[c][FW-1:0]),
      .in_tag({wg_last[c], wg_pass[c][FW-1:0]}),
      .out_valid(cb_v[c]), .out(cb_out[c]), .out_tag(cb_tag[c]));
  end

  wgt_t bias [NF];
  initial for (int f = 0; f < NF; f++) bias[f] = cnn_weight(T_BIAS1, f, 0, 0);

  // Channel adders, bias adder and ReLU, one register each.
  act_t          s01, s2, sa, sb;
  logic [3:0]    v;
  logic [TW-1:0] t1, t2, t3;
  act_t          r;

  always_comb begin
    sa = '0;
    for (int c = 0; c < CH; c++) sa += cb_out[c];
  end
  relu #(.W(ACT_W)) u_relu (.a(sb), .y(r));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0;
    end else begin
      v <= {v[2:0], cb_v[0]};
    end
  end
  always_ff @(posedge clk) begin
    s01 <= sa;
    t1  <= cb_tag[0];
    s2  <= s01 + act_t'(bias[t1[FW-1:0]]);
    t2  <= t1;
    sb  <= s2;
    t3  <= t2;
    out_data <= r;
    out_filt <= t3[FW-1:0];
    out_last <= t3[FW];
  end
  assign out_valid = v[3];
  assign busy      = (|wg_busy) | (|cb_v) | (|v);
endmodule
