// conv2_layer: the Second Convolution Layer of the CNN. NF Filter Convolution
// Blocks run in parallel on the same K x K window of the current input map;
// block f holds in its kernel ROM one kernel per input map (row = map index)
// of output filter f. Each block's Acc FSM adds its result into its own
// Accumulator RAM of OUT x OUT words: the first map writes, later maps
// read-add-write. When the window flagged last of map NM-1 has been
// accumulated, the readout phase streams the RAMs out in filter order through
// a NF-to-1 multiplexer: every word gets its filter's bias (Q2.6,
// cnn_weight(T_BIAS2, f, 0, 0)) added and passes a ReLU, one value per cycle,
// NF*OUT*OUT cycles in all.
//
// Interface: win/win_map/win_last from the Second Input Layer (one window per
// cycle, OUT*OUT windows per map); out_valid/out_data/out_last to the Second
// Pooling Layer. Accumulator words are 17-bit Q11.6 like every other sum.
// Structure per the design description; the readout sequencing and register
// placement are this implementation's.
module conv2_layer
  import cnn_pkg::*;
#(
  parameter int K   = 4,
  parameter int NF  = 32,
  parameter int NM  = 32,
  parameter int OUT = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    win_valid,
  input  logic [K*K*ACT_W-1:0]    win,
  input  logic [$clog2(NM)-1:0]   win_map,
  input  logic                    win_last,
  output logic                    busy,
  output logic                    out_valid,
  output act_t                    out_data,
  output logic                    out_last
);
  localparam int MW = $clog2(NM);
  localparam int FW = $clog2(NF);
  localparam int PW = $clog2(OUT*OUT);
  localparam int TW = MW + 1;

  logic [NF-1:0]  cb_v;
  act_t           cb_out [NF];
  logic [TW-1:0]  cb_tag [NF];
  act_t           acc [NF][OUT*OUT];

  for (genvar f = 0; f < NF; f++) begin : g_f
    conv_block #(.K(K), .NROM(NM), .IN_W(ACT_W), .SHIFT(FRAC), .TBL(T_CONV2), .SEL(f),
                 .ADDR_IS_OUT(1'b0), .TAG_W(TW)) u_cb (
      .clk, .rst_n, .in_valid(win_valid), .win, .addr(win_map),
      .in_tag({win_last, win_map}),
      .out_valid(cb_v[f]), .out(cb_out[f]), .out_tag(cb_tag[f]));
  end

  wgt_t bias [NF];
  initial for (int f = 0; f < NF; f++) bias[f] = cnn_weight(T_BIAS2, f, 0, 0);

  // Acc FSM (shared position counter) and readout sequencer.
  logic [PW-1:0] pos;
  logic          rd_run;
  logic [FW-1:0] rf;
  logic [PW-1:0] rp;
  logic          o_v, o_l;
  act_t          o_s;
  act_t          o_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; rd_run <= 1'b0; rf <= '0; rp <= '0; o_v <= 1'b0; o_l <= 1'b0;
    end else begin
      o_v <= 1'b0;
      o_l <= 1'b0;
      if (cb_v[0]) begin
        pos <= (cb_tag[0][TW-1]) ? '0 : pos + 1'b1;
        if (cb_tag[0][TW-1] && cb_tag[0][MW-1:0] == MW'(NM-1)) begin
          rd_run <= 1'b1; rf <= '0; rp <= '0;
        end
      end
      if (rd_run) begin
        o_v <= 1'b1;
        o_l <= (rf == FW'(NF-1)) && (rp == PW'(OUT*OUT-1));
        if (rp == PW'(OUT*OUT-1)) begin
          rp <= '0;
          if (rf == FW'(NF-1)) rd_run <= 1'b0;
          else                 rf <= rf + 1'b1;
        end else begin
          rp <= rp + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int f = 0; f < NF; f++)
      if (cb_v[f])
        acc[f][pos] <= (cb_tag[f][MW-1:0] == '0) ? cb_out[f] : acc[f][pos] + cb_out[f];
    // NF-to-1 multiplexer and bias.
    o_s <= acc[rf][rp] + act_t'(bias[rf]);
  end

  relu #(.W(ACT_W)) u_relu (.a(o_s), .y(o_r));
  assign out_valid = o_v;
  assign out_data  = o_r;
  assign out_last  = o_l;
  assign busy      = rd_run | o_v | (|cb_v) | (pos != 0);
endmodule
