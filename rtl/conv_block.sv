// conv_block: one CNN Convolution Block. It multiplies a K x K window by the
// K x K kernel held in row `addr` of its weight ROM and sums the K*K products
// in a pipelined adder tree of height ceil(log2(K*K)).
//
// Timing: one window per cycle. Stage 1 registers the window and reads the
// ROM row; stage 2 forms the products; each tree level is one more register
// stage, so out_valid follows in_valid by LAT = 2 + ceil(log2(K*K)) cycles.
// in_tag travels with the data unchanged (callers use it for the filter or
// map index).
//
// Arithmetic: inputs are signed IN_W-bit values (pixels are passed with a
// zero sign bit), weights are Q2.6. Each product is shifted right by SHIFT
// bits (6 when the input already has six fractional bits, 0 for integer
// pixels), i.e. truncated, and all sums wrap at ACT_W bits (Q11.6).
//
// ROM contents: row `addr`, tap t holds cnn_weight(TBL, a, b, t) with
// (a, b) = (addr, SEL) when ADDR_IS_OUT, else (SEL, addr): in the first
// layer a block serves one input channel SEL and the row is the output
// filter; in the second layer a block serves one output filter SEL and the
// row is the input map. The multiplier array, kernel ROM and adder tree follow
// the design description; the tag, the tree's zero padding to a power of two
// and the ROM fill are choices of this implementation.
module conv_block
  import cnn_pkg::*;
#(
  parameter int K           = 5,
  parameter int NROM        = 32,
  parameter int IN_W        = 9,
  parameter int SHIFT       = 0,
  parameter int TBL         = T_CONV1,
  parameter int SEL         = 0,
  parameter bit ADDR_IS_OUT = 1'b1,
  parameter int TAG_W       = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [K*K*IN_W-1:0]       win,
  input  logic [$clog2(NROM)-1:0]   addr,
  input  logic [TAG_W-1:0]          in_tag,
  output logic                      out_valid,
  output act_t                      out,
  output logic [TAG_W-1:0]          out_tag
);
  localparam int N   = K * K;
  localparam int LV  = $clog2(N);
  localparam int NP  = 1 << LV;
  localparam int LAT = 2 + LV;

  // Kernel ROM: one row of N weights per entry.
  logic [N*W_W-1:0] rom [NROM];
  initial begin
    for (int a = 0; a < NROM; a++)
      for (int t = 0; t < N; t++)
        rom[a][t*W_W +: W_W] = ADDR_IS_OUT ? cnn_weight(TBL, a, SEL, t)
                                           : cnn_weight(TBL, SEL, a, t);
  end

  logic [N*W_W-1:0]  w_q;
  logic [N*IN_W-1:0] x_q;
  act_t              tree [LV+1][NP];
  logic [LAT-1:0]    v_pipe;
  logic [TAG_W-1:0]  t_pipe [LAT];

  always_ff @(posedge clk) begin
    w_q <= rom[addr];
    x_q <= win;
    // Products, truncated to keep the fractional bits of the input.
    for (int i = 0; i < NP; i++) begin
      if (i < N) begin
        logic signed [IN_W+W_W-1:0] p;
        p = $signed(x_q[i*IN_W +: IN_W]) * $signed(w_q[i*W_W +: W_W]);
        tree[0][i] <= act_t'(p >>> SHIFT);
      end else begin
        tree[0][i] <= '0;
      end
    end
    // Adder tree, one register level per stage.
    for (int l = 0; l < LV; l++)
      for (int i = 0; i < (NP >> (l + 1)); i++)
        tree[l+1][i] <= tree[l][2*i] + tree[l][2*i+1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_pipe <= '0;
    end else begin
      v_pipe <= {v_pipe[LAT-2:0], in_valid};
    end
  end

  always_ff @(posedge clk) begin
    t_pipe[0] <= in_tag;
    for (int s = 1; s < LAT; s++) t_pipe[s] <= t_pipe[s-1];
  end

  assign out_valid = v_pipe[LAT-1];
  assign out       = tree[LV][0];
  assign out_tag   = t_pipe[LAT-1];
endmodule
