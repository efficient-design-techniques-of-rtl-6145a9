// output_block: the CNN's final fully connected layer. For each output class
// it multiplies the N_IN inputs by that class's weights, one multiplier per
// input with its own Output Weight ROM (address = class), sums the products in
// a pipelined adder tree and adds the class bias from the Bias ROM.
//
// Timing: `start` samples x and issues classes 0..N_CLASS-1 on consecutive
// cycles; each class's score leaves with out_valid and out_class
// LAT = 3 + ceil(log2(N_IN)) cycles after it was issued. Arithmetic: products
// truncated by six bits, sums wrap at 17 bits (Q11.6); the bias is Q2.6.
// Structure per the design description; the start/valid handshake and the ROM
// fill (cnn_weight(T_OUT, class, input, 0), bias cnn_weight(T_OUTB, class,
// 0, 0)) are this implementation's.
module output_block
  import cnn_pkg::*;
#(
  parameter int N_IN    = 128,
  parameter int N_CLASS = 2,
  localparam int CIW    = (N_CLASS > 1) ? $clog2(N_CLASS) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  act_t                          x [N_IN],
  output logic                          out_valid,
  output logic [CIW-1:0]                out_class,
  output act_t                          out_score
);
  localparam int LV  = $clog2(N_IN);
  localparam int NP  = 1 << LV;
  localparam int LAT = 3 + LV;

  wgt_t wrom [N_IN][N_CLASS];
  wgt_t brom [N_CLASS];
  initial begin
    for (int i = 0; i < N_IN; i++)
      for (int c = 0; c < N_CLASS; c++) wrom[i][c] = cnn_weight(T_OUT, c, i, 0);
    for (int c = 0; c < N_CLASS; c++) brom[c] = cnn_weight(T_OUTB, c, 0, 0);
  end

  act_t          xs [N_IN];
  logic          run;
  logic [CIW-1:0] cls;
  logic [LAT-1:0] v_pipe;
  logic [CIW-1:0] c_pipe [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; cls <= '0; v_pipe <= '0;
    end else begin
      if (start) begin
        run <= 1'b1; cls <= '0;
      end else if (run) begin
        if (cls == CIW'(N_CLASS-1)) begin
          run <= 1'b0;
          cls <= '0;
        end else begin
          cls <= cls + 1'b1;
        end
      end
      v_pipe <= {v_pipe[LAT-2:0], run};
    end
  end

  // Stage 1: weight read; stage 2: products; tree; final stage: bias.
  wgt_t w_q [N_IN];
  act_t tree [LV+1][NP];
  wgt_t b_pipe [LAT];
  always_ff @(posedge clk) begin
    if (start) xs <= x;
    for (int i = 0; i < N_IN; i++) w_q[i] <= wrom[i][cls];
    for (int i = 0; i < NP; i++) begin
      if (i < N_IN) begin
        logic signed [ACT_W+W_W-1:0] p;
        p = xs[i] * w_q[i];
        tree[0][i] <= act_t'(p >>> FRAC);
      end else begin
        tree[0][i] <= '0;
      end
    end
    for (int l = 0; l < LV; l++)
      for (int i = 0; i < (NP >> (l + 1)); i++)
        tree[l+1][i] <= tree[l][2*i] + tree[l][2*i+1];
    out_score <= tree[LV][0] + act_t'(b_pipe[LAT-2]);
    c_pipe[0] <= cls;
    b_pipe[0] <= brom[cls];
    for (int s = 1; s < LAT; s++) begin
      c_pipe[s] <= c_pipe[s-1];
      b_pipe[s] <= b_pipe[s-1];
    end
  end

  assign out_valid = v_pipe[LAT-1];
  assign out_class = c_pipe[LAT-1];
endmodule
