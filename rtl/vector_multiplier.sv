// vector_multiplier: one neuron of the Fully Connected Layer. It receives the
// flattened input vector one element per cycle (in_idx is its position),
// multiplies it by that neuron's weight from its weight ROM and accumulates.
//
// Timing: the ROM read and the input are registered in stage 1, the product
// is added to the accumulator in stage 2; `done` pulses two cycles after the
// element flagged in_last, with `acc` holding the finished dot product until
// the next `clear`. Arithmetic is Q11.6 with each product truncated by six
// bits and sums wrapping at 17 bits.
//
// The block is described as clock-gated because it is busy for only a short
// part of each image. Here that is a clock enable: with en low no register
// of the block toggles, which an FPGA maps onto the flip-flop CE pins or a
// BUFGCE. This choice, the ROM fill (cnn_weight(T_FC, NEURON, idx, 0)) and the
// handshake are this implementation's; the ROM-fed multiply-accumulate is the
// described structure.
module vector_multiplier
  import cnn_pkg::*;
#(
  parameter int N_IN   = 512,
  parameter int NEURON = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clear,
  input  logic                    in_valid,
  input  logic                    in_last,
  input  logic [$clog2(N_IN)-1:0] in_idx,
  input  act_t                    in_data,
  output act_t                    acc,
  output logic                    done
);
  wgt_t rom [N_IN];
  initial begin
    for (int i = 0; i < N_IN; i++) rom[i] = cnn_weight(T_FC, NEURON, i, 0);
  end

  wgt_t w_q;
  act_t x_q;
  logic v_q, l_q;

  always_ff @(posedge clk) begin
    if (en) begin
      w_q <= rom[in_idx];
      x_q <= in_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0; l_q <= 1'b0; acc <= '0; done <= 1'b0;
    end else if (en) begin
      logic signed [ACT_W+W_W-1:0] p;
      v_q  <= in_valid;
      l_q  <= in_valid & in_last;
      done <= l_q;
      p = x_q * w_q;
      if (clear)    acc <= '0;
      else if (v_q) acc <= acc + act_t'(p >>> FRAC);
    end
  end
endmodule
