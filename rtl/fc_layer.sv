// fc_layer: the Fully Connected Layer, FC_N vector multipliers working in
// parallel, one per neuron, all fed by the same input stream. When the last
// input has been accumulated each neuron adds its bias (Q2.6, from
// cnn_weight(T_FCB, n, 0, 0)) and passes a ReLU; the FC_N results are then
// held on y and `done` pulses once.
//
// Timing: inputs arrive one per valid cycle with their flattened index; the
// first input of a vector (in_idx == 0) clears the accumulators. `done`
// follows the input flagged in_last by three cycles. The multipliers are
// enabled only while a vector is in flight (see vector_multiplier). Bias and
// ReLU per neuron follow the design description; the enable window and the
// handshake are this implementation's.
module fc_layer
  import cnn_pkg::*;
#(
  parameter int FC_N = 128,
  parameter int N_IN = 512
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_last,
  input  logic [$clog2(N_IN)-1:0] in_idx,
  input  act_t                    in_data,
  output act_t                    y [FC_N],
  output logic                    done
);
  logic active, en;
  logic [FC_N-1:0] vdone;
  act_t acc [FC_N];
  logic first;

  assign first = in_valid && (in_idx == '0);
  assign en    = active | first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) active <= 1'b0;
    else if (first) active <= 1'b1;
    else if (&vdone) active <= 1'b0;
  end

  for (genvar n = 0; n < FC_N; n++) begin : g_n
    act_t s;
    vector_multiplier #(.N_IN(N_IN), .NEURON(n)) u_vm (
      .clk, .rst_n, .en, .clear(first), .in_valid, .in_last, .in_idx, .in_data,
      .acc(acc[n]), .done(vdone[n]));
    assign s = acc[n] + act_t'(cnn_weight(T_FCB, n, 0, 0));
    relu #(.W(ACT_W)) u_relu (.a(s), .y(y[n]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= 1'b0;
    else        done <= &vdone;
  end
endmodule
