// relu: rectified linear unit of the CNN datapath. A 2-to-1 multiplexer whose
// select is the sign bit (MSB) of the input: a negative value gives zero,
// anything else passes unchanged. Purely combinational. This is exactly the
// structure the design describes for every ReLU in the accelerator.
module relu #(
  parameter int W = 17
) (
  input  logic signed [W-1:0] a,
  output logic signed [W-1:0] y
);
  always_comb y = a[W-1] ? '0 : a;
endmodule
