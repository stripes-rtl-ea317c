// activation_unit: applies the non-linear activation function to one brick of
// finished output neurons as it leaves NBout, before it is reduced and written
// to neuron memory. The function is a rectifier (negative sums become zero)
// when relu is set and the identity otherwise; the published design names the
// unit but not its function, so the rectifier is this design's choice. The
// unit can also scale a brick by a right shift (scale_sh), which serves the
// division of average pooling; a power-of-two divisor is this design's
// choice. Purely combinational.
module activation_unit
  import stripes_pkg::*;
#(
  parameter int unsigned LANES = N_FLANES
) (
  input  logic                       relu,
  input  logic [3:0]                 scale_sh,
  input  logic [LANES-1:0][ACC_W-1:0] in_brick,
  output logic [LANES-1:0][ACC_W-1:0] out_brick
);

  always_comb begin
    for (int i = 0; i < int'(LANES); i++) begin
      logic signed [ACC_W-1:0] v;
      v = $signed(in_brick[i]) >>> scale_sh;
      if (relu && v < 0) v = '0;
      out_brick[i] = v;
    end
  end

endmodule
