// sea_bit_rot: SEA bit rotation r on an n_b-word vector.
//
// Inside every group of three words (x_3i, x_3i+1, x_3i+2):
//   y_3i   = x_3i rotated right by one bit,
//   y_3i+1 = x_3i+1 unchanged,
//   y_3i+2 = x_3i+2 rotated left by one bit.
// The rotation amounts are those of the original SEA specification. In
// hardware it is only a reordering of wires. NB must be a multiple of 3.
module sea_bit_rot #(
  parameter int unsigned NB = 6,
  parameter int unsigned B  = 8
) (
  input  logic [NB*B-1:0] x,
  output logic [NB*B-1:0] y
);

  for (genvar g = 0; g < NB / 3; g++) begin : g_grp
    logic [B-1:0] a, b, c;
    assign a = x[B*(3*g)   +: B];
    assign b = x[B*(3*g+1) +: B];
    assign c = x[B*(3*g+2) +: B];
    assign y[B*(3*g)   +: B] = {a[0], a[B-1:1]};
    assign y[B*(3*g+1) +: B] = b;
    assign y[B*(3*g+2) +: B] = {c[B-2:0], c[B-1]};
  end

endmodule
