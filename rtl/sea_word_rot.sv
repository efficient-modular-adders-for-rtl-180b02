// sea_word_rot: SEA word rotation R (LEFT = 1) or its inverse R^-1 (LEFT = 0)
// on an n_b-word vector.
//
// R moves every word one place up: y_(i+1) = x_i for 0 <= i <= n_b-2 and
// y_0 = x_(n_b-1). With word 0 in the least significant bits this is a left
// rotation of the whole vector by B bits; R^-1 is the matching right rotation.
// In hardware it is only a reordering of wires, no gates.
module sea_word_rot #(
  parameter int unsigned NB   = 6,
  parameter int unsigned B    = 8,
  parameter bit          LEFT = 1'b1
) (
  input  logic [NB*B-1:0] x,
  output logic [NB*B-1:0] y
);

  if (NB < 2) begin : g_one
    assign y = x;
  end else if (LEFT) begin : g_left
    assign y = {x[NB*B-B-1:0], x[NB*B-1 -: B]};
  end else begin : g_right
    assign y = {x[B-1:0], x[NB*B-1:B]};
  end

endmodule
