// sea_mod_add_vec: word-wise modular addition of two n_b-word vectors, the
// operation written x [+] y in SEA: z_i = x_i [+] y_i for 0 <= i <= n_b-1.
//
// The NB*B-bit vectors hold word i in bits [B*i +: B] (word 0 in the least
// significant bits). Each word goes through its own adder; ADDER picks the
// architecture (see sea_pkg). MOD_ADDER1 is used with modulus 2^B, the
// addition of the original cipher; MOD_ADDER2 and MOD_ADDER3 add modulo
// 2^B-1. No carry crosses a word boundary. Purely combinational.
module sea_mod_add_vec
  import sea_pkg::*;
#(
  parameter int unsigned NB    = 6,
  parameter int unsigned B     = 8,
  parameter adder_e      ADDER = MOD_ADDER1
) (
  input  logic [NB*B-1:0] x,
  input  logic [NB*B-1:0] y,
  output logic [NB*B-1:0] z
);

  for (genvar i = 0; i < NB; i++) begin : g_word
    if (ADDER == MOD_ADDER1) begin : g_a1
      mod_adder1 #(.W(B), .M(64'd1 << B)) u_add (
        .x(x[B*i +: B]), .y(y[B*i +: B]), .z(z[B*i +: B])
      );
    end else if (ADDER == MOD_ADDER2) begin : g_a2
      mod_adder2 #(.W(B)) u_add (
        .x(x[B*i +: B]), .y(y[B*i +: B]), .z(z[B*i +: B])
      );
    end else begin : g_a3
      mod_adder3 #(.W(B)) u_add (
        .x(x[B*i +: B]), .y(y[B*i +: B]), .z(z[B*i +: B])
      );
    end
  end

endmodule
