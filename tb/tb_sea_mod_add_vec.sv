// tb_sea_mod_add_vec: random check of the word-wise vector adder with each of
// the three adder architectures (n_b = 6 words of 8 bits). Every word of z is
// compared with the reference word addition; vectors with all-ones and
// carry-producing words are mixed in so that word boundaries are exercised.
module tb_sea_mod_add_vec;
  import sea_pkg::*;
  import sea_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [47:0] x, y, z1, z2, z3;

  sea_mod_add_vec                      u1 (.x(x), .y(y), .z(z1));
  sea_mod_add_vec #(.ADDER(MOD_ADDER2)) u2 (.x(x), .y(y), .z(z2));
  sea_mod_add_vec #(.ADDER(MOD_ADDER3)) u3 (.x(x), .y(y), .z(z3));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      x = 48'({$urandom, $urandom});
      y = 48'({$urandom, $urandom});
      if (t % 7 == 0) x[15:8] = 8'hff;
      if (t % 5 == 0) y[47:40] = ~x[47:40];
      #1;
      checks += 3;
      if (z1 != 48'(vadd(half_t'(x), half_t'(y), 6, 8, 1))) failures++;
      if (z2 != 48'(vadd(half_t'(x), half_t'(y), 6, 8, 2))) failures++;
      if (z3 != 48'(vadd(half_t'(x), half_t'(y), 6, 8, 3))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
