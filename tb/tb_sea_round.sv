// tb_sea_round: random check of one cipher round, both directions, against
// the reference model, for the default SEA_{96,8} round with each adder
// architecture. It also checks that the decrypt round undoes the encrypt
// round with the same key: fed (R', L') = (new R, old R) it must give back
// the old L as its new R.
module tb_sea_round;
  import sea_pkg::*;
  import sea_ref_pkg::*;
  int checks = 0, failures = 0;

  logic        dec;
  logic [47:0] l, r, k;
  logic [47:0] lo [3], ro [3];
  logic [47:0] l2, r2, l_save;

  sea_round                       u1 (.dec, .l_in(l), .r_in(r), .k_in(k), .l_out(lo[0]), .r_out(ro[0]));
  sea_round #(.ADDER(MOD_ADDER2)) u2 (.dec, .l_in(l), .r_in(r), .k_in(k), .l_out(lo[1]), .r_out(ro[1]));
  sea_round #(.ADDER(MOD_ADDER3)) u3 (.dec, .l_in(l), .r_in(r), .k_in(k), .l_out(lo[2]), .r_out(ro[2]));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    half_t el, er;
    for (int t = 0; t < 2000; t++) begin
      l = 48'({$urandom, $urandom});
      r = 48'({$urandom, $urandom});
      k = 48'({$urandom, $urandom});
      dec = t[0];
      #1;
      for (int a = 0; a < 3; a++) begin
        round_f(half_t'(l), half_t'(r), half_t'(k), 6, 8, a + 1, dec, el, er);
        checks += 2;
        if (lo[a] != 48'(el)) failures++;
        if (ro[a] != 48'(er)) begin
          failures++;
          if (failures < 10) $display("adder %0d dec=%0d: R' mismatch", a + 1, dec);
        end
      end
      if (!dec) begin
        l_save = l;
        l2 = ro[0];
        r2 = lo[0];
        l = l2;
        r = r2;
        dec = 1'b1;
        #1;
        checks++;
        if (ro[0] != l_save || lo[0] != r2) begin
          failures++;
          $display("decrypt round does not invert encrypt round");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
