// tb_sea_key_round: random check of the key-schedule round F_K against the
// reference model for every constant index 0..127 and each adder
// architecture (SEA_{96,8} halves).
module tb_sea_key_round;
  import sea_pkg::*;
  import sea_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [47:0] kl, kr;
  logic [6:0]  idx;
  logic [47:0] klo [3], kro [3];

  sea_key_round                       u1 (.kl_in(kl), .kr_in(kr), .idx, .kl_out(klo[0]), .kr_out(kro[0]));
  sea_key_round #(.ADDER(MOD_ADDER2)) u2 (.kl_in(kl), .kr_in(kr), .idx, .kl_out(klo[1]), .kr_out(kro[1]));
  sea_key_round #(.ADDER(MOD_ADDER3)) u3 (.kl_in(kl), .kr_in(kr), .idx, .kl_out(klo[2]), .kr_out(kro[2]));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    half_t el, er;
    for (int t = 0; t < 2560; t++) begin
      kl = 48'({$urandom, $urandom});
      kr = 48'({$urandom, $urandom});
      if (t % 4 == 0) kr[7:0] = 8'hff;
      idx = 7'(t);
      #1;
      for (int a = 0; a < 3; a++) begin
        key_round_f(half_t'(kl), half_t'(kr), t % 128, 6, 8, a + 1, el, er);
        checks += 2;
        if (klo[a] != 48'(el)) failures++;
        if (kro[a] != 48'(er)) begin
          failures++;
          if (failures < 10) $display("adder %0d idx %0d: KR' mismatch", a + 1, t % 128);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
