// tb_sea_sbox: checks the bitsliced S-box layer against a table lookup.
// First every 3-bit input value is placed in every bit position of one word
// group (exhaustive per bit), then random halves are compared with the
// table-based reference for n_b = 6, b = 8 and for n_b = 3, b = 4.
module tb_sea_sbox;
  import sea_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [47:0] x, y;
  logic [11:0] xs, ys;

  sea_sbox                     u0 (.x(x), .y(y));
  sea_sbox #(.NB(3), .B(4))    u1 (.x(xs), .y(ys));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      for (int j = 0; j < 8; j++) begin
        x = '0;
        x[j]      = v[0];
        x[8 + j]  = v[1];
        x[16 + j] = v[2];
        #1;
        checks++;
        if ({y[16 + j], y[8 + j], y[j]} != 3'(SBOX[v])) begin
          failures++;
          $display("S(%0d) at bit %0d gave %0d", v, j, {y[16 + j], y[8 + j], y[j]});
        end
      end
    end
    for (int t = 0; t < 2000; t++) begin
      x = 48'({$urandom, $urandom});
      xs = 12'($urandom);
      #1;
      checks += 2;
      if (y != 48'(sbox(half_t'(x), 6, 8))) failures++;
      if (ys != 12'(sbox(half_t'(xs), 3, 4))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
