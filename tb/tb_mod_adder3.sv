// tb_mod_adder3: exhaustive check of the modulo 2^W-1 adder at W = 8 (the
// default) and W = 4. For every x, y the output is compared with the rule
//   z = (x + y + 1) mod 2^W if x + y >= 2^W, else x + y
// and, separately, checked to be congruent to x + y modulo 2^W-1. Cases that
// produce the second encoding of zero (all ones) are counted and must occur.
module tb_mod_adder3;
  int checks = 0, failures = 0;
  int wraps = 0, carries = 0, ones_zero = 0;

  logic [7:0] x0, y0, z0;
  logic [3:0] x1, y1, z1;

  mod_adder3           u0 (.x(x0), .y(y0), .z(z0));
  mod_adder3 #(.W(4))  u1 (.x(x1), .y(y1), .z(z1));

  function automatic int expect_z(int x, int y, int w);
    int s = x + y;
    if (s >= (1 << w)) return (s + 1) % (1 << w);
    return s;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        x0 = 8'(x); y0 = 8'(y); x1 = 4'(x % 16); y1 = 4'(y % 16);
        #1;
        checks += 4;
        if (int'(z0) != expect_z(x, y, 8)) begin
          failures++;
          if (failures < 10) $display("W=8: %0d+%0d gave %0d", x, y, z0);
        end
        if (int'(z0) % 255 != (x + y) % 255) failures++;
        if (int'(z1) != expect_z(x % 16, y % 16, 4)) begin
          failures++;
          if (failures < 10) $display("W=4: %0d+%0d gave %0d", x % 16, y % 16, z1);
        end
        if (int'(z1) % 15 != (x % 16 + y % 16) % 15) failures++;
        if (x + y >= 256) carries++;
        if (x + y == 255) ones_zero++;
      end
    end
    if (carries == 0 || ones_zero == 0) failures++;
    $display("end-around carries=%0d all-ones zeros=%0d", carries, ones_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
