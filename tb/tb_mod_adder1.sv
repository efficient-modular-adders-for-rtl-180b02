// tb_mod_adder1: exhaustive check of the modulo-m adder.
// Three instances: the default (W = 8, m = 256), W = 8 with m = 200 and W = 4
// with m = 13. Every pair x, y in [0, m-1] is applied and z is compared with
// (x + y) % m computed in integer arithmetic. Combinational, so a short delay
// separates stimulus and check; the watchdog bounds the run.
module tb_mod_adder1;
  int checks = 0, failures = 0;
  int wraps = 0, carries = 0, ones_zero = 0;

  logic [7:0] x0, y0, z0, x1, y1, z1;
  logic [3:0] x2, y2, z2;

  mod_adder1                    u0 (.x(x0), .y(y0), .z(z0));
  mod_adder1 #(.W(8), .M(200))  u1 (.x(x1), .y(y1), .z(z1));
  mod_adder1 #(.W(4), .M(13))   u2 (.x(x2), .y(y2), .z(z2));

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
        x0 = 8'(x); y0 = 8'(y);
        x1 = 8'(x % 200); y1 = 8'(y % 200);
        x2 = 4'(x % 13); y2 = 4'(y % 13);
        #1;
        checks += 3;
        if (z0 != 8'((x + y) % 256)) begin
          failures++;
          if (failures < 10) $display("m=256: %0d+%0d gave %0d", x, y, z0);
        end
        if (z1 != 8'((x % 200 + y % 200) % 200)) begin
          failures++;
          if (failures < 10) $display("m=200: %0d+%0d gave %0d", x % 200, y % 200, z1);
        end
        if (z2 != 4'((x % 13 + y % 13) % 13)) begin
          failures++;
          if (failures < 10) $display("m=13: %0d+%0d gave %0d", x % 13, y % 13, z2);
        end
        if (x % 200 + y % 200 >= 200) wraps++;
      end
    end
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
