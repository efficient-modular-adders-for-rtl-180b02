// tb_sea_top_variants: end-to-end runs of the SEA core over the configurations
// the design is meant to be varied in: the three adder architectures at the
// default SEA_{96,8}, and the block/word sizes SEA_{24,4}, SEA_{48,8},
// SEA_{144,8} and SEA_{192,16} (round counts derived from n and b).
// Each instance is driven and checked by sea_top_driver.
module tb_sea_top_variants;
  import sea_pkg::*;
  int c [7], f [7];
  bit fin [7];
  int checks, failures;

  sea_top_driver #(.ADDER(MOD_ADDER1))                    d0 (.checks(c[0]), .failures(f[0]), .finished(fin[0]));
  sea_top_driver #(.ADDER(MOD_ADDER2))                    d1 (.checks(c[1]), .failures(f[1]), .finished(fin[1]));
  sea_top_driver #(.ADDER(MOD_ADDER3))                    d2 (.checks(c[2]), .failures(f[2]), .finished(fin[2]));
  sea_top_driver #(.N(24),  .B(4),  .ADDER(MOD_ADDER3))   d3 (.checks(c[3]), .failures(f[3]), .finished(fin[3]));
  sea_top_driver #(.N(48),  .B(8),  .ADDER(MOD_ADDER2))   d4 (.checks(c[4]), .failures(f[4]), .finished(fin[4]));
  sea_top_driver #(.N(144), .B(8),  .ADDER(MOD_ADDER1))   d5 (.checks(c[5]), .failures(f[5]), .finished(fin[5]));
  sea_top_driver #(.N(192), .B(16), .ADDER(MOD_ADDER1))   d6 (.checks(c[6]), .failures(f[6]), .finished(fin[6]));

  task automatic report(input bit timeout);
    checks = 0; failures = timeout ? 1 : 0;
    foreach (c[i]) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    #10_000_000;
    $display("watchdog expired");
    report(1'b1);
    $finish;
  end

  initial begin
    #1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5] && fin[6]);
    report(1'b0);
    $finish;
  end
endmodule
