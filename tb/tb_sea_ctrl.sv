// tb_sea_ctrl: cycle-by-cycle check of the round controller at its default
// round count (93) and at 7 rounds. For each round t it checks busy,
// round_en, swap (only in round floor(NR/2)), use_left (after it), the
// constant index (t, then NR - t) and done (round NR), that an operation
// lasts exactly NR cycles, and that a start pulse during an operation is
// ignored.
module tb_sea_ctrl;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  logic       busy0, load0, ren0, swap0, left0, done0;
  logic [6:0] idx0;
  logic       busy1, load1, ren1, swap1, left1, done1;
  logic [2:0] idx1;

  sea_ctrl          u0 (.clk, .rst_n, .start, .busy(busy0), .load(load0), .round_en(ren0),
                        .swap(swap0), .use_left(left0), .const_idx(idx0), .done(done0));
  sea_ctrl #(.NR(7)) u1 (.clk, .rst_n, .start, .busy(busy1), .load(load1), .round_en(ren1),
                        .swap(swap1), .use_left(left1), .const_idx(idx1), .done(done1));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 2; op++) begin
      @(negedge clk);
      check(!busy0 && !busy1, "busy while idle");
      start = 1'b1;
      #1;
      check(load0 && load1, "start not accepted");
      @(negedge clk);
      start = 1'b0;
      for (int t = 1; t <= 93; t++) begin
        if (t == 5 || t == 40) start = 1'b1;  // ignored while busy
        #1;
        check(busy0 && ren0 && !load0, "round 93: busy/round_en");
        check(swap0 == (t == 46), "round 93: swap");
        check(left0 == (t > 46), "round 93: use_left");
        check(int'(idx0) == (t <= 46 ? t : 93 - t), "round 93: const_idx");
        check(done0 == (t == 93), "round 93: done");
        if (t <= 7) begin
          check(busy1 && ren1, "round 7: busy");
          check(swap1 == (t == 3), "round 7: swap");
          check(left1 == (t > 3), "round 7: use_left");
          check(int'(idx1) == (t <= 3 ? t : 7 - t), "round 7: const_idx");
          check(done1 == (t == 7), "round 7: done");
        end else if (t > 8 && t <= 40) begin
          check(!busy1, "round 7: still busy");
        end
        @(negedge clk);
        start = 1'b0;
      end
      check(!busy0, "93 rounds: busy after round 93");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
