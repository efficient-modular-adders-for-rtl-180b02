// sea_top_driver: self-checking stimulus for one sea_top instance of any size
// and adder architecture, used by tb_sea_top_variants.
//
// It runs NOPS encrypt/decrypt pairs with random keys and texts (the first
// text and key all zeros, the second all ones) on its own clock, and checks
//   - each ciphertext against the reference model (sea_ref_pkg),
//   - that decrypting it with the same key returns the plaintext,
//   - that done comes exactly NR clock edges after the edge that took start,
//   - that text_out holds while idle,
//   - that a start pulse in the middle of an operation changes nothing.
// It counts how often the Swap and Switch commands and the ignored start
// occurred and counts a failure if one never did. Results are left on
// checks/failures and finished goes high at the end.
module sea_top_driver
  import sea_pkg::*;
  import sea_ref_pkg::*;
#(
  parameter int unsigned N     = 96,
  parameter int unsigned B     = 8,
  parameter adder_e      ADDER = MOD_ADDER1,
  parameter int          NOPS  = 8
) (
  output int checks,
  output int failures,
  output bit finished
);
  localparam int H  = N / 2;
  localparam int NB = N / (2 * B);
  localparam int NR = sea_rounds(N, B);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, decrypt = 1'b0;
  logic [N-1:0] key_in, text_in, text_out;
  logic busy, done;
  always #5 clk = ~clk;

  sea_top #(.N(N), .B(B), .ADDER(ADDER)) u_dut (
    .clk, .rst_n, .start, .decrypt, .key_in, .text_in, .busy, .done, .text_out
  );

  int n_swap = 0, n_switch = 0, n_ignored = 0, n_enc = 0, n_dec = 0;
  always @(posedge clk) if (rst_n) begin
    if (u_dut.round_en && u_dut.swap) n_swap++;
    if (u_dut.round_en && u_dut.use_left) n_switch++;
    if (start && busy) n_ignored++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("sea_top N=%0d B=%0d adder=%0d: %s", N, B, int'(ADDER), what);
    end
  endtask

  // one operation; returns text_out
  task automatic run(input logic [N-1:0] key, input logic [N-1:0] txt, input bit dec,
                     input bit poke, output logic [N-1:0] res);
    int edges;
    @(negedge clk);
    key_in = key; text_in = txt; decrypt = dec; start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    key_in = ~key; text_in = ~txt; decrypt = ~dec;  // must not matter any more
    edges = 0;
    while (!done && edges < NR + 10) begin
      if (poke && edges == NR / 3) start = 1'b1;  // ignored: an operation is running
      @(posedge clk);
      #1;
      start = 1'b0;
      edges++;
    end
    check(edges == NR, $sformatf("latency %0d edges, expected %0d", edges, NR));
    res = text_out;
    if (dec) n_dec++; else n_enc++;
    repeat (3) @(posedge clk);
    #1;
    check(text_out == res && !busy, "text_out not held while idle");
  endtask

  initial begin
    checks = 0; failures = 0; finished = 1'b0;
    key_in = '0; text_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < NOPS; op++) begin
      logic [N-1:0] k, p, c, p2;
      logic [N+31:0] rk, rp;
      half_t eh, el;
      for (int j = 0; j < N; j += 32) begin
        rk[j +: 32] = $urandom;
        rp[j +: 32] = $urandom;
      end
      k = rk[N-1:0];
      p = rp[N-1:0];
      if (op == 0) begin k = '0; p = '0; end
      if (op == 1) begin k = '1; p = '1; end
      sea(half_t'(p[N-1:H]), half_t'(p[H-1:0]), half_t'(k[N-1:H]), half_t'(k[H-1:0]),
          NB, B, NR, int'(ADDER), 1'b0, eh, el);
      run(k, p, 1'b0, op % 2 == 1, c);
      check(c == {eh[H-1:0], el[H-1:0]}, "ciphertext differs from reference");
      run(k, c, 1'b1, op % 3 == 2, p2);
      check(p2 == p, "decryption does not return the plaintext");
    end
    check(n_swap == 2 * NOPS, "Swap count");
    check(n_switch == 2 * NOPS * (NR - NR / 2), "Switch count");
    check(n_ignored > 0, "no start was ignored");
    check(n_enc == NOPS && n_dec == NOPS, "operation count");
    $display("sea_top N=%0d B=%0d NR=%0d adder=%0d: encrypts=%0d decrypts=%0d swaps=%0d switched rounds=%0d ignored starts=%0d",
             N, B, NR, int'(ADDER), n_enc, n_dec, n_swap, n_switch, n_ignored);
    finished = 1'b1;
  end
endmodule
