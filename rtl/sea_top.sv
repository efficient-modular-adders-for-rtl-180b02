// sea_top: SEA_{n,b} block cipher, loop architecture, one round per clock.
//
// The n-bit text is held as two n/2-bit halves L and R, the n-bit key as KL
// and KR, each half being n_b = n/(2b) words of b bits. Every clock of an
// operation computes, side by side, one cipher round (sea_round, encrypt or
// decrypt) and one key-schedule round (sea_key_round), and writes both back:
//   cipher: {L, R} <= F(L, R, K_sel),    K_sel = Switch ? KL : KR
//   key:    {KL, KR} <= Swap ? {KR', KL'} : {KL', KR'}
// with {KL', KR'} = F_K(KL, KR, C(i)). sea_ctrl drives Swap (round
// floor(n_r/2)), Switch (every later round) and the constant index i, which
// counts up to the middle round and back down. Because of the swap the
// sequence of round keys reads the same forwards and backwards, so decryption
// runs exactly the same key schedule and only replaces F_E by F_D.
//
// Interface and timing:
//   start (while busy = 0) loads text_in as L & R and key_in as KL & KR and
//   samples decrypt. Rounds 1 .. NR follow on the next NR clock edges. done is
//   a one-cycle pulse NR+1 cycles after the start cycle, when text_out =
//   R_nr & L_nr is valid; text_out then holds until the next start. Reset is
//   asynchronous and active low and clears the controller and registers.
//
// ADDER chooses the word adder of both round functions (see sea_pkg):
// MOD_ADDER1 (modulo 2^b, the original cipher, the default here) or one of
// the two modulo 2^b-1 adders of the modified cipher. The loop structure, the
// Swap/Switch multiplexers and the three adders follow the paper; the
// default size SEA_{96,8}, the merged encrypt/decrypt round and the
// handshake are this design's choices.
module sea_top
  import sea_pkg::*;
#(
  parameter int unsigned N     = 96,
  parameter int unsigned B     = 8,
  parameter int unsigned NR    = sea_rounds(N, B),
  parameter adder_e      ADDER = MOD_ADDER1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         decrypt,
  input  logic [N-1:0] key_in,
  input  logic [N-1:0] text_in,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] text_out
);

  localparam int unsigned H  = N / 2;
  localparam int unsigned CW = $clog2(NR + 1);

  if (N % (6 * B) != 0) begin : g_bad_n
    $error("sea_top: N must be a multiple of 6*B");
  end

  logic         load, round_en, swap, use_left, last;
  logic [CW-1:0] const_idx;
  logic         dec_q, done_q;
  logic [H-1:0] l_q, r_q, kl_q, kr_q;
  logic [H-1:0] l_nx, r_nx, kl_nx, kr_nx, k_sel;

  sea_ctrl #(.NR(NR)) u_ctrl (
    .clk, .rst_n, .start, .busy, .load, .round_en,
    .swap, .use_left, .const_idx, .done(last)
  );

  // Switch: right key half for the first half of the rounds, left after it
  assign k_sel = use_left ? kl_q : kr_q;

  sea_round #(.N(N), .B(B), .ADDER(ADDER)) u_round (
    .dec(dec_q), .l_in(l_q), .r_in(r_q), .k_in(k_sel),
    .l_out(l_nx), .r_out(r_nx)
  );

  sea_key_round #(.N(N), .B(B), .ADDER(ADDER), .CW(CW)) u_key_round (
    .kl_in(kl_q), .kr_in(kr_q), .idx(const_idx),
    .kl_out(kl_nx), .kr_out(kr_nx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_q    <= '0;
      r_q    <= '0;
      kl_q   <= '0;
      kr_q   <= '0;
      dec_q  <= 1'b0;
      done_q <= 1'b0;
    end else begin
      done_q <= round_en && last;
      if (load) begin
        {l_q, r_q}   <= text_in;
        {kl_q, kr_q} <= key_in;
        dec_q        <= decrypt;
      end else if (round_en) begin
        l_q <= l_nx;
        r_q <= r_nx;
        // Swap: exchange the key halves once, in the middle round
        if (swap) begin
          kl_q <= kr_nx;
          kr_q <= kl_nx;
        end else begin
          kl_q <= kl_nx;
          kr_q <= kr_nx;
        end
      end
    end
  end

  assign done     = done_q;
  assign text_out = {r_q, l_q};

endmodule
