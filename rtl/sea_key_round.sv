// sea_key_round: one SEA key-schedule round F_K.
//
//   KR' = KL ^ R(r(S(KR [+] C(i)))),   KL' = KR
// C(i) is the n_b-word constant whose words are all zero except word 0 (the
// least significant), which holds i. If i does not fit in B bits only its low
// B bits are used (an assumption: SEA's advised round counts never need it for
// b >= 8). The modular addition uses the same adder architecture as the
// cipher round. Purely combinational; the key registers are in sea_top.
module sea_key_round
  import sea_pkg::*;
#(
  parameter int unsigned N     = 96,
  parameter int unsigned B     = 8,
  parameter adder_e      ADDER = MOD_ADDER1,
  parameter int unsigned CW    = 7
) (
  input  logic [N/2-1:0] kl_in,
  input  logic [N/2-1:0] kr_in,
  input  logic [CW-1:0]  idx,
  output logic [N/2-1:0] kl_out,
  output logic [N/2-1:0] kr_out
);

  localparam int unsigned NB = N / (2 * B);

  logic [N/2-1:0] c_vec, sum, sub, rot_b, rot_w;

  // C(i): i in word 0, zero elsewhere (i is reduced modulo 2^B if wider)
  always_comb begin
    c_vec = '0;
    for (int j = 0; j < B && j < CW; j++) c_vec[j] = idx[j];
  end

  sea_mod_add_vec #(.NB(NB), .B(B), .ADDER(ADDER)) u_add  (.x(kr_in), .y(c_vec), .z(sum));
  sea_sbox        #(.NB(NB), .B(B))                u_sbox (.x(sum), .y(sub));
  sea_bit_rot     #(.NB(NB), .B(B))                u_brot (.x(sub), .y(rot_b));
  sea_word_rot    #(.NB(NB), .B(B), .LEFT(1'b1))   u_wrot (.x(rot_b), .y(rot_w));

  assign kr_out = kl_in ^ rot_w;
  assign kl_out = kr_in;

endmodule
