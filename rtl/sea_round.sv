// sea_round: one SEA cipher round, encrypt (F_E) or decrypt (F_D).
//
// With f(R, K) = r(S(R [+] K)) (word-wise modular addition, S-box layer, bit
// rotation):
//   encrypt: R' = R(L) ^ f(R, K),       L' = R
//   decrypt: R' = R^-1(L ^ f(R, K)),    L' = R
// The two rounds differ only in where the word rotation sits: before the XOR
// (R) when encrypting, after it (R^-1) when decrypting. Both wirings are
// built and dec selects one at run time; the paper describes encryption
// and decryption as two variants of the same loop, and merging them behind a
// multiplexer is this design's choice.
//
// Halves are n/2 = NB*B bits, word i in bits [B*i +: B]. Purely combinational;
// the loop registers are in sea_top.
module sea_round
  import sea_pkg::*;
#(
  parameter int unsigned N     = 96,
  parameter int unsigned B     = 8,
  parameter adder_e      ADDER = MOD_ADDER1
) (
  input  logic           dec,
  input  logic [N/2-1:0] l_in,
  input  logic [N/2-1:0] r_in,
  input  logic [N/2-1:0] k_in,
  output logic [N/2-1:0] l_out,
  output logic [N/2-1:0] r_out
);

  localparam int unsigned NB = N / (2 * B);

  logic [N/2-1:0] sum, sub, f;     // R [+] K, S(.), r(S(.))
  logic [N/2-1:0] l_rot;           // R(L)
  logic [N/2-1:0] dec_x, dec_rot;  // L ^ f, R^-1(L ^ f)

  sea_mod_add_vec #(.NB(NB), .B(B), .ADDER(ADDER)) u_add (.x(r_in), .y(k_in), .z(sum));
  sea_sbox        #(.NB(NB), .B(B))                u_sbox (.x(sum), .y(sub));
  sea_bit_rot     #(.NB(NB), .B(B))                u_brot (.x(sub), .y(f));
  sea_word_rot    #(.NB(NB), .B(B), .LEFT(1'b1))   u_wrot (.x(l_in), .y(l_rot));
  sea_word_rot    #(.NB(NB), .B(B), .LEFT(1'b0))   u_wrot_inv (.x(dec_x), .y(dec_rot));

  assign dec_x = l_in ^ f;
  assign r_out = dec ? dec_rot : (l_rot ^ f);
  assign l_out = r_in;

endmodule
