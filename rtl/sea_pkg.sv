// sea_pkg: types and constants shared by the SEA (Scalable Encryption Algorithm)
// loop core and its modular adders.
//
// adder_e selects which modular-adder architecture every word adder of the
// cipher uses:
//   MOD_ADDER1  generic adder-based modulo-m operator (two carry-propagate
//               adders and a multiplexer), used here with m = 2^b, which is the
//               addition of the original SEA cipher;
//   MOD_ADDER2  modulo 2^b-1 adder that computes x+y and x+y+1 in parallel and
//               lets the carry-out of x+y choose;
//   MOD_ADDER3  modulo 2^b-1 adder that adds the carry-out of x+y back in
//               (end-around carry), with no multiplexer.
// The two 2^b-1 adders give the "modified SEA": only the word addition inside
// the round function changes, so the cipher remains a Feistel network and is
// still inverted by the decrypt round.
//
// sea_rounds() gives the advised round count of SEA_{n,b}:
//   n_r = 3n/4 + 2(n_b + floor(b/2)),  n_b = n/(2b),  rounded up to an odd number.
// The oddness rule is the paper's; the formula itself is the one of the
// original SEA specification, which the paper refers to but does not print.
package sea_pkg;

  typedef enum int {
    MOD_ADDER1 = 1,
    MOD_ADDER2 = 2,
    MOD_ADDER3 = 3
  } adder_e;

  function automatic int sea_rounds(input int n, input int b);
    int nb;
    int nr;
    nb = n / (2 * b);
    nr = (3 * n) / 4 + 2 * (nb + b / 2);
    if (nr % 2 == 0) nr = nr + 1;
    return nr;
  endfunction

endpackage
