// icepole_mu: the mu step of ICEPOLE applied to one 20-bit slice.
//
// The slice is read as four elements Z0..Z3 of GF(2^5) (row x = bits
// [5x+4:5x], bit y = coefficient of X^y) and multiplied by the fixed matrix
//     | 2  1  1  1 |
//     | 1  1 18  2 |
//     | 1  2  1 18 |
//     | 1 18  2  1 |
// modulo X^5 + X^2 + 1. Multiplication by constants needs only XORs, so the
// block is purely combinational with no latency; the slice-serial core uses
// one instance and runs one slice through it per clock cycle.
// The matrix and the polynomial follow ICEPOLE; the bit order of a row is
// this design's convention (see icepole_pkg).
module icepole_mu
  import icepole_pkg::*;
(
  input  slice_t s_i,   // slice before mu
  output slice_t s_o    // slice after mu
);

  row_t z0, z1, z2, z3;

  always_comb begin
    z0 = s_i[4:0];
    z1 = s_i[9:5];
    z2 = s_i[14:10];
    z3 = s_i[19:15];
    s_o[4:0]   = gf_x2(z0) ^ z1 ^ z2 ^ z3;
    s_o[9:5]   = z0 ^ z1 ^ gf_x18(z2) ^ gf_x2(z3);
    s_o[14:10] = z0 ^ gf_x2(z1) ^ z2 ^ gf_x18(z3);
    s_o[19:15] = z0 ^ gf_x18(z1) ^ gf_x2(z2) ^ z3;
  end

endmodule
