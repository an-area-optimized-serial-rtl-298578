// icepole_psi: the psi step of ICEPOLE on one 20-bit slice, as four parallel
// 5-bit s-boxes, one per row x (bits [5x+4:5x]).
//
// For a row M0..M4 the output is
//     Zk = Mk ^ (~M(k+1) & M(k+2)) ^ (~M0 & ~M1 & ~M2 & ~M3 & ~M4)
//             ^ (M0 & M1 & M2 & M3 & M4),      indices mod 5.
// psi works row by row, and a slice holds four complete rows, so the
// slice-serial core applies psi to a whole slice per cycle. Purely
// combinational. The s-box equation follows ICEPOLE.
module icepole_psi
  import icepole_pkg::*;
(
  input  slice_t s_i,
  output slice_t s_o
);

  always_comb begin
    for (int x = 0; x < 4; x++) begin
      row_t m;
      logic all0, all1;
      m    = s_i[5*x +: 5];
      all0 = ~|m;
      all1 = &m;
      for (int k = 0; k < 5; k++)
        s_o[5*x + k] = m[k] ^ (~m[(k + 1) % 5] & m[(k + 2) % 5]) ^ all0 ^ all1;
    end
  end

endmodule
