// icepole_slice_dp: everything the slice-serial core does to one slice in one
// clock cycle.
//
// The slice read from the head of the state register passes three optional
// stages, each with its own enable:
//   1. round_en : pi (word permutation, wiring only), then psi (four s-boxes),
//                 then kappa: the current round-constant bit is XORed into
//                 word S[0][0]. This finishes a round whose rho is done.
//   2. data_en  : the data port. dout_o shows the slice as it stands here (the
//                 squeeze value); din_i is XORed into the words whose
//                 replace_i bit is 0 and overwrites the words whose bit is 1.
//   3. mu_en    : mu, the first step of the next round.
// Running stage 3 right after stage 1 lets one pass over the 64 slices close
// round i and open round i+1, so a round costs one slice pass plus one rho
// pass. Purely combinational.
// pi, psi, kappa and mu and the bit-serial kappa follow the document; merging
// the steps into one pass and the data port with its replace mask are this
// design's choices.
module icepole_slice_dp
  import icepole_pkg::*;
(
  input  slice_t        s_i,        // slice from the state head
  input  logic          round_en_i, // apply pi, psi, kappa
  input  logic          kbit_i,     // round-constant bit of this slice
  input  logic          data_en_i,  // combine din into the slice
  input  logic [NW-1:0] replace_i,  // per word: overwrite instead of XOR
  input  slice_t        din_i,      // input data slice
  input  logic          mu_en_i,    // apply mu
  output slice_t        dout_o,     // slice before data combination
  output slice_t        s_o         // slice written back to the state
);

  slice_t pi_s, psi_s, round_s, data_s, mu_s;

  icepole_psi u_psi (.s_i(pi_s),   .s_o(psi_s));
  icepole_mu  u_mu  (.s_i(data_s), .s_o(mu_s));

  assign pi_s = pi_slice(s_i);

  always_comb begin
    round_s = psi_s;
    round_s[widx(0, 0)] = psi_s[widx(0, 0)] ^ kbit_i;
    if (!round_en_i) round_s = s_i;
  end

  assign dout_o = round_s;
  assign data_s = data_en_i ? ((round_s & ~replace_i) ^ din_i) : round_s;
  assign s_o    = mu_en_i ? mu_s : data_s;

endmodule
