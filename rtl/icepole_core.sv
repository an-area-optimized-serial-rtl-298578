// icepole_core: area-optimised slice-serial ICEPOLE permutation core with a
// 20-bit slice data port.
//
// The 1280-bit state lives in 20 shift-enable registers of 64 bits
// (icepole_state). A single slice datapath (icepole_slice_dp: pi, psi, kappa,
// data port, mu) processes one 20-bit slice per cycle; rho is done by
// rotating each word register by its own offset (icepole_state, word enables
// from icepole_ctrl); the round constant enters bit-serially from
// icepole_kappa. icepole_ctrl sequences one LOAD pass (squeeze/absorb and the
// first mu), then per round a 63-cycle RHO pass and a 64-cycle SLICE pass.
//
// Interface. In idle, start_i with cmd_i starts an operation:
//   cmd.absorb      combine din into the state during LOAD (din_valid/ready
//                   handshake, the core stalls while din_valid_i is low)
//   cmd.replace     per word, overwrite instead of XOR (decryption, loading)
//   cmd.n_rounds    rounds of the permutation after LOAD (6 or 12 in ICEPOLE)
//   cmd.first_round index of the first round constant
// dout_o/dout_valid_o give the state slices during LOAD, before din is
// combined. Slices run from z = 63 down to z = 0, one per accepted cycle; bit
// 5*x+y of a slice is word S[x][y]. done_o pulses when the operation ends.
// Timing: without stalls, 64 + 127 * n_rounds working cycles follow the
// start_i cycle and done_o is high in the next one (827 cycles for six rounds).
// Host-side reordering of message words into slices, and the ICEPOLE mode
// itself (key/nonce initialisation, padding, frame bits, tag), are outside
// this core.
module icepole_core
  import icepole_pkg::*;
#(
  parameter logic [63:0] KAPPA_START = KAPPA_INIT
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start_i,
  input  cmd_t   cmd_i,
  output logic   busy_o,
  output logic   done_o,
  input  slice_t din_i,
  input  logic   din_valid_i,
  output logic   din_ready_o,
  output slice_t dout_o,
  output logic   dout_valid_o
);

  state_op_e     st_op;
  logic [NW-1:0] word_en, replace;
  logic          round_en, data_en, mu_en;
  logic          k_load, k_update, k_shift, kbit;
  slice_t        head, next_slice;

  icepole_ctrl u_ctrl (
    .clk, .rst_n, .start_i, .cmd_i, .din_valid_i, .din_ready_o, .dout_valid_o,
    .busy_o, .done_o,
    .st_op_o(st_op), .word_en_o(word_en),
    .round_en_o(round_en), .data_en_o(data_en), .replace_o(replace), .mu_en_o(mu_en),
    .k_load_o(k_load), .k_update_o(k_update), .k_shift_o(k_shift)
  );

  icepole_state u_state (
    .clk, .rst_n, .op_i(st_op), .word_en_i(word_en),
    .slice_i(next_slice), .head_o(head)
  );

  icepole_kappa #(.INIT(KAPPA_START)) u_kappa (
    .clk, .rst_n, .load_i(k_load), .update_i(k_update), .shift_i(k_shift),
    .bit_o(kbit), .value_o()
  );

  icepole_slice_dp u_dp (
    .s_i(head), .round_en_i(round_en), .kbit_i(kbit), .data_en_i(data_en),
    .replace_i(replace), .din_i(din_i), .mu_en_i(mu_en),
    .dout_o(dout_o), .s_o(next_slice)
  );

endmodule
