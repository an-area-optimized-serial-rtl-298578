// icepole_state: the 1280-bit ICEPOLE state as 20 shift-enable registers of
// 64 bits, one per word S[x][y] (register j = 5*x + y).
//
// Slice z of the state is kept at bit z of every register. All registers shift
// towards their MSB, so bit 63 of each is the head: head_o is the slice that is
// processed now, and the new slice enters at bit 0.
//   op_i = ST_SLICE : every register shifts left by one, bit 0 <= slice_i[j].
//                     After 64 such cycles slice z is back at bit z.
//   op_i = ST_RHO   : register j rotates left by one where word_en_i[j] is set
//                     (k rotations give S'[z] = S[z-k]); this is the rho step.
//   op_i = ST_HOLD  : nothing changes.
// The 20 x 64 shift-enable register organisation follows the document; the
// shift direction and the reset to an all-zero state are this design's choice.
module icepole_state
  import icepole_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  state_op_e     op_i,       // ST_HOLD / ST_SLICE / ST_RHO
  input  logic [NW-1:0] word_en_i,  // per-word rotate enable in ST_RHO
  input  slice_t        slice_i,    // new slice, written at bit 0 in ST_SLICE
  output slice_t        head_o      // current slice (bit 63 of every word)
);

  logic [WL-1:0] word_q [NW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NW; j++) word_q[j] <= '0;
    end else begin
      for (int j = 0; j < NW; j++) begin
        if (op_i == ST_SLICE)
          word_q[j] <= {word_q[j][WL-2:0], slice_i[j]};
        else if (op_i == ST_RHO && word_en_i[j])
          word_q[j] <= {word_q[j][WL-2:0], word_q[j][WL-1]};
      end
    end
  end

  always_comb
    for (int j = 0; j < NW; j++) head_o[j] = word_q[j][WL-1];

endmodule
