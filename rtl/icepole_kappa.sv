// icepole_kappa: round-constant generator for the bit-serial kappa step.
//
// kappa XORs a 64-bit round constant into word S[0][0]. The constants are the
// successive states of a register whose feedback is specified as the LFSR
// polynomial f(x) = 1 + x^60 + x^61 + x^63 + x^64; the published constants do
// not follow a plain 64-bit LFSR, and are reproduced here by two 32-bit shift
// registers hi and lo with a nonlinear feedback path:
//   update : hi <= {0, hi[31:1]}                       (zero input)
//            lo <= {hi[0] | fb, lo[31:1]},  fb = lo[0]^lo[1]^lo[3]^lo[4]
//            i.e. one step to the constant of the next round (right shift).
//   shift  : {hi,lo} rotates left by one and bit 63 is the serial output, so
//            the constant leaves MSB first, one bit per slice cycle; after 64
//            shifts the register is back where it started.
//   load   : restart from INIT (constant of round 0).
// load has priority over update, update over shift. The two registers, the
// zero input, the nonlinear feedback, the right-shift update and the 64-cycle
// left-shift output follow the document; the exact OR form of the feedback
// and the INIT value are this design's reading of the published constants.
// Timing: bit_o is the MSB of the current register, valid in the same cycle.
module icepole_kappa
  import icepole_pkg::*;
#(
  parameter logic [63:0] INIT = KAPPA_INIT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load_i,    // reload the round-0 constant
  input  logic        update_i,  // advance to the next round constant
  input  logic        shift_i,   // rotate left one bit (serial output)
  output logic        bit_o,     // current serial constant bit (bit 63)
  output logic [63:0] value_o    // whole register, {hi, lo}
);

  logic [31:0] hi, lo;
  logic        fb;

  assign fb      = lo[0] ^ lo[1] ^ lo[3] ^ lo[4];
  assign bit_o   = hi[31];
  assign value_o = {hi, lo};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi <= INIT[63:32];
      lo <= INIT[31:0];
    end else if (load_i) begin
      hi <= INIT[63:32];
      lo <= INIT[31:0];
    end else if (update_i) begin
      hi <= {1'b0, hi[31:1]};
      lo <= {hi[0] | fb, lo[31:1]};
    end else if (shift_i) begin
      hi <= {hi[30:0], lo[31]};
      lo <= {lo[30:0], hi[31]};
    end
  end

endmodule
