// icepole_ctrl: sequencer of the slice-serial ICEPOLE core.
//
// One operation, started by start_i in idle with command cmd_i, runs
//   LOAD  : 64 slice cycles. Each slice is offered on the data port (squeeze),
//           combined with din (absorb, if cmd.absorb) and, when rounds follow,
//           passed through mu. With cmd.absorb set a cycle only advances when
//           din_valid_i is high (din_ready_o is high throughout LOAD), so the
//           data source may stall the core. Meanwhile the constant generator is
//           reloaded and stepped cmd.first_round times.
//   then for each of cmd.n_rounds rounds:
//   RHO   : 63 cycles; word j rotates in the first rho_shifts(j) of them. The
//           constant generator advances to the next round in the first cycle
//           (not in the first round).
//   SLICE : 64 slice cycles of pi, psi and kappa, plus mu unless this is the
//           last round; the constant generator shifts out one bit per cycle.
//   DONE  : one cycle with done_o high, then idle.
// Without stalls an operation has 64 + 127 * n_rounds working cycles after the
// start_i cycle and done_o is high in the cycle after them: 827 cycles from
// start to done for the six-round permutation.
// The pass structure follows the slice-serial architecture of the document;
// the command set, the handshake and the merged mu pass are this design's.
module icepole_ctrl
  import icepole_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,       // start an operation (ignored when busy)
  input  cmd_t          cmd_i,         // command, sampled with start_i
  input  logic          din_valid_i,   // data slice available
  output logic          din_ready_o,   // core consumes din in this phase
  output logic          dout_valid_o,  // dout carries a squeezed slice
  output logic          busy_o,
  output logic          done_o,        // one-cycle pulse at the end
  // state register
  output state_op_e     st_op_o,
  output logic [NW-1:0] word_en_o,
  // slice datapath
  output logic          round_en_o,
  output logic          data_en_o,
  output logic [NW-1:0] replace_o,
  output logic          mu_en_o,
  // constant generator
  output logic          k_load_o,
  output logic          k_update_o,
  output logic          k_shift_o
);

  phase_e     phase_q;
  logic [5:0] cnt_q;
  logic [3:0] round_q;
  logic [3:0] upd_q;
  cmd_t       cmd_q;
  logic       advance;

  assign busy_o      = (phase_q != PH_IDLE);
  assign done_o      = (phase_q == PH_DONE);
  assign din_ready_o = (phase_q == PH_LOAD) && cmd_q.absorb;
  assign advance     = (phase_q == PH_LOAD) && (!cmd_q.absorb || din_valid_i);
  assign dout_valid_o = advance;
  assign replace_o   = cmd_q.replace;

  always_comb begin
    st_op_o    = ST_HOLD;
    word_en_o  = '0;
    round_en_o = 1'b0;
    data_en_o  = 1'b0;
    mu_en_o    = 1'b0;
    k_load_o   = (phase_q == PH_IDLE) && start_i;
    k_update_o = 1'b0;
    k_shift_o  = 1'b0;
    unique case (phase_q)
      PH_LOAD: begin
        if (advance) st_op_o = ST_SLICE;
        data_en_o  = cmd_q.absorb;
        mu_en_o    = (cmd_q.n_rounds != 4'd0);
        k_update_o = (upd_q < cmd_q.first_round);
      end
      PH_RHO: begin
        st_op_o = ST_RHO;
        for (int j = 0; j < NW; j++)
          word_en_o[j] = (32'(cnt_q) < rho_shifts(j));
        k_update_o = (cnt_q == 6'd0) && (round_q != 4'd0);
      end
      PH_SLICE: begin
        st_op_o    = ST_SLICE;
        round_en_o = 1'b1;
        mu_en_o    = (round_q != cmd_q.n_rounds - 4'd1);
        k_shift_o  = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= PH_IDLE;
      cnt_q   <= '0;
      round_q <= '0;
      upd_q   <= '0;
      cmd_q   <= '0;
    end else begin
      unique case (phase_q)
        PH_IDLE: if (start_i) begin
          phase_q <= PH_LOAD;
          cmd_q   <= cmd_i;
          cnt_q   <= '0;
          round_q <= '0;
          upd_q   <= '0;
        end
        PH_LOAD: begin
          if (k_update_o) upd_q <= upd_q + 4'd1;
          if (advance) begin
            cnt_q <= cnt_q + 6'd1;
            if (cnt_q == 6'd63)
              phase_q <= (cmd_q.n_rounds == 4'd0) ? PH_DONE : PH_RHO;
          end
        end
        PH_RHO: begin
          cnt_q <= (cnt_q == 6'd62) ? 6'd0 : cnt_q + 6'd1;
          if (cnt_q == 6'd62) phase_q <= PH_SLICE;
        end
        PH_SLICE: begin
          cnt_q <= cnt_q + 6'd1;
          if (cnt_q == 6'd63) begin
            if (round_q == cmd_q.n_rounds - 4'd1) begin
              phase_q <= PH_DONE;
            end else begin
              phase_q <= PH_RHO;
              round_q <= round_q + 4'd1;
            end
          end
        end
        PH_DONE: phase_q <= PH_IDLE;
        default: phase_q <= PH_IDLE;
      endcase
    end
  end

  // The constant generator is never asked to update and shift at once, and
  // the state only moves while an operation runs.
  a_kappa_modes: assert property (@(posedge clk) disable iff (!rst_n)
    !(k_update_o && k_shift_o));
  a_idle_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (phase_q == PH_IDLE) |-> (st_op_o == ST_HOLD));

endmodule
