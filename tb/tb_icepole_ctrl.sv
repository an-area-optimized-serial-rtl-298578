// tb_icepole_ctrl: runs the sequencer alone through several commands and
// counts, cycle by cycle, what it asks of the other blocks: slice cycles,
// per-word rotations of the rho pass (against 64 - r(x,y)), constant-generator
// updates and shifts, mu enables, data-port handshakes with random stalls, and
// the start-to-done latency: done_o rises after 64 + stalls + 127 * rounds
// working cycles.
module tb_icepole_ctrl;
  import icepole_pkg::*;
  import icepole_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start, din_valid, din_ready, dout_valid, busy, done;
  cmd_t cmd;
  state_op_e st_op;
  logic [19:0] word_en, replace;
  logic round_en, data_en, mu_en, k_load, k_update, k_shift;
  int checks = 0, failures = 0;

  icepole_ctrl dut (.clk, .rst_n, .start_i(start), .cmd_i(cmd), .din_valid_i(din_valid),
    .din_ready_o(din_ready), .dout_valid_o(dout_valid), .busy_o(busy), .done_o(done),
    .st_op_o(st_op), .word_en_o(word_en), .round_en_o(round_en), .data_en_o(data_en),
    .replace_o(replace), .mu_en_o(mu_en), .k_load_o(k_load), .k_update_o(k_update),
    .k_shift_o(k_shift));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(logic absorb, int n, int first, int stall_pct);
    int cycles = 0, stalls = 0, load_slices = 0, slice_cycles = 0, rho_cycles = 0;
    int updates = 0, shifts = 0, mu_slices = 0, dv = 0;
    int rot [20];
    logic [19:0] repl;
    for (int j = 0; j < 20; j++) rot[j] = 0;
    repl = 20'($urandom);
    @(negedge clk);
    cmd = '{absorb: absorb, replace: repl, n_rounds: 4'(n), first_round: 4'(first)};
    start = 1;
    @(posedge clk);
    #1;
    chk(k_load == 0, "load only in the start cycle");
    @(negedge clk);
    start = 0;
    while (!done) begin
      din_valid = ($urandom_range(0, 99) >= stall_pct);
      #1;
      cycles++;
      chk(replace == repl, "replace mask held");
      if (din_ready && !din_valid) stalls++;
      if (din_ready != (absorb && st_op != ST_RHO && !round_en && cycles <= 64 + stalls))
        chk(0, $sformatf("din_ready at cycle %0d", cycles));
      if (dout_valid) dv++;
      if (st_op == ST_SLICE && !round_en) begin
        load_slices++;
        chk(data_en == absorb, "data_en in load pass");
        chk(mu_en == (n != 0), "mu in load pass");
      end
      if (st_op == ST_SLICE && round_en) begin
        slice_cycles++;
        if (mu_en) mu_slices++;
      end
      if (st_op == ST_RHO) begin
        rho_cycles++;
        for (int j = 0; j < 20; j++) if (word_en[j]) rot[j]++;
      end
      if (k_update) updates++;
      if (k_shift) begin
        shifts++;
        chk(st_op == ST_SLICE && round_en, "constant shifts with slice pass");
      end
      @(negedge clk);
    end
    chk(!busy || done, "busy until done");
    chk(load_slices == 64, $sformatf("load slices %0d", load_slices));
    chk(dv == 64, "dout_valid per accepted slice");
    chk(slice_cycles == 64 * n, "slice pass cycles");
    chk(rho_cycles == 63 * n, "rho pass cycles");
    chk(mu_slices == 64 * (n > 0 ? n - 1 : 0), "mu in all but the last round");
    chk(shifts == 64 * n, "constant shifts");
    chk(updates == first + (n > 0 ? n - 1 : 0), $sformatf("constant updates %0d", updates));
    for (int j = 0; j < 20; j++)
      chk(rot[j] == n * ((64 - REF_R[j]) % 64), $sformatf("word %0d rotations %0d", j, rot[j]));
    chk(cycles == 64 + stalls + 127 * n,
        $sformatf("latency %0d (stalls %0d, rounds %0d)", cycles, stalls, n));
    if (absorb && stall_pct > 0) chk(stalls > 0, "a stall happened");
    @(negedge clk);
    chk(!busy, "idle after done");
  endtask

  initial begin
    start = 0; din_valid = 0; cmd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(1, 2, 3, 30);
    run(0, 0, 0, 0);
    run(1, 1, 0, 0);
    run(0, 6, 6, 50);
    run(1, 12, 0, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
