// tb_icepole_core: end-to-end test of the slice-serial ICEPOLE core at its
// default parameters, against the word-level reference permutation.
//
// Sequence: load a random state (replace all words, no rounds), absorb a
// block with a random replace mask and run the six-round permutation starting
// at constant 6 with a stalling data source, squeeze and compare, run the
// twelve-round permutation without data, squeeze and compare, and run one
// duplex block (squeeze and absorb in the same pass) followed by six rounds.
// Each operation's start-to-done cycle count is checked against
// 64 + stalls + 127 * rounds. Mechanisms counted: load-pass stalls, replaced
// words, XORed words, squeeze passes, 6- and 12-round permutations.
module tb_icepole_core;
  import icepole_pkg::*;
  import icepole_ref_pkg::*;

  logic   clk = 0, rst_n = 0;
  logic   start, busy, done, din_valid, din_ready, dout_valid;
  cmd_t   cmd;
  slice_t din, dout;
  int     checks = 0, failures = 0;
  int     n_stall = 0, n_replace = 0, n_xor = 0, n_squeeze = 0, n_p6 = 0, n_p12 = 0;
  words_t model, got, data;

  icepole_core dut (.clk, .rst_n, .start_i(start), .cmd_i(cmd), .busy_o(busy), .done_o(done),
    .din_i(din), .din_valid_i(din_valid), .din_ready_o(din_ready),
    .dout_o(dout), .dout_valid_o(dout_valid));

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

  // Run one operation. Data slices are taken from 'data' (z = 63 first), the
  // squeezed slices are collected into 'got'.
  task automatic run(logic absorb, logic [19:0] repl, int n, int first, int stall_pct);
    int cycles = 0, stalls = 0, z = 63;
    @(negedge clk);
    cmd = '{absorb: absorb, replace: repl, n_rounds: 4'(n), first_round: 4'(first)};
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      din_valid = ($urandom_range(0, 99) >= stall_pct);
      din = din_valid ? get_slice(data, z) : 20'($urandom);
      #1;
      cycles++;
      if (din_ready && !din_valid) stalls++;
      if (dout_valid) begin
        got = put_slice(got, z, dout);
        z--;
      end
      @(negedge clk);
    end
    chk(z == -1, "64 slices through the data port");
    chk(cycles == 64 + stalls + 127 * n,
        $sformatf("latency %0d, expected %0d", cycles, 64 + stalls + 127 * n));
    n_stall += stalls;
    n_squeeze++;
    if (n == 6) n_p6++;
    if (n == 12) n_p12++;
    if (absorb) begin
      n_replace += $countones(repl);
      n_xor += 20 - $countones(repl);
    end
  endtask

  function automatic words_t combine(words_t s, words_t d, logic [19:0] repl);
    words_t o;
    for (int j = 0; j < 20; j++) o[j] = repl[j] ? d[j] : (s[j] ^ d[j]);
    return o;
  endfunction

  task automatic rand_data();
    for (int j = 0; j < 20; j++) data[j] = {$urandom, $urandom};
  endtask

  task automatic compare(words_t exp, string what);
    for (int j = 0; j < 20; j++)
      chk(got[j] == exp[j], $sformatf("%s word %0d got %016h exp %016h", what, j, got[j], exp[j]));
  endtask

  initial begin
    logic [19:0] repl;
    start = 0; din_valid = 0; din = '0; cmd = '0;
    for (int j = 0; j < 20; j++) model[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. load a random state; the squeezed slices show the reset state
    rand_data();
    run(1, '1, 0, 0, 20);
    compare(model, "reset state");
    model = data;

    // 2. absorb with a mixed replace mask, then P6 from constant 6
    rand_data();
    repl = 20'($urandom) & 20'hFFFF0;
    run(1, repl, 6, 6, 25);
    compare(model, "squeeze before absorb");
    model = perm(combine(model, data, repl), 6, 6);

    // 3. squeeze only
    run(0, '0, 0, 0, 0);
    compare(model, "after P6");

    // 4. twelve rounds without data, then squeeze
    run(0, '0, 12, 0, 0);
    model = perm(model, 0, 12);
    run(0, '0, 0, 0, 0);
    compare(model, "after P12");

    // 5. duplex block: squeeze and XOR-absorb in one pass, then P6
    rand_data();
    run(1, '0, 6, 6, 0);
    compare(model, "duplex squeeze");
    model = perm(combine(model, data, '0), 6, 6);
    run(0, '0, 0, 0, 0);
    compare(model, "after duplex P6");

    chk(n_stall > 0, "stall happened");
    chk(n_replace > 0, "replace happened");
    chk(n_xor > 0, "xor absorb happened");
    chk(n_squeeze > 0, "squeeze happened");
    chk(n_p6 > 0, "P6 happened");
    chk(n_p12 > 0, "P12 happened");
    $display("mechanisms: stalls=%0d replaced_words=%0d xor_words=%0d squeezes=%0d p6=%0d p12=%0d",
             n_stall, n_replace, n_xor, n_squeeze, n_p6, n_p12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
