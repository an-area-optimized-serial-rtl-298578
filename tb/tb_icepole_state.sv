// tb_icepole_state: checks the shift-enable state register against an array
// model: slice writes and reads (head order z = 63 first), per-word rotation
// with random enables, hold, and the reset value.
module tb_icepole_state;
  import icepole_pkg::*;
  import icepole_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  state_op_e op;
  logic [19:0] en, sin, head;
  words_t model, snap;
  int checks = 0, failures = 0;

  icepole_state dut (.clk, .rst_n, .op_i(op), .word_en_i(en), .slice_i(sin), .head_o(head));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  // one cycle of the model, applied at the same clock edge as the DUT
  task automatic step(state_op_e o, logic [19:0] e, logic [19:0] s);
    op = o; en = e; sin = s;
    @(negedge clk);
    for (int j = 0; j < 20; j++) begin
      if (o == ST_SLICE) model[j] = {model[j][62:0], s[j]};
      else if (o == ST_RHO && e[j]) model[j] = {model[j][62:0], model[j][63]};
    end
  endtask

  function automatic logic [19:0] model_head();
    logic [19:0] h;
    for (int j = 0; j < 20; j++) h[j] = model[j][63];
    return h;
  endfunction

  initial begin
    op = ST_HOLD; en = '0; sin = '0;
    for (int j = 0; j < 20; j++) model[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(head == 20'd0, "reset head");
    for (int t = 0; t < 3000; t++) begin
      int kind;
      kind = $urandom_range(0, 9);
      if (kind < 5)      step(ST_SLICE, '0, 20'($urandom));
      else if (kind < 9) step(ST_RHO, 20'($urandom), 20'($urandom));
      else               step(ST_HOLD, 20'($urandom), 20'($urandom));
      chk(head == model_head(), $sformatf("head at step %0d", t));
    end
    // read the full state out slice by slice and compare every word; writing
    // each slice back must leave the state unchanged after 64 cycles
    snap = model;
    for (int z = 63; z >= 0; z--) begin
      chk(head == get_slice(snap, z), $sformatf("read-out slice %0d", z));
      step(ST_SLICE, '0, head);
    end
    for (int j = 0; j < 20; j++) chk(model[j] == snap[j], "state after full pass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
