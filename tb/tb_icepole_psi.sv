// tb_icepole_psi: checks the four parallel psi s-boxes exhaustively per row
// (all 32 row values in every row position) and on random slices.
module tb_icepole_psi;
  import icepole_ref_pkg::*;

  logic [19:0] s_i, s_o;
  int checks = 0, failures = 0;

  icepole_psi dut (.s_i(s_i), .s_o(s_o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [19:0] v);
    logic [19:0] exp;
    s_i = v;
    #1;
    exp = psi_slice(v);
    checks++;
    if (s_o !== exp) begin
      failures++;
      $display("psi mismatch in=%05h got=%05h exp=%05h", v, s_o, exp);
    end
  endtask

  initial begin
    // the s-box must be a permutation of 5-bit values
    for (int a = 0; a < 32; a++)
      for (int b = a + 1; b < 32; b++) begin
        checks++;
        if (sbox(5'(a)) == sbox(5'(b))) failures++;
      end
    for (int x = 0; x < 4; x++)
      for (int m = 0; m < 32; m++) check(20'(m) << (5 * x));
    for (int i = 0; i < 2000; i++) check(20'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
