// tb_icepole_mu: checks the slice mu step against a generic GF(2^5) matrix
// multiplication, for unit vectors in every bit position and random slices.
module tb_icepole_mu;
  import icepole_ref_pkg::*;

  logic [19:0] s_i, s_o;
  int checks = 0, failures = 0;

  icepole_mu dut (.s_i(s_i), .s_o(s_o));

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
    exp = mu_slice(v);
    checks++;
    if (s_o !== exp) begin
      failures++;
      $display("mu mismatch in=%05h got=%05h exp=%05h", v, s_o, exp);
    end
  endtask

  initial begin
    check('0);
    for (int b = 0; b < 20; b++) check(20'(1) << b);
    for (int i = 0; i < 3000; i++) check(20'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
