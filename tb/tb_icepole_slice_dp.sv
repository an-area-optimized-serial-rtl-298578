// tb_icepole_slice_dp: drives the slice datapath with random slices and every
// combination of its enables, and compares dout and the written-back slice
// with the reference composition kappa(psi(pi(s))), data XOR/replace, mu.
module tb_icepole_slice_dp;
  import icepole_ref_pkg::*;

  logic [19:0] s_i, din, repl, dout, s_o;
  logic round_en, kbit, data_en, mu_en;
  int checks = 0, failures = 0;

  icepole_slice_dp dut (.s_i, .round_en_i(round_en), .kbit_i(kbit), .data_en_i(data_en),
                        .replace_i(repl), .din_i(din), .mu_en_i(mu_en),
                        .dout_o(dout), .s_o(s_o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [19:0] t, d, e;
      s_i = 20'($urandom); din = 20'($urandom); repl = 20'($urandom);
      {round_en, kbit, data_en, mu_en} = 4'(i);
      #1;
      t = s_i;
      if (round_en) begin
        t = psi_slice(pi_slice(t));
        t[0] = t[0] ^ kbit;
      end
      d = t;
      if (data_en)
        for (int j = 0; j < 20; j++) d[j] = repl[j] ? din[j] : (t[j] ^ din[j]);
      e = mu_en ? mu_slice(d) : d;
      checks += 2;
      if (dout !== t) begin
        failures++;
        $display("dout mismatch %05h exp %05h", dout, t);
      end
      if (s_o !== e) begin
        failures++;
        $display("s_o mismatch %05h exp %05h (en=%b)", s_o, e, {round_en, kbit, data_en, mu_en});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
