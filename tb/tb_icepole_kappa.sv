// tb_icepole_kappa: checks the round-constant generator. After load the
// register must hold the round-0 constant; each update must give the next
// constant of the 64-bit reference sequence; 64 shifts must emit the constant
// MSB first and return the register to the same value; load must restart.
module tb_icepole_kappa;
  import icepole_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load, update, shift, bit_o;
  logic [63:0] value;
  int checks = 0, failures = 0;

  icepole_kappa dut (.clk, .rst_n, .load_i(load), .update_i(update),
                     .shift_i(shift), .bit_o(bit_o), .value_o(value));

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
      $display("FAIL %s value=%016h", what, value);
    end
  endtask

  initial begin
    word_t c;
    load = 0; update = 0; shift = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(value == REF_C0, "reset value");
    for (int r = 0; r < 16; r++) begin
      c = round_const(r);
      chk(value == c, $sformatf("constant %0d", r));
      // serial output, MSB first, 64 cycles
      for (int i = 0; i < 64; i++) begin
        chk(bit_o == c[63 - i], $sformatf("round %0d bit %0d", r, 63 - i));
        shift = 1;
        @(negedge clk);
      end
      shift = 0;
      chk(value == c, "same state after 64 shifts");
      update = 1;
      @(negedge clk);
      update = 0;
    end
    load = 1; update = 1;
    @(negedge clk);
    load = 0; update = 0;
    chk(value == REF_C0, "load restarts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
