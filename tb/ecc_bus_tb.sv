// ecc_bus_tb -- drives a different random value into each bus input and
// checks that every select code 0..9 passes its own unit and that the
// unused codes give zero.
module ecc_bus_tb;
  import ecc_pkg::*;

  bus_sel_e sel;
  gf_t ext_r, b_r, z1_r, z2_r, x1_r, x2_r, mult_r, alu_r, x_r, y_r, bus;
  gf_t src [10];
  int checks = 0, failures = 0;

  ecc_bus dut (.*);

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 5; r++) begin
      for (int s = 0; s < 10; s++)
        for (int i = 0; i < 8; i++) src[s][i*32 +: 32] = $urandom;
      ext_r = src[0]; b_r = src[1]; z1_r = src[2]; z2_r = src[3]; x1_r = src[4];
      x2_r = src[5]; mult_r = src[6]; alu_r = src[7]; x_r = src[8]; y_r = src[9];
      for (int s = 0; s < 16; s++) begin
        sel = bus_sel_e'(s);
        #1;
        checks++;
        if (bus !== (s < 10 ? src[s] : '0)) begin failures++; $display("FAIL sel %0d", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
