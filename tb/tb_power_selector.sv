// tb_power_selector: sweeps every 8-bit power reading and checks the class
// and the cipher (high: AEGIS, intermediate: Deoxys-II, low: ASCON) against
// the thresholds 85 and 170.
module tb_power_selector;
  import dsec_pkg::*;
  logic [7:0] level;
  pwr_class_e cls;
  cipher_e    cipher;
  int checks = 0, failures = 0;

  power_selector dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cipher_e exp;
    for (int l = 0; l < 256; l++) begin
      level = 8'(l);
      #1;
      exp = (l >= 170) ? CIPHER_AEGIS : (l >= 85) ? CIPHER_DEOXYS : CIPHER_ASCON;
      checks++;
      if (cipher != exp) begin
        failures++;
        $display("FAIL: level %0d cipher %0d exp %0d", l, cipher, exp);
      end
      checks++;
      if (cls != ((l >= 170) ? PWR_HIGH : (l >= 85) ? PWR_MID : PWR_LOW)) begin
        failures++;
        $display("FAIL: level %0d class %0d", l, cls);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
