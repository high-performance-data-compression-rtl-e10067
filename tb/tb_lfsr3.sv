// tb_lfsr3: checks the three-bit LFSR against a reference model of the
// shift chain Q0->Q1->Q2 with Q0 XOR Q2 fed back, for every seed: the next
// state, the period of 7 and that no non-zero state is missed. Also checks
// that a zero seed is replaced by 3'b001 and that en low holds the state.
module tb_lfsr3;
  logic clk = 0, rst_n = 0, seed_load = 0, en = 0;
  logic [2:0] seed = '0, q;
  int checks = 0, failures = 0;

  lfsr3 dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2:0] ref_next(logic [2:0] s);
    return {s[1], s[0], s[0] ^ s[2]};
  endfunction

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [2:0] exp;
    logic [7:0] seen;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(q == 3'b001, "reset state");
    for (int s = 0; s < 8; s++) begin
      seed = 3'(s); seed_load = 1;
      @(negedge clk); seed_load = 0;
      exp = (s == 0) ? 3'b001 : 3'(s);
      check(q == exp, $sformatf("seed %0d loaded as %0d", s, q));
      seen = '0;
      en = 1;
      for (int k = 0; k < 7; k++) begin
        seen[q] = 1'b1;
        exp = ref_next(q);
        @(negedge clk);
        check(q == exp, $sformatf("step from seed %0d: got %0d exp %0d", s, q, exp));
      end
      check(q == ((s == 0) ? 3'b001 : 3'(s)), "period 7");
      check(seen == 8'hFE, "all seven non-zero states visited");
      en = 0;
      exp = q;
      repeat (3) @(negedge clk);
      check(q == exp, "hold when en is low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
