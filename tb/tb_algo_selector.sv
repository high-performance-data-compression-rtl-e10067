// tb_algo_selector: runs 30 hopping sessions from a seed and compares each
// chosen cipher and its latency (3 cycles, plus 2 per skipped code 3) with a
// reference LFSR model; checks that code 3 is skipped and that all three
// ciphers occur. Then checks the power adaptive mode (1-cycle latency) at a
// low, an intermediate and a high level.
module tb_algo_selector;
  import dsec_pkg::*;
  logic clk = 0, rst_n = 0, seed_load = 0, next = 0, busy, sel_valid;
  logic [2:0] seed = 3'b101;
  logic [7:0] level = '0;
  sel_mode_e mode = SEL_HOPPING;
  cipher_e sel_id;
  logic [31:0] skip_count;
  int checks = 0, failures = 0;

  algo_selector dut (.*);

  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic request(output int lat, output cipher_e id);
    @(negedge clk); next = 1;
    @(negedge clk); next = 0;
    lat = 1;
    while (!sel_valid) begin @(negedge clk); lat++; end
    id = sel_id;
  endtask

  initial begin
    logic [2:0] m;
    int lat, exp_lat, skips;
    cipher_e id;
    static int count[3] = '{0, 0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); seed_load = 1;
    @(negedge clk); seed_load = 0;
    m = seed; skips = 0;
    for (int s = 0; s < 30; s++) begin
      exp_lat = 1;
      do begin
        m = {m[1], m[0], m[0] ^ m[2]};
        exp_lat += 2;
        if (m[1:0] == 2'b11) skips++;
      end while (m[1:0] == 2'b11);
      request(lat, id);
      check(id == cipher_e'(m[1:0]), $sformatf("session %0d id %0d exp %0d", s, id, m[1:0]));
      check(lat == exp_lat, $sformatf("session %0d latency %0d exp %0d", s, lat, exp_lat));
      count[id]++;
    end
    check(skip_count == 32'(skips) && skips > 0, "code 3 skipped");
    check(count[0] > 0 && count[1] > 0 && count[2] > 0, "all three ciphers chosen");
    mode = SEL_POWER;
    foreach (level_list[k]) begin
      level = level_list[k];
      request(lat, id);
      check(id == exp_pwr[k], $sformatf("power level %0d -> %0d", level, id));
      check(lat == 1, "power latency 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] level_list[3] = '{8'd10, 8'd100, 8'd200};
  cipher_e    exp_pwr[3]    = '{CIPHER_ASCON, CIPHER_DEOXYS, CIPHER_AEGIS};
endmodule
