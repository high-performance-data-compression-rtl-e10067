// tb_pr_controller: runs reconfiguration sessions with a reduced bitstream
// size (3002 bytes, so the last configuration word is partly filled). For
// each session it checks the cipher requested against a reference model of
// the selector (LFSR hopping, then power adaptive at three levels), serves
// an LZ4 block that decodes to a bitstream distinct per cipher, and compares
// every configuration word. It checks that the partition is decoupled during
// loading and released afterwards with rp_cipher set, and that the
// reconfiguration takes one cycle per compressed byte plus one per match byte
// (within 4 cycles) when nothing stalls.
module tb_pr_controller;
  import dsec_pkg::*;
  localparam int BYTES = 3002;
  logic clk = 0, rst_n = 0;
  sel_mode_e mode = SEL_HOPPING;
  logic [7:0] level = '0;
  logic seed_load = 0, session_req = 0, busy;
  logic [2:0] seed = 3'b110;
  logic fetch_req, bs_valid = 0, bs_ready, bs_last = 0;
  cipher_e fetch_id, rp_cipher;
  logic [7:0] bs_data = '0;
  logic icap_valid, icap_ready = 1;
  logic [31:0] icap_data, reconfig_cycles, lfsr_skips;
  logic rp_decouple, rp_loaded, reconfig_done, decomp_error;
  int checks = 0, failures = 0;

  `include "lz4_seqgen.svh"

  pr_controller #(.BITSTREAM_BYTES(BYTES)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  byte unsigned blk[3][$], plain[3][$];
  logic [2:0] m;

  task automatic session(cipher_e exp_id, bit stall);
    int idx = 0, nwords = 0, match_bytes;
    bit done_seen = 0;
    @(negedge clk); session_req = 1;
    @(negedge clk); session_req = 0;
    while (!fetch_req) @(posedge clk);
    check(fetch_id == exp_id, $sformatf("fetch id %0d exp %0d", fetch_id, exp_id));
    fork
      begin
        while (idx < blk[fetch_id].size()) begin
          @(negedge clk);
          bs_valid = stall ? ($urandom % 3 != 0) : 1'b1;
          bs_data  = blk[fetch_id][idx];
          bs_last  = (idx == blk[fetch_id].size() - 1);
          @(posedge clk);
          if (bs_valid && bs_ready) idx++;
        end
        @(negedge clk); bs_valid = 0; bs_last = 0;
      end
      begin
        while (!done_seen) begin
          @(negedge clk);
          icap_ready = stall ? ($urandom % 4 != 0) : 1'b1;
          @(posedge clk);
          if (icap_valid && icap_ready) begin
            logic [31:0] w = '0;
            for (int j = 0; j < 4; j++)
              if (4*nwords + j < BYTES) w[31-8*j -: 8] = plain[fetch_id][4*nwords + j];
            check(icap_data == w, $sformatf("word %0d: %h exp %h", nwords, icap_data, w));
            check(rp_decouple, "decoupled while loading");
            nwords++;
          end
          done_seen = reconfig_done;
        end
      end
    join
    check(nwords == (BYTES + 3) / 4, $sformatf("%0d words", nwords));
    @(negedge clk);
    check(!rp_decouple && rp_loaded && rp_cipher == exp_id, "partition released with cipher");
    check(!decomp_error, "no decoder error");
    match_bytes = BYTES;
    // literals are counted in the compressed size, so cycles ~ compressed + matches
    if (!stall) begin
      int lits = 0;
      // count literal bytes by decoding the block's structure
      int i = 0, l, ml, b;
      while (i < blk[exp_id].size()) begin
        l = int'(blk[exp_id][i]) >> 4; ml = int'(blk[exp_id][i]) & 15; i++;
        if (l == 15) do begin b = int'(blk[exp_id][i]); i++; l += b; end while (b == 255);
        i += l; lits += l;
        if (i >= blk[exp_id].size()) break;
        i += 2;
        if (ml == 15) do begin b = int'(blk[exp_id][i]); i++; end while (b == 255);
      end
      match_bytes = BYTES - lits;
      check(reconfig_cycles >= 32'(blk[exp_id].size() + match_bytes) &&
            reconfig_cycles <= 32'(blk[exp_id].size() + match_bytes + 4),
            $sformatf("cycles %0d for %0d compressed + %0d match bytes", reconfig_cycles,
                      blk[exp_id].size(), match_bytes));
    end
  endtask

  initial begin
    for (int c = 0; c < 3; c++) lz4_gen_exact(blk[c], plain[c], BYTES, 8'(c * 16));
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); seed_load = 1;
    @(negedge clk); seed_load = 0;
    m = seed;
    for (int s = 0; s < 8; s++) begin
      do m = {m[1], m[0], m[0] ^ m[2]}; while (m[1:0] == 2'b11);
      session(cipher_e'(m[1:0]), (s % 2) != 0);
    end
    mode = SEL_POWER;
    level = 8'd250; session(CIPHER_AEGIS, 0);
    level = 8'd120; session(CIPHER_DEOXYS, 1);
    level = 8'd3;   session(CIPHER_ASCON, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
