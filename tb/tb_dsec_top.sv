// tb_dsec_top: end-to-end run of the whole static design at its default
// sizes (724,760-byte partial bitstreams, 64 KiB compression blocks).
//  1. Start-up: three synthetic partial bitstreams (101-word frames, mostly
//     empty, with a cipher-dependent share of filled frames) are compressed by
//     the design's LZ4 compressor, 64 KiB block by block; the ratios are
//     printed.
//  2. Sessions: the LFSR is seeded once; each session the design picks a
//     cipher (checked against a reference model), the testbench serves the
//     compressed blocks of that cipher, and every configuration word must
//     equal the original bitstream. While the partition is decoupled the
//     testbench already queues PDI words; they must wait, and the PDI FIFO
//     must fill up. After loading, the behavioural toy core stands in for the
//     cipher: a key is loaded, a message encrypted and decrypted through the
//     FIFOs, and a tampered tag must give a failure status.
//  3. Then the mode switches to power adaptive and three levels are run.
// Every mechanism is counted and must occur at least once.
module tb_dsec_top;
  import dsec_pkg::*;
  localparam int BYTES = 724760;
  localparam int BLK   = 65536;

  logic pl_clk = 0, ps_clk = 0, rst_n = 0;
  sel_mode_e mode = SEL_HOPPING;
  logic [7:0] level = '0;
  logic seed_load = 0, session_req = 0, pr_busy;
  logic [2:0] seed = 3'b011;
  logic fetch_req, bs_valid = 0, bs_ready, bs_last = 0;
  cipher_e fetch_id, rp_cipher;
  logic [7:0] bs_data = '0;
  logic icap_valid, icap_ready = 1;
  logic [31:0] icap_data, reconfig_cycles, lfsr_skips;
  logic rp_decouple, rp_loaded, reconfig_done, decomp_error;
  logic pdi_w_valid = 0, pdi_w_ready, sdi_w_valid = 0, sdi_w_ready, do_r_valid, do_r_ready = 0;
  logic [31:0] pdi_w_data = '0, sdi_w_data = '0, do_r_data;
  logic [127:0] core_key, core_bdi, core_bdo;
  logic core_key_valid, core_key_ready, core_bdi_eot, core_bdi_eoi, core_bdi_pad;
  logic core_bdi_valid, core_bdi_ready, core_decrypt, core_bdo_valid, core_bdo_ready;
  logic core_msg_auth_valid, core_msg_auth, msg_overflow;
  logic [4:0] core_bdi_size, core_bdo_size;
  seg_e core_bdi_type, core_bdo_type;
  logic cmp_in_valid = 0, cmp_in_ready, cmp_in_last = 0, cmp_out_valid, cmp_out_ready = 0;
  logic [7:0] cmp_in_data = '0, cmp_out_data;
  logic cmp_out_last, cmp_done;
  logic [31:0] cmp_bytes;
  int checks = 0, failures = 0;

  `include "aead_stim.svh"

  dsec_top dut (.*);

  // the partition: a fresh toy core after every reconfiguration
  toy_cipher_core core (
    .clk(pl_clk), .rst_n(rst_n && rp_loaded && !rp_decouple),
    .key(core_key), .key_valid(core_key_valid), .key_ready(core_key_ready),
    .bdi(core_bdi), .bdi_size(core_bdi_size), .bdi_type(core_bdi_type), .bdi_eot(core_bdi_eot),
    .bdi_valid(core_bdi_valid), .bdi_ready(core_bdi_ready), .decrypt(core_decrypt),
    .bdo(core_bdo), .bdo_size(core_bdo_size), .bdo_type(core_bdo_type),
    .bdo_valid(core_bdo_valid), .bdo_ready(core_bdo_ready),
    .msg_auth_valid(core_msg_auth_valid), .msg_auth(core_msg_auth)
  );

  always #5 pl_clk = ~pl_clk;
  always #4 ps_clk = ~ps_clk;

  initial begin
    #150ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // mechanism counters
  int n_hop = 0, n_power = 0, n_mode_switch = 0, n_lfsr_skip = 0, n_decouple_hold = 0;
  int n_fifo_full = 0, n_auth_fail = 0, n_cmp_blocks = 0, n_cmp_split = 0, n_lz4_copy = 0;
  int n_cipher[3] = '{0, 0, 0};

  always @(posedge pl_clk) if (dut.u_pr.u_lz4d.state == 3'd6 && dut.u_pr.u_lz4d.out_ready) n_lz4_copy++;
  always @(posedge ps_clk) if (pdi_w_valid && !pdi_w_ready) n_fifo_full++;
  // words waiting in the PDI FIFO when the partition comes back
  always @(posedge pl_clk) if (reconfig_done && dut.u_pdi_fifo.r_valid) n_decouple_hold++;
  // nothing may reach the core while it is being reconfigured
  always @(posedge pl_clk) if (rp_decouple && (core_bdi_valid || core_key_valid || core_bdo_ready)) begin
    checks++; failures++; $display("FAIL: core handshake while decoupled");
  end

  byte unsigned orig[3][$], comp[3][$];
  int blk_end[3][$];

  // synthetic partial bitstream: 101-word frames; filled frames carry random
  // configuration words, the rest are zero (cipher-dependent fill share)
  function automatic void gen_bitstream(int c, ref byte unsigned q[$]);
    int fill = (c == 0) ? 45 : (c == 2) ? 18 : 8;  // percent of filled frames
    q.delete();
    while (q.size() < BYTES) begin
      bit filled = ($urandom % 100) < fill;
      for (int k = 0; k < 404 && q.size() < BYTES; k++)
        q.push_back(filled && ($urandom % 3 == 0) ? 8'($urandom) : 8'h00);
    end
  endfunction

  task automatic compress_all(int c);
    int idx = 0;
    comp[c].delete(); blk_end[c].delete();
    while (idx < BYTES) begin
      int start = idx;
      bit got_last = 0;
      fork
        begin
          while (idx < BYTES && idx - start < BLK) begin
            @(negedge ps_clk);
            cmp_in_valid = 1; cmp_in_data = orig[c][idx];
            cmp_in_last = (idx == BYTES - 1);
            @(posedge ps_clk);
            if (cmp_in_ready) idx++;
          end
          @(negedge ps_clk); cmp_in_valid = 0; cmp_in_last = 0;
        end
        begin
          cmp_out_ready = 1;
          while (!got_last) begin
            @(posedge ps_clk);
            if (cmp_out_valid) begin comp[c].push_back(cmp_out_data); got_last = cmp_out_last; end
          end
          @(negedge ps_clk); cmp_out_ready = 0;
        end
      join
      n_cmp_blocks++;
      if (idx - start == BLK && idx < BYTES) n_cmp_split++;
      blk_end[c].push_back(comp[c].size() - 1);
    end
    $display("cipher %0d: %0d -> %0d bytes, ratio %0d.%02d", c, BYTES, comp[c].size(),
             BYTES / comp[c].size(), (BYTES * 100 / comp[c].size()) % 100);
  endtask

  // processor side traffic through the FIFOs
  logic [31:0] pq[$], sq[$], dq[$];

  task automatic ps_send(ref logic [31:0] q[$], input bit secret);
    while (q.size() > 0) begin
      @(negedge ps_clk);
      if (secret) begin sdi_w_valid = 1; sdi_w_data = q[0]; end
      else begin pdi_w_valid = 1; pdi_w_data = q[0]; end
      @(posedge ps_clk);
      if (secret ? sdi_w_ready : pdi_w_ready) void'(q.pop_front());
    end
    @(negedge ps_clk); pdi_w_valid = 0; sdi_w_valid = 0;
  endtask

  task automatic ps_collect(int nwords);
    dq.delete();
    while (dq.size() < nwords) begin
      @(negedge ps_clk); do_r_ready = ($urandom % 3) != 0;
      @(posedge ps_clk); if (do_r_valid && do_r_ready) dq.push_back(do_r_data);
    end
    @(negedge ps_clk); do_r_ready = 0;
  endtask

  task automatic session(cipher_e exp_id);
    int idx = 0, nwords = 0, bi = 0;
    bit done_seen = 0;
    byte unsigned kb[$], npub[$], ad[$], msg[$], ct[$], tag[$], none[$], bad[$];
    logic [127:0] acc;
    logic [31:0] held[$];
    int lfsr_before = lfsr_skips;
    @(negedge pl_clk); session_req = 1;
    @(negedge pl_clk); session_req = 0;
    while (!fetch_req) @(posedge pl_clk);
    check(fetch_id == exp_id, $sformatf("fetch id %0d exp %0d", fetch_id, exp_id));
    if (lfsr_skips != 32'(lfsr_before)) n_lfsr_skip++;
    n_cipher[fetch_id]++;
    // a command for the new cipher, queued early: it must wait for the
    // partition, and it is longer than the PDI FIFO
    rand_bytes(kb, 16); rand_bytes(npub, 16); rand_bytes(ad, 9); rand_bytes(msg, 37);
    ct.delete(); acc = '0;
    foreach (ad[j]) acc[127-8*(j%16) -: 8] ^= ad[j];
    foreach (msg[j]) begin ct.push_back(msg[j] ^ kb[j%16] ^ npub[j%16]); acc[127-8*(j%16) -: 8] ^= msg[j]; end
    tag.delete(); for (int j = 0; j < 16; j++) tag.push_back(acc[127-8*j -: 8] ^ kb[j]);
    held.delete(); held.push_back({OP_ACTKEY, 28'h0});
    build_cmd(held, 0, npub, ad, msg, none);
    fork
      begin
        while (idx < comp[fetch_id].size()) begin
          @(negedge pl_clk);
          bs_valid = 1; bs_data = comp[fetch_id][idx];
          bs_last = (idx == blk_end[fetch_id][bi]);
          @(posedge pl_clk);
          if (bs_ready) begin
            if (idx == blk_end[fetch_id][bi]) bi++;
            idx++;
          end
        end
        @(negedge pl_clk); bs_valid = 0; bs_last = 0;
      end
      begin
        while (!done_seen) begin
          @(posedge pl_clk);
          if (icap_valid && icap_ready) begin
            logic [31:0] w = '0;
            for (int j = 0; j < 4; j++) w[31-8*j -: 8] = orig[fetch_id][4*nwords + j];
            if (icap_data != w) check(0, $sformatf("config word %0d: %h exp %h", nwords, icap_data, w));
            nwords++;
          end
          done_seen = reconfig_done;
        end
      end
      ps_send(held, 0);
      begin
        // the key follows once the partition is live
        wait (rp_loaded && !rp_decouple);
        sq.delete(); push_seg(sq, SEG_KEY, 1, kb); ps_send(sq, 1);
      end
    join
    check(nwords == BYTES / 4, $sformatf("%0d config words", nwords));
    check(!decomp_error, "no decoder error");
    check(rp_cipher == exp_id && rp_loaded && !rp_decouple, "partition holds the chosen cipher");
    $display("session: cipher %0d, reconfiguration %0d cycles", exp_id, reconfig_cycles); $fflush();
    ps_collect(1 + 10 + 1 + 4 + 1);
    check(dq[0] == make_hdr(SEG_CT, 0, 16'd37), "CT header");
    for (int j = 0; j < 37; j++) check(dq[1 + j/4][31-8*(j%4) -: 8] == ct[j], $sformatf("ct byte %0d", j));
    for (int j = 0; j < 16; j++) check(dq[12 + j/4][31-8*(j%4) -: 8] == tag[j], $sformatf("tag byte %0d", j));
    check(dq[16] == STATUS_SUCCESS, "encrypt status");
    pq.delete(); build_cmd(pq, 1, npub, ad, ct, tag);
    fork ps_send(pq, 0); ps_collect(1 + 10 + 1); join
    for (int j = 0; j < 37; j++) check(dq[1 + j/4][31-8*(j%4) -: 8] == msg[j], $sformatf("pt byte %0d", j));
    check(dq[11] == STATUS_SUCCESS, "decrypt status");
    bad = tag; bad[3] ^= 8'h80;
    pq.delete(); build_cmd(pq, 1, npub, ad, ct, bad);
    fork ps_send(pq, 0); ps_collect(1); join
    check(dq[0] == STATUS_FAILURE, "tampered tag rejected");
    if (dq[0] == STATUS_FAILURE) n_auth_fail++;
  endtask

  initial begin
    logic [2:0] m;
    repeat (3) @(posedge pl_clk);
    rst_n = 1;
    for (int c = 0; c < 3; c++) begin
      gen_bitstream(c, orig[c]);
      compress_all(c);
    end
    check(comp[0].size() > comp[2].size() && comp[2].size() > comp[1].size(),
          "denser bitstreams compress less");
    @(negedge pl_clk); seed_load = 1;
    @(negedge pl_clk); seed_load = 0;
    m = seed;
    for (int s = 0; s < 4; s++) begin
      do m = {m[1], m[0], m[0] ^ m[2]}; while (m[1:0] == 2'b11);
      session(cipher_e'(m[1:0]));
      n_hop++;
    end
    mode = SEL_POWER; n_mode_switch++;
    level = 8'd20;  session(CIPHER_ASCON);  n_power++;
    level = 8'd100; session(CIPHER_DEOXYS); n_power++;
    level = 8'd220; session(CIPHER_AEGIS);  n_power++;
    $display("hop=%0d power=%0d mode_switch=%0d lfsr_skip=%0d decouple_hold=%0d fifo_full=%0d auth_fail=%0d cmp_blocks=%0d cmp_split=%0d lz4_copy=%0d",
             n_hop, n_power, n_mode_switch, n_lfsr_skip, n_decouple_hold, n_fifo_full, n_auth_fail,
             n_cmp_blocks, n_cmp_split, n_lz4_copy);
    check(n_hop > 0, "hopping happened");
    check(n_power > 0, "power adaptive happened");
    check(n_mode_switch > 0, "mode switch happened");
    check(n_lfsr_skip > 0, "LFSR code 3 skipped");
    check(n_decouple_hold > 0, "traffic held while decoupled");
    check(n_fifo_full > 0, "FIFO full back-pressure");
    check(n_auth_fail > 0, "authentication failure");
    check(n_cmp_split > 0, "compression split into blocks");
    check(n_lz4_copy > 0, "LZ4 match copies");
    check(n_cipher[0] > 0 && n_cipher[1] > 0 && n_cipher[2] > 0, "all three ciphers loaded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
