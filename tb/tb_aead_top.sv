// tb_aead_top: runs the AEAD interface with the behavioural toy core. Loads a
// key over SDI, then for messages of many lengths (0 to 70 bytes, AD 0 to 40
// bytes): encrypts and checks the DO stream word by word (CT header, CT, TAG
// header, tag, success status) against values the testbench computes itself;
// decrypts the result and checks that the plaintext comes back with success;
// decrypts again with a corrupted tag and checks that no plaintext leaves and
// the status is failure. PDI is fed and DO drained with random stalls.
module tb_aead_top;
  import dsec_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pdi_valid = 0, pdi_ready, sdi_valid = 0, sdi_ready, do_valid, do_ready = 0;
  logic [31:0] pdi_data = '0, sdi_data = '0, do_data;
  logic [127:0] key, bdi, bdo;
  logic key_valid, key_ready, bdi_eot, bdi_eoi, bdi_pad, bdi_valid, bdi_ready, decrypt;
  logic [4:0] bdi_size, bdo_size;
  seg_e bdi_type, bdo_type;
  logic bdo_valid, bdo_ready, msg_auth_valid, msg_auth, overflow;
  logic [15:0] bytes_left;
  int checks = 0, failures = 0;

  `include "aead_stim.svh"

  aead_top dut (.*);
  toy_cipher_core core (.*);

  always #5 clk = ~clk;
  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] pq[$], sq[$], dq[$];

  task automatic send(ref logic [31:0] q[$], input bit secret);
    while (q.size() > 0) begin
      @(negedge clk);
      if (secret) begin sdi_valid = 1; sdi_data = q[0]; end
      else begin pdi_valid = ($urandom % 4) != 0; pdi_data = q[0]; end
      @(posedge clk);
      if (secret ? sdi_ready : (pdi_valid && pdi_ready)) void'(q.pop_front());
    end
    @(negedge clk); pdi_valid = 0; sdi_valid = 0;
  endtask

  // collect DO words until a status word
  task automatic collect();
    bit fin = 0;
    dq.delete();
    while (!fin) begin
      @(negedge clk);
      do_ready = ($urandom % 3) != 0;
      @(posedge clk);
      if (do_valid && do_ready) begin
        dq.push_back(do_data);
        fin = (do_data == STATUS_SUCCESS || do_data == STATUS_FAILURE) && dq.size() > 0 &&
              !(dq.size() > 1 && is_data_word(dq.size() - 1));
      end
    end
    @(negedge clk); do_ready = 0;
  endtask

  // expected number of words before the status; used to tell data from status
  int exp_words;
  function automatic bit is_data_word(int idx);
    return idx < exp_words;
  endfunction

  function automatic void words_of(byte unsigned d[$], ref logic [31:0] q[$]);
    logic [31:0] w;
    for (int k = 0; k < d.size(); k += 4) begin
      w = '0;
      for (int j = 0; j < 4; j++) if (k + j < d.size()) w[31-8*j -: 8] = d[k+j];
      q.push_back(w);
    end
  endfunction

  initial begin
    byte unsigned kb[$], npub[$], ad[$], msg[$], ct[$], tag[$], none[$], bad[$];
    logic [127:0] acc;
    logic [31:0] exp[$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    rand_bytes(kb, 16);
    pq.delete(); pq.push_back({OP_ACTKEY, 28'h0}); send(pq, 0);
    sq.delete(); push_seg(sq, SEG_KEY, 1'b1, kb); send(sq, 1);
    repeat (3) @(posedge clk);
    check(core.k == {kb[0], kb[1], kb[2], kb[3], kb[4], kb[5], kb[6], kb[7],
                     kb[8], kb[9], kb[10], kb[11], kb[12], kb[13], kb[14], kb[15]}, "key loaded");
    for (int t = 0; t < 40; t++) begin
      int ml, al;
      ml = (t < 18) ? t : $urandom % 71;
      al = (t % 3 == 0) ? 0 : $urandom % 41;
      rand_bytes(npub, 16); rand_bytes(ad, al); rand_bytes(msg, ml);
      // reference: ct = msg ^ key ^ npub (per byte position in the block)
      ct.delete(); acc = '0;
      for (int j = 0; j < ad.size(); j++) acc[127-8*(j%16) -: 8] ^= ad[j];
      for (int j = 0; j < ml; j++) begin
        ct.push_back(msg[j] ^ kb[j%16] ^ npub[j%16]);
        acc[127-8*(j%16) -: 8] ^= msg[j];
      end
      tag.delete();
      for (int j = 0; j < 16; j++) tag.push_back(acc[127-8*j -: 8] ^ kb[j]);
      // encrypt
      pq.delete(); build_cmd(pq, 0, npub, ad, msg, none);
      exp.delete(); exp.push_back(make_hdr(SEG_CT, 0, 16'(ml))); words_of(ct, exp);
      exp.push_back(make_hdr(SEG_TAG, 1, 16'd16)); words_of(tag, exp); exp.push_back(STATUS_SUCCESS);
      exp_words = exp.size() - 1;
      fork send(pq, 0); collect(); join
      check(dq.size() == exp.size(), $sformatf("enc %0d: %0d words exp %0d", t, dq.size(), exp.size()));
      foreach (exp[j]) if (j < dq.size()) check(dq[j] == exp[j], $sformatf("enc %0d word %0d: %h exp %h", t, j, dq[j], exp[j]));
      // decrypt with the right tag
      pq.delete(); build_cmd(pq, 1, npub, ad, ct, tag);
      exp.delete(); exp.push_back(make_hdr(SEG_PT, 1, 16'(ml))); words_of(msg, exp); exp.push_back(STATUS_SUCCESS);
      exp_words = exp.size() - 1;
      fork send(pq, 0); collect(); join
      check(dq.size() == exp.size(), $sformatf("dec %0d: %0d words exp %0d", t, dq.size(), exp.size()));
      foreach (exp[j]) if (j < dq.size()) check(dq[j] == exp[j], $sformatf("dec %0d word %0d: %h exp %h", t, j, dq[j], exp[j]));
      // decrypt with a corrupted tag
      bad = tag; bad[t % 16] ^= 8'h01;
      pq.delete(); build_cmd(pq, 1, npub, ad, ct, bad);
      exp_words = 0;
      fork send(pq, 0); collect(); join
      check(dq.size() == 1 && dq[0] == STATUS_FAILURE, $sformatf("bad tag %0d: %0d words, first %h", t, dq.size(), dq[0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
