// tb_preprocessor: feeds key loading and ENC/DEC commands with segments of
// many lengths and checks every block handed to the core: the data bytes, the
// 0x80-then-zeros padding, the byte count, the type and the end-of-type and
// end-of-input flags, all computed by the testbench from the segment bytes.
// Also checks the key, the commands passed to the postprocessor (mode and
// message length) and that bytes_left counts down. The core side accepts
// blocks with random stalls.
module tb_preprocessor;
  import dsec_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pdi_valid = 0, pdi_ready, sdi_valid = 0, sdi_ready;
  logic [31:0] pdi_data = '0, sdi_data = '0;
  logic [127:0] key, bdi;
  logic key_valid, key_ready = 1, bdi_eot, bdi_eoi, bdi_pad, bdi_valid, bdi_ready = 0, decrypt;
  logic [4:0] bdi_size;
  seg_e bdi_type;
  pp_cmd_t cmd;
  logic cmd_valid, cmd_ready = 1;
  logic [15:0] bytes_left;
  int checks = 0, failures = 0;

  `include "aead_stim.svh"

  preprocessor dut (.*);

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

  typedef struct { logic [127:0] d; logic [4:0] n; seg_e t; bit eot, eoi; } blk_t;
  blk_t exp_q[$];
  pp_cmd_t cmd_q[$];
  logic [31:0] pq[$], sq[$];

  function automatic void exp_seg(seg_e t, bit last, byte unsigned d[$]);
    blk_t b;
    int k = 0;
    do begin
      b.d = '0; b.n = 0; b.t = t;
      for (int j = 0; j < 16; j++) begin
        if (k + j < d.size()) begin b.d[127-8*j -: 8] = d[k+j]; b.n++; end
        else if (k + j == d.size()) b.d[127-8*j -: 8] = 8'h80;
      end
      k += 16;
      b.eot = (k >= d.size());
      b.eoi = b.eot && last;
      exp_q.push_back(b);
    end while (k < d.size());
  endfunction

  // core side: accept blocks with random stalls and compare
  initial begin
    forever begin
      @(negedge clk);
      bdi_ready = ($urandom % 3) != 0;
      @(posedge clk);
      if (bdi_valid && bdi_ready) begin
        if (exp_q.size() == 0) check(0, "unexpected block");
        else begin
          check(bdi == exp_q[0].d, $sformatf("block data %h exp %h", bdi, exp_q[0].d));
          check(bdi_size == exp_q[0].n, $sformatf("size %0d exp %0d", bdi_size, exp_q[0].n));
          check(bdi_type == exp_q[0].t && bdi_eot == exp_q[0].eot && bdi_eoi == exp_q[0].eoi,
                $sformatf("type/eot/eoi %0d %0d %0d", bdi_type, bdi_eot, bdi_eoi));
          check(bdi_pad == (exp_q[0].n != 16), "pad flag");
          void'(exp_q.pop_front());
        end
      end
    end
  end

  always @(posedge clk) if (cmd_valid && cmd_ready) begin
    if (cmd_q.size() == 0) check(0, "unexpected cmd");
    else begin
      check(cmd.is_msg == cmd_q[0].is_msg && cmd.decrypt == cmd_q[0].decrypt &&
            (!cmd.is_msg || cmd.len == cmd_q[0].len), "cmd to postprocessor");
      void'(cmd_q.pop_front());
    end
  end

  int max_left = 32'hFFFF;
  always @(posedge clk) if (rst_n && bytes_left > 16'(max_left)) begin
    checks++; failures++; $display("FAIL: bytes_left %0d above segment length", bytes_left);
  end

  task automatic send();
    while (pq.size() > 0) begin
      @(negedge clk); pdi_valid = ($urandom % 4) != 0; pdi_data = pq[0];
      @(posedge clk); if (pdi_valid && pdi_ready) void'(pq.pop_front());
    end
    @(negedge clk); pdi_valid = 0;
  endtask

  initial begin
    byte unsigned kb[$], npub[$], ad[$], msg[$], tag[$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    max_left = 32'hFFFF;
    // key
    rand_bytes(kb, 16);
    pq.push_back({OP_ACTKEY, 28'h0});
    push_seg(sq, SEG_KEY, 1, kb);
    fork
      send();
      begin
        while (sq.size() > 0) begin
          @(negedge clk); sdi_valid = 1; sdi_data = sq[0];
          @(posedge clk); if (sdi_ready) void'(sq.pop_front());
        end
        @(negedge clk); sdi_valid = 0;
      end
    join
    wait (key_valid);
    @(negedge clk);
    check(key == {kb[0], kb[1], kb[2], kb[3], kb[4], kb[5], kb[6], kb[7],
                  kb[8], kb[9], kb[10], kb[11], kb[12], kb[13], kb[14], kb[15]}, "key value");
    for (int t = 0; t < 30; t++) begin
      bit dec;
      int ml, al;
      dec = (t % 2) != 0;
      ml = (t < 20) ? t * 3 : $urandom % 100;
      al = $urandom % 35;
      rand_bytes(npub, 16); rand_bytes(ad, al); rand_bytes(msg, ml); rand_bytes(tag, 16);
      build_cmd(pq, dec, npub, ad, msg, tag);
      cmd_q.push_back('{is_msg: 0, decrypt: dec, len: 0});
      cmd_q.push_back('{is_msg: 1, decrypt: dec, len: 16'(ml)});
      exp_seg(SEG_NPUB, 0, npub);
      exp_seg(SEG_AD, 0, ad);
      exp_seg(dec ? SEG_CT : SEG_PT, !dec, msg);
      if (dec) exp_seg(SEG_TAG, 1, tag);
      max_left = 100;
      send();
      while (exp_q.size() > 0) @(posedge clk);
      check(decrypt == dec, "decrypt flag");
    end
    check(cmd_q.size() == 0, "all commands passed on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
