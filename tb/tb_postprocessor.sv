// tb_postprocessor: plays the core side. For encryption it sends message
// blocks whose unused bytes hold garbage, then a tag block, and checks the DO
// words: CT header, message words with the garbage cleared, TAG header, tag,
// success status. For decryption it checks that no plaintext word leaves
// before the authentication result, that a good tag releases header and
// plaintext with success, and that a bad tag gives only a failure status. A
// plaintext longer than the buffer must raise overflow and fail. DO is
// drained with random stalls.
module tb_postprocessor;
  import dsec_pkg::*;
  logic clk = 0, rst_n = 0;
  pp_cmd_t cmd = '0;
  logic cmd_valid = 0, cmd_ready;
  logic [127:0] bdo = '0;
  logic [4:0] bdo_size = '0;
  seg_e bdo_type = SEG_CT;
  logic bdo_valid = 0, bdo_ready, msg_auth_valid = 0, msg_auth = 0;
  logic do_valid, do_ready = 0, overflow;
  logic [31:0] do_data;
  int checks = 0, failures = 0;

  postprocessor dut (.*);

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

  logic [31:0] dq[$];
  bit draining = 1;
  always begin
    @(negedge clk);
    do_ready = draining && (($urandom % 3) != 0);
    @(posedge clk);
    if (do_valid && do_ready) dq.push_back(do_data);
  end

  task automatic send_cmd(pp_cmd_t c);
    @(negedge clk); cmd = c; cmd_valid = 1;
    @(posedge clk); while (!cmd_ready) @(posedge clk);
    @(negedge clk); cmd_valid = 0;
  endtask

  task automatic send_blk(logic [127:0] d, int n, seg_e t);
    @(negedge clk); bdo = d; bdo_size = 5'(n); bdo_type = t; bdo_valid = 1;
    @(posedge clk); while (!bdo_ready) @(posedge clk);
    @(negedge clk); bdo_valid = 0;
  endtask

  function automatic logic [31:0] word_at(byte unsigned d[$], int k);
    logic [31:0] w = '0;
    for (int j = 0; j < 4; j++) if (k + j < d.size()) w[31-8*j -: 8] = d[k+j];
    return w;
  endfunction

  task automatic run(bit dec, int ml, bit good, bit drain_early);
    byte unsigned m[$];
    logic [127:0] blk, tag;
    logic [31:0] exp[$];
    int k;
    for (int j = 0; j < ml; j++) m.push_back(8'($urandom));
    tag = {$urandom, $urandom, $urandom, $urandom};
    dq.delete();
    send_cmd('{is_msg: 0, decrypt: dec, len: 0});
    send_cmd('{is_msg: 1, decrypt: dec, len: 16'(ml)});
    for (k = 0; k < ml; k += 16) begin
      blk = {$urandom, $urandom, $urandom, $urandom};   // garbage everywhere
      for (int j = 0; j < 16; j++) if (k + j < ml) blk[127-8*j -: 8] = m[k+j];
      send_blk(blk, (ml - k >= 16) ? 16 : ml - k, dec ? SEG_PT : SEG_CT);
    end
    if (!dec) begin
      send_blk(tag, 16, SEG_TAG);
      exp.push_back(make_hdr(SEG_CT, 0, 16'(ml)));
      for (int j = 0; j < ml; j += 4) exp.push_back(word_at(m, j));
      exp.push_back(make_hdr(SEG_TAG, 1, 16'd16));
      for (int j = 0; j < 4; j++) exp.push_back(tag[127-32*j -: 32]);
      exp.push_back(STATUS_SUCCESS);
    end else begin
      repeat (20) @(posedge clk);
      check(dq.size() == 0, "plaintext held until authentication");
      @(negedge clk); msg_auth_valid = 1; msg_auth = good;
      @(negedge clk); msg_auth_valid = 0;
      if (good && ml <= 1024) begin
        exp.push_back(make_hdr(SEG_PT, 1, 16'(ml)));
        for (int j = 0; j < ml; j += 4) exp.push_back(word_at(m, j));
        exp.push_back(STATUS_SUCCESS);
      end else exp.push_back(STATUS_FAILURE);
    end
    while (dq.size() < exp.size()) @(posedge clk);
    repeat (5) @(posedge clk);
    check(dq.size() == exp.size(), $sformatf("dec=%0d ml=%0d: %0d words exp %0d", dec, ml, dq.size(), exp.size()));
    foreach (exp[j]) if (j < dq.size())
      check(dq[j] == exp[j], $sformatf("dec=%0d ml=%0d word %0d: %h exp %h", dec, ml, j, dq[j], exp[j]));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 24; t++) begin
      int ml;
      ml = (t < 12) ? t * 5 : $urandom % 200;
      run(0, ml, 1, 0);
      run(1, ml, 1, 0);
      run(1, ml, 0, 0);
    end
    fork
      run(1, 1100, 1, 0);
      begin wait (overflow); check(1, "overflow raised"); end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
