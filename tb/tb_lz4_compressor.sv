// tb_lz4_compressor: compresses blocks of generated data and decodes the
// output with a reference LZ4 decoder written in the testbench; the result
// must equal the input. Checks the block rules (the last sequence holds at
// least 5 literals and no match), out_last on the final byte, comp_bytes, and
// that redundant data really shrinks. Data: a tiny block (all literals),
// bitstream-like blocks (long zero runs, repeated frames, random bytes), and
// a block longer than the buffer, which must be split at the buffer size.
// The buffer is reduced to 4 KiB (BLOCK_AW=12) to keep the run short.
module tb_lz4_compressor;
  localparam int BAW = 12;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_last = 0;
  logic [7:0] in_data = '0;
  logic out_valid, out_ready = 0, out_last, done;
  logic [7:0] out_data;
  logic [31:0] comp_bytes;
  int checks = 0, failures = 0;

  lz4_compressor #(.BLOCK_AW(BAW), .HASH_AW(10)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Reference decoder; returns 0 on a format error.
  function automatic bit ref_decode(byte unsigned c[$], ref byte unsigned p[$]);
    int i = 0, lit, ml, off, b;
    byte unsigned tok;
    p.delete();
    while (i < c.size()) begin
      tok = c[i]; i++;
      lit = int'(tok) >> 4; ml = int'(tok) & 15;
      if (lit == 15) do begin b = int'(c[i]); i++; lit += b; end while (b == 255);
      for (int k = 0; k < lit; k++) begin p.push_back(c[i]); i++; end
      if (i == c.size()) return (lit >= 5 || p.size() < 13) && ml == 0;
      off = int'(c[i]) | (int'(c[i+1]) << 8); i += 2;
      if (off == 0 || off > p.size()) return 0;
      if (ml == 15) do begin b = int'(c[i]); i++; ml += b; end while (b == 255);
      ml += 4;
      for (int k = 0; k < ml; k++) p.push_back(p[p.size() - off]);
    end
    return 0;
  endfunction

  byte unsigned src[$], comp[$], dec[$];

  // Feed src[from .. from+cnt-1]; the compressor may stop taking bytes when
  // its buffer is full. Returns how many bytes were taken.
  task automatic compress(int from, int cnt, output int taken);
    int idx = from;
    bit got_last = 0;
    comp.delete();
    fork
      begin
        while (idx < from + cnt && idx - from < 2**BAW) begin
          @(negedge clk);
          in_valid = ($urandom % 5) != 0;
          in_data  = src[idx];
          in_last  = (idx == from + cnt - 1);
          @(posedge clk);
          if (in_valid && in_ready) idx++;
        end
        @(negedge clk); in_valid = 0; in_last = 0;
      end
      begin
        while (!got_last) begin
          @(negedge clk);
          out_ready = ($urandom % 4) != 0;
          @(posedge clk);
          if (out_valid && out_ready) begin
            comp.push_back(out_data);
            got_last = out_last;
          end
        end
        @(negedge clk); out_ready = 0;
        @(posedge clk);
      end
    join
    taken = idx - from;
  endtask

  task automatic run(int from, int cnt, int exp_taken, bit expect_shrink);
    int taken;
    compress(from, cnt, taken);
    check(taken == exp_taken, $sformatf("took %0d bytes exp %0d", taken, exp_taken));
    check(comp_bytes == 32'(comp.size()), "comp_bytes matches output size");
    check(ref_decode(comp, dec), "output is a valid LZ4 block");
    check(dec.size() == taken, $sformatf("decoded %0d bytes exp %0d", dec.size(), taken));
    for (int k = 0; k < dec.size() && k < taken; k++)
      check(dec[k] == src[from + k], $sformatf("byte %0d", k));
    if (expect_shrink)
      check(comp.size() < taken / 2, $sformatf("ratio %0d -> %0d", taken, comp.size()));
    $display("block %0d -> %0d bytes", taken, comp.size());
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // tiny block
    src = '{8'h01, 8'h02, 8'h03, 8'h01, 8'h02, 8'h03, 8'h01};
    run(0, src.size(), src.size(), 0);
    // bitstream-like data: frames of 101 bytes, mostly zero, repeating
    src.delete();
    for (int f = 0; f < 30; f++)
      for (int k = 0; k < 101; k++)
        src.push_back((k % 17 == 3) ? 8'(k * 7 + (f % 3)) : ((f % 5 == 4 && k < 8) ? 8'($urandom) : 8'h00));
    run(0, src.size(), src.size(), 1);
    // random data
    src.delete();
    for (int k = 0; k < 600; k++) src.push_back(8'($urandom));
    run(0, src.size(), src.size(), 0);
    // longer than the buffer: split at 2**BAW bytes
    src.delete();
    for (int k = 0; k < 5000; k++) src.push_back((k % 50 < 40) ? 8'h00 : 8'(k / 50));
    run(0, src.size(), 2**BAW, 1);
    run(2**BAW, src.size() - 2**BAW, src.size() - 2**BAW, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
