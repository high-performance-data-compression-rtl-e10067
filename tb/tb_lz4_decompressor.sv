// tb_lz4_decompressor: decodes random LZ4 blocks (built with the data they
// stand for by lz4_seqgen.svh) and compares every output byte and the
// end-of-block flag. The first block runs without stalls, later blocks with random
// stalls on both sides. A hand-built block checks the rate: one cycle per
// input byte plus one per match byte. A block with a zero offset must raise
// error.
module tb_lz4_decompressor;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_last = 0;
  logic [7:0] in_data = '0;
  logic out_valid, out_ready = 0, out_last, error;
  logic [7:0] out_data;
  int checks = 0, failures = 0;

  `include "lz4_seqgen.svh"

  lz4_decompressor dut (.*);

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

  byte unsigned blk[$], plain[$];
  bit stall;
  int produced, cycles;
  bit done_in;

  task automatic run_block(bit with_stall);
    int idx = 0;
    produced = 0;
    cycles = 0;
    stall = with_stall;
    done_in = 0;
    fork
      begin : feeder
        while (idx < blk.size()) begin
          @(negedge clk);
          in_valid = stall ? ($urandom % 3 != 0) : 1'b1;
          in_data  = blk[idx];
          in_last  = (idx == blk.size() - 1);
          @(posedge clk);
          if (in_valid && in_ready) idx++;
        end
        @(negedge clk); in_valid = 0; in_last = 0;
      end
      begin : sink
        bit last_seen = 0;
        while (!last_seen) begin
          @(negedge clk);
          out_ready = stall ? ($urandom % 4 != 0) : 1'b1;
          @(posedge clk);
          cycles++;
          if (out_valid && out_ready) begin
            if (produced < plain.size())
              check(out_data == plain[produced], $sformatf("byte %0d: got %h exp %h", produced, out_data, plain[produced]));
            else check(0, "extra byte");
            produced++;
            last_seen = out_last;
          end
        end
        @(negedge clk); out_ready = 0;
      end
    join
    check(produced == plain.size(), $sformatf("produced %0d exp %0d", produced, plain.size()));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 6; b++) begin
      blk.delete(); plain.delete();
      lz4_gen_block(blk, plain, 20 + $urandom % 40, 65535);
      run_block(b != 0);
      check(!error, "no error on a valid block");
    end
    // throughput check on a block with known structure
    blk.delete(); plain.delete();
    // token: 5 literals, match 4+15+20=39; offset 1; then final 6 literals
    blk = '{8'h5F, 8'h11, 8'h22, 8'h33, 8'h44, 8'h55, 8'h01, 8'h00, 8'd20,
            8'h60, 8'hA1, 8'hA2, 8'hA3, 8'hA4, 8'hA5, 8'hA6};
    plain = '{8'h11, 8'h22, 8'h33, 8'h44, 8'h55};
    for (int k = 0; k < 39; k++) plain.push_back(8'h55);
    plain = {plain, '{8'hA1, 8'hA2, 8'hA3, 8'hA4, 8'hA5, 8'hA6}};
    run_block(0);
    // 16 input bytes + 39 match bytes, one per cycle
    check(cycles == 16 + 39, $sformatf("cycles %0d exp %0d", cycles, 16 + 39));
    check(!error, "no error");
    // zero offset is an error
    blk = '{8'h10, 8'h77, 8'h00, 8'h00, 8'h50, 8'h01, 8'h02, 8'h03, 8'h04, 8'h05};
    plain = '{8'h77};
    fork
      begin
        for (int k = 0; k < blk.size(); k++) begin
          @(negedge clk); in_valid = 1; in_data = blk[k]; in_last = (k == blk.size() - 1);
          @(posedge clk); while (!in_ready) @(posedge clk);
        end
        @(negedge clk); in_valid = 0; in_last = 0;
      end
      begin out_ready = 1; repeat (20) @(posedge clk); end
    join
    check(error, "zero offset flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
