// tb_async_fifo: writes 600 words on a 7 ns clock and reads them on an 11 ns
// clock with random stalls on both sides; every word read must equal the
// oldest word written (reference queue). First fills the FIFO with the reader
// stopped and checks that exactly 16 words are accepted, and that the reader
// sees no word before one is written.
module tb_async_fifo;
  logic w_clk = 0, r_clk = 0, w_rst_n = 0, r_rst_n = 0;
  logic w_valid = 0, w_ready, r_valid, r_ready = 0;
  logic [31:0] w_data = '0, r_data;
  int checks = 0, failures = 0;
  logic [31:0] q[$];
  int written = 0, read_n = 0;
  localparam int N = 600;

  async_fifo #(.WIDTH(32), .AW(4)) dut (.*);

  always #3.5 w_clk = ~w_clk;
  always #5.5 r_clk = ~r_clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic fill_phase = 1;

  // writer
  initial begin
    repeat (3) @(posedge w_clk);
    w_rst_n = 1; r_rst_n = 1;
    repeat (3) @(posedge w_clk);
    check(!r_valid, "empty after reset");
    // fill with the reader stopped
    for (int k = 0; k < 40; k++) begin
      @(negedge w_clk);
      w_valid = 1; w_data = $urandom;
      @(posedge w_clk);
      if (w_ready) begin q.push_back(w_data); written++; end
    end
    @(negedge w_clk); w_valid = 0;
    check(written == 16, $sformatf("accepted %0d words when full, exp 16", written));
    fill_phase = 0;
    while (written < N) begin
      @(negedge w_clk);
      w_valid = ($urandom % 3) != 0;
      w_data  = $urandom;
      @(posedge w_clk);
      if (w_valid && w_ready) begin q.push_back(w_data); written++; end
    end
    @(negedge w_clk); w_valid = 0;
  end

  // reader
  initial begin
    wait (!fill_phase);
    while (read_n < N) begin
      @(negedge r_clk);
      r_ready = ($urandom % 4) != 0;
      @(posedge r_clk);
      if (r_valid && r_ready) begin
        check(q.size() > 0 && r_data == q[0], $sformatf("word %0d: got %h", read_n, r_data));
        if (q.size() > 0) void'(q.pop_front());
        read_n++;
      end
    end
    check(q.size() == 0, "all words read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
