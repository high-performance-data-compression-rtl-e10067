// async_fifo: dual-clock FIFO at the boundary between the processor side and
// the programmable logic.
//
// Words written in the write clock domain are read in the read clock domain.
// Each side keeps a binary pointer one bit wider than the address and publishes
// it in Gray code; the other side samples it through a two-flop synchronizer.
// Full and empty are computed from the local pointer and the synchronized
// remote one, so both flags are conservative (they clear a few cycles late,
// never early).
//
// Interface: valid/ready on both sides. The write side accepts when w_valid and
// w_ready (not full); the read side shows the oldest word on r_data with
// r_valid (not empty) and pops it when r_ready is high (first-word fall-through).
// Each side has its own active-low reset, and both must be asserted together.
//
// That the PDI, SDI and DO ports of the AEAD core sit behind asynchronous FIFOs
// between two clock domains follows the source design; the depth, the Gray-code
// scheme and the handshake are this design's choices.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = 4       // depth = 2**AW words
) (
  input  logic             w_clk,
  input  logic             w_rst_n,
  input  logic             w_valid,
  output logic             w_ready,
  input  logic [WIDTH-1:0] w_data,

  input  logic             r_clk,
  input  logic             r_rst_n,
  output logic             r_valid,
  input  logic             r_ready,
  output logic [WIDTH-1:0] r_data
);

  logic [WIDTH-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen by the write side
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen by the read side

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write side
  logic        wr_fire;
  logic [AW:0] wbin_nxt;
  assign w_ready  = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wr_fire  = w_valid && w_ready;
  assign wbin_nxt = wbin + (AW+1)'(wr_fire);

  always_ff @(posedge w_clk) begin
    if (wr_fire) mem[wbin[AW-1:0]] <= w_data;
  end

  always_ff @(posedge w_clk or negedge w_rst_n) begin
    if (!w_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= bin2gray(wbin_nxt);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // Read side
  logic        rd_fire;
  logic [AW:0] rbin_nxt;
  assign r_valid  = (rgray != wgray_r2);
  assign rd_fire  = r_valid && r_ready;
  assign rbin_nxt = rbin + (AW+1)'(rd_fire);
  assign r_data   = mem[rbin[AW-1:0]];

  always_ff @(posedge r_clk or negedge r_rst_n) begin
    if (!r_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= bin2gray(rbin_nxt);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

endmodule
