// pr_controller: partial reconfiguration sequencer of the cipher partition.
//
// For every new session it runs the reconfiguration flow:
//  1. ask the algorithm selector for the next cipher (LFSR hopping or power
//     adaptive, per mode);
//  2. request that cipher's compressed partial bitstream from the processor
//     side (fetch_req pulse with fetch_id) and decouple the reconfigurable
//     partition (rp_decouple high);
//  3. decompress the incoming LZ4 stream on the fly;
//  4. pack the decompressed bytes into 32-bit words, first byte in [31:24],
//     and write them to the configuration port (icap_*);
//  5. after BITSTREAM_BYTES bytes, release the partition, record the cipher
//     now loaded (rp_cipher) and pulse reconfig_done.
// reconfig_cycles holds the length of the last reconfiguration in clock
// cycles, from the fetch request to the last configuration word.
//
// Interface: session_req starts a session when idle (busy low). Compressed
// bytes arrive on bs_valid/bs_ready/bs_data/bs_last (bs_last on the last byte
// of each LZ4 block). Configuration words leave on icap_valid/icap_ready/
// icap_data. seed_load/seed seed the LFSR once at start-up. decomp_error is
// the decoder's sticky error flag.
// Timing: the decoder produces one byte per cycle, so the configuration port
// receives one word per 4 cycles when the stream is not stalled.
//
// The flow (seed once, choose per session, fetch the compressed file,
// decompress, reconfigure) and the 724,760-byte partial bitstream size, equal
// for all ciphers because they share one partition, follow the source design.
// Decompressing in logic next to the configuration port, the handshakes and
// the word packing are this design's choices.
module pr_controller
  import dsec_pkg::*;
#(
  parameter int unsigned BITSTREAM_BYTES = 724760,
  parameter int unsigned WIN_AW          = 16,
  parameter int unsigned LEVEL_W         = 8,
  parameter int unsigned MID_TH          = 85,
  parameter int unsigned HIGH_TH         = 170
) (
  input  logic               clk,
  input  logic               rst_n,
  // selection
  input  sel_mode_e          mode,
  input  logic [LEVEL_W-1:0] level,
  input  logic               seed_load,
  input  logic [2:0]         seed,
  input  logic               session_req,
  output logic               busy,
  // compressed bitstream from the processor side
  output logic               fetch_req,
  output cipher_e            fetch_id,
  input  logic               bs_valid,
  output logic               bs_ready,
  input  logic [7:0]         bs_data,
  input  logic               bs_last,
  // configuration port
  output logic               icap_valid,
  input  logic               icap_ready,
  output logic [31:0]        icap_data,
  // partition status
  output logic               rp_decouple,
  output logic               rp_loaded,
  output cipher_e            rp_cipher,
  output logic               reconfig_done,
  output logic [31:0]        reconfig_cycles,
  output logic [31:0]        lfsr_skips,
  output logic               decomp_error
);

  typedef enum logic [1:0] {S_IDLE, S_SELECT, S_LOAD, S_FLUSH} state_e;
  state_e state;

  logic       sel_next, sel_busy, sel_valid;
  cipher_e    sel_id;
  logic       dc_valid, dc_ready, dc_last, dc_in_ready;
  logic [7:0] dc_data;
  logic [23:0] wbuf;
  logic [1:0]  bcnt;
  logic [31:0] bytes_done;
  logic        byte_fire, icap_fire;

  algo_selector #(.LEVEL_W(LEVEL_W), .MID_TH(MID_TH), .HIGH_TH(HIGH_TH)) u_sel (
    .clk, .rst_n, .mode, .seed_load, .seed, .level,
    .next(sel_next), .busy(sel_busy), .sel_valid, .sel_id, .skip_count(lfsr_skips)
  );

  lz4_decompressor #(.WIN_AW(WIN_AW)) u_lz4d (
    .clk, .rst_n,
    .in_valid(bs_valid && state == S_LOAD), .in_ready(dc_in_ready),
    .in_data(bs_data), .in_last(bs_last),
    .out_valid(dc_valid), .out_ready(dc_ready), .out_data(dc_data),
    .out_last(dc_last), .error(decomp_error)
  );

  assign bs_ready  = dc_in_ready && (state == S_LOAD);
  assign sel_next  = (state == S_IDLE) && session_req && !sel_busy;
  assign busy      = (state != S_IDLE);
  assign dc_ready  = (state == S_LOAD) && (!icap_valid || icap_ready);
  assign byte_fire = dc_valid && dc_ready;
  assign icap_fire = icap_valid && icap_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= S_IDLE;
      fetch_req       <= 1'b0;
      fetch_id        <= CIPHER_AEGIS;
      icap_valid      <= 1'b0;
      icap_data       <= '0;
      wbuf            <= '0;
      bcnt            <= '0;
      bytes_done      <= '0;
      rp_decouple     <= 1'b0;
      rp_loaded       <= 1'b0;
      rp_cipher       <= CIPHER_AEGIS;
      reconfig_done   <= 1'b0;
      reconfig_cycles <= '0;
    end else begin
      fetch_req     <= 1'b0;
      reconfig_done <= 1'b0;
      if (icap_fire) icap_valid <= 1'b0;
      if (state == S_LOAD || state == S_FLUSH) reconfig_cycles <= reconfig_cycles + 1'b1;
      unique case (state)
        S_IDLE:
          if (sel_next) state <= S_SELECT;
        S_SELECT:
          if (sel_valid) begin
            fetch_id        <= sel_id;
            fetch_req       <= 1'b1;
            rp_decouple     <= 1'b1;
            rp_loaded       <= 1'b0;
            bytes_done      <= '0;
            bcnt            <= '0;
            reconfig_cycles <= '0;
            state           <= S_LOAD;
          end
        S_LOAD:
          if (byte_fire) begin
            bytes_done <= bytes_done + 1'b1;
            bcnt       <= bcnt + 1'b1;
            wbuf       <= {wbuf[15:0], dc_data};
            if (bcnt == 2'd3 || bytes_done + 1 == BITSTREAM_BYTES) begin
              // complete the word; a short final word is zero-filled
              unique case (bcnt)
                2'd0: icap_data <= {dc_data, 24'h0};
                2'd1: icap_data <= {wbuf[7:0], dc_data, 16'h0};
                2'd2: icap_data <= {wbuf[15:0], dc_data, 8'h0};
                default: icap_data <= {wbuf, dc_data};
              endcase
              icap_valid <= 1'b1;
              bcnt       <= '0;
              if (bytes_done + 1 == BITSTREAM_BYTES) state <= S_FLUSH;
            end
          end
        S_FLUSH:
          if (!icap_valid || icap_fire) begin
            rp_decouple   <= 1'b0;
            rp_loaded     <= 1'b1;
            rp_cipher     <= fetch_id;
            reconfig_done <= 1'b1;
            state         <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
