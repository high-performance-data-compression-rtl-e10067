// postprocessor: output side of the AEAD interface, shared by every cipher.
//
// It turns the 128-bit blocks produced by a cipher core into the 32-bit DO
// word stream:
//  - clearing: bytes of an output block past bdo_size are zeroed, so nothing
//    but ciphertext or plaintext leaves the core;
//  - parallel-in serial-out: a block leaves as up to four words, first byte in
//    bits [31:24]; only the words that hold message bytes are sent;
//  - segments: the words are preceded by a segment header (type, last flag,
//    length) built from the message length the preprocessor passed on cmd;
//  - holding decrypted data: in decryption the plaintext words go into an
//    internal buffer and are released only after the core reports a good tag
//    (msg_auth_valid with msg_auth high); on a bad tag they are discarded;
//  - status: every command ends with a status word, STATUS_SUCCESS or
//    STATUS_FAILURE (authentication result).
// Encryption output: CT header, CT words, TAG header, four tag words, status.
// Decryption output: PT header and PT words if the tag is good, then status.
//
// Interface: cmd from the preprocessor; bdo/bdo_size/bdo_type/bdo_valid/
// bdo_ready and msg_auth_valid/msg_auth from the core; do_valid/do_ready/
// do_data out. overflow flags, until the status word of the command, a
// plaintext longer than the buffer (the excess words are dropped and the
// result is reported as a failure).
// Timing: one DO word per cycle while do_ready is high.
//
// The five tasks follow the source design. The formats, the 4-word tag and the
// 2**MSG_AW-word plaintext buffer (1 KiB by default, ample for the few-byte
// messages of IoT devices) are this design's choices.
module postprocessor
  import dsec_pkg::*;
#(
  parameter int unsigned MSG_AW = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  pp_cmd_t               cmd,
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  logic [BLOCK_BITS-1:0] bdo,
  input  logic [4:0]            bdo_size,
  input  seg_e                  bdo_type,
  input  logic                  bdo_valid,
  output logic                  bdo_ready,
  input  logic                  msg_auth_valid,
  input  logic                  msg_auth,
  output logic                  do_valid,
  input  logic                  do_ready,
  output logic [W-1:0]          do_data,
  output logic                  overflow
);

  typedef enum logic [3:0] {
    S_IDLE, S_MSGCMD, S_HDR, S_BLK, S_WORDS, S_TAGHDR, S_TAGBLK, S_TAGWORDS,
    S_AUTH, S_PTHDR, S_DRAIN, S_STATUS
  } state_e;

  state_e                state;
  logic                  dec;
  logic                  auth_ok;
  logic [15:0]           msg_len, bytes_left;
  logic [BLOCK_BITS-1:0] blk;
  logic [4:0]            blk_bytes;
  logic [1:0]            widx;
  logic [W-1:0]          cur_word;
  logic                  last_word;

  logic [W-1:0]          mbuf [2**MSG_AW];
  logic [MSG_AW:0]       mb_wr, mb_rd;
  logic                  mb_full;

  assign cur_word  = blk[BLOCK_BITS-1-W*widx -: W];
  // last word of this block that holds message bytes
  assign last_word = (5'(widx) * 5'd4 + 5'd4 >= blk_bytes);
  assign mb_full   = (mb_wr - mb_rd) == (MSG_AW+1)'(2**MSG_AW);

  assign cmd_ready = (state == S_IDLE) || (state == S_MSGCMD);
  assign bdo_ready = (state == S_BLK) || (state == S_TAGBLK);

  always_comb begin
    do_valid = 1'b0;
    do_data  = '0;
    unique case (state)
      S_HDR:      begin do_valid = 1'b1; do_data = make_hdr(SEG_CT, 1'b0, msg_len); end
      S_WORDS:    begin do_valid = !dec; do_data = cur_word; end
      S_TAGHDR:   begin do_valid = 1'b1; do_data = make_hdr(SEG_TAG, 1'b1, 16'(TAG_BYTES)); end
      S_TAGWORDS: begin do_valid = 1'b1; do_data = cur_word; end
      S_PTHDR:    begin do_valid = 1'b1; do_data = make_hdr(SEG_PT, 1'b1, msg_len); end
      S_DRAIN:    begin do_valid = 1'b1; do_data = mbuf[mb_rd[MSG_AW-1:0]]; end
      S_STATUS:   begin do_valid = 1'b1; do_data = auth_ok ? STATUS_SUCCESS : STATUS_FAILURE; end
      default: ;
    endcase
  end

  // The core must hand over message blocks first and the tag block last.
  a_tag_type: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_TAGBLK && bdo_valid) |-> bdo_type == SEG_TAG);
  a_msg_type: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_BLK && bdo_valid) |-> bdo_type != SEG_TAG);

  always_ff @(posedge clk) begin
    if (state == S_WORDS && dec && !mb_full) mbuf[mb_wr[MSG_AW-1:0]] <= cur_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      dec        <= 1'b0;
      auth_ok    <= 1'b0;
      msg_len    <= '0;
      bytes_left <= '0;
      blk        <= '0;
      blk_bytes  <= '0;
      widx       <= '0;
      mb_wr      <= '0;
      mb_rd      <= '0;
      overflow   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:
          if (cmd_valid && !cmd.is_msg) begin
            dec     <= cmd.decrypt;
            auth_ok <= 1'b1;
            mb_wr   <= '0;
            mb_rd   <= '0;
            state   <= S_MSGCMD;
          end
        S_MSGCMD:
          if (cmd_valid) begin
            msg_len    <= cmd.len;
            bytes_left <= cmd.len;
            if (!dec)                state <= S_HDR;
            else if (cmd.len == 0)   state <= S_AUTH;
            else                     state <= S_BLK;
          end
        S_HDR:
          if (do_ready) state <= (msg_len == 0) ? S_TAGHDR : S_BLK;
        S_BLK:
          if (bdo_valid) begin
            // clear every byte that is not message data
            for (int b = 0; b < BLOCK_BITS/8; b++)
              blk[BLOCK_BITS-1-8*b -: 8] <= (b < int'(bdo_size)) ? bdo[BLOCK_BITS-1-8*b -: 8] : 8'h00;
            blk_bytes <= bdo_size;
            widx      <= '0;
            state     <= (bdo_size == 0) ? S_BLK : S_WORDS;
          end
        S_WORDS:
          if (dec || do_ready) begin
            if (dec) begin
              if (mb_full) overflow <= 1'b1;
              else         mb_wr    <= mb_wr + 1'b1;
            end
            widx <= widx + 1'b1;
            if (last_word) begin
              bytes_left <= bytes_left - 16'(blk_bytes);
              if (bytes_left <= 16'(blk_bytes)) state <= dec ? S_AUTH : S_TAGHDR;
              else                              state <= S_BLK;
            end
          end
        S_TAGHDR:
          if (do_ready) state <= S_TAGBLK;
        S_TAGBLK:
          if (bdo_valid) begin
            blk   <= bdo;
            widx  <= '0;
            state <= S_TAGWORDS;
          end
        S_TAGWORDS:
          if (do_ready) begin
            widx <= widx + 1'b1;
            if (widx == 2'(TAG_BYTES/4 - 1)) state <= S_STATUS;
          end
        S_AUTH:
          if (msg_auth_valid) begin
            auth_ok <= msg_auth && !overflow;
            if (msg_auth && !overflow) state <= S_PTHDR;
            else                       state <= S_STATUS;
          end
        S_PTHDR:
          if (do_ready) state <= (mb_rd == mb_wr) ? S_STATUS : S_DRAIN;
        S_DRAIN:
          if (do_ready) begin
            mb_rd <= mb_rd + 1'b1;
            if (mb_rd + 1'b1 == mb_wr) state <= S_STATUS;
          end
        S_STATUS:
          if (do_ready) begin
            overflow <= 1'b0;
            state    <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
