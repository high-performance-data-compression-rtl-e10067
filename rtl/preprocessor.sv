// preprocessor: input side of the AEAD interface, shared by every cipher.
//
// It turns the 32-bit public (PDI) and secret (SDI) word streams into the
// 128-bit blocks a cipher core consumes:
//  - key activation and loading: the PDI instruction ACTKEY makes it read a key
//    segment from SDI (header, then four words) and hand the 128-bit key to the
//    core on the key channel;
//  - serial-in parallel-out: after an ENC or DEC instruction each PDI segment
//    (nonce, associated data, plaintext or ciphertext, tag) is collected word by
//    word into 128-bit blocks, first byte in bits [127:120];
//  - padding: a block that is not full is padded with a 0x80 byte followed by
//    zero bytes, and any bytes of the last word past the segment end are
//    cleared; bdi_size tells the core how many bytes are real;
//  - length tracking: bytes_left counts the bytes of the current segment that
//    are still to come, and drives the end-of-type (bdi_eot) and end-of-input
//    (bdi_eoi, last block of the segment marked last) flags.
// The instruction, and the header of the plaintext or ciphertext segment, are
// also passed to the postprocessor on the cmd channel, so it knows the mode and
// the message length.
//
// Word formats (see dsec_pkg): instruction opcode in [31:28]; segment header
// with type in [31:28], last in [25], length in bytes in [15:0]; a zero-length
// segment gives one empty block. All channels are valid/ready.
// Timing: one PDI word per cycle; a block is offered the cycle after its last
// word and the next word is taken once the block is accepted.
//
// The four tasks, the PDI/SDI split and valid/ready handshaking follow the
// source design. The word formats, the 32-bit word width, the 128-bit block and
// key (the largest of the three ciphers) and the 10* padding are this design's
// choices; a core needing another padding can rebuild it from bdi_size.
module preprocessor
  import dsec_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // public data in
  input  logic              pdi_valid,
  output logic              pdi_ready,
  input  logic [W-1:0]      pdi_data,
  // secret data in
  input  logic              sdi_valid,
  output logic              sdi_ready,
  input  logic [W-1:0]      sdi_data,
  // to the cipher core
  output logic [KEY_BITS-1:0]   key,
  output logic                  key_valid,
  input  logic                  key_ready,
  output logic [BLOCK_BITS-1:0] bdi,
  output logic [4:0]            bdi_size,
  output seg_e                  bdi_type,
  output logic                  bdi_eot,
  output logic                  bdi_eoi,
  output logic                  bdi_pad,
  output logic                  bdi_valid,
  input  logic                  bdi_ready,
  output logic                  decrypt,
  // to the postprocessor
  output pp_cmd_t           cmd,
  output logic              cmd_valid,
  input  logic              cmd_ready,
  // monitoring
  output logic [15:0]       bytes_left
);

  typedef enum logic [3:0] {
    S_INSTR, S_KHDR, S_KDATA, S_KOUT, S_CMD_I, S_HDR, S_CMD_M, S_DATA, S_OUT
  } state_e;

  state_e                state;
  logic [BLOCK_BITS-1:0] blk;
  logic [4:0]            blk_bytes;
  logic [1:0]            widx;
  logic [2:0]            kwords;
  seg_e                  seg_type;
  logic                  seg_last;
  seg_hdr_t              hdr;
  logic [2:0]            wbytes;     // bytes carried by the current word

  assign hdr    = seg_hdr_t'(pdi_data);
  assign wbytes = (bytes_left >= 16'd4) ? 3'd4 : bytes_left[2:0];

  assign pdi_ready = (state == S_INSTR) || (state == S_HDR) || (state == S_DATA);
  assign sdi_ready = (state == S_KHDR) || (state == S_KDATA);
  assign key_valid = (state == S_KOUT);
  assign bdi_valid = (state == S_OUT);
  assign cmd_valid = (state == S_CMD_I) || (state == S_CMD_M);
  assign cmd       = '{is_msg: (state == S_CMD_M), decrypt: decrypt, len: bytes_left};

  // Clear bytes past the end and insert the 0x80 padding byte.
  always_comb begin
    for (int b = 0; b < BLOCK_BITS/8; b++) begin
      if (b < int'(blk_bytes))       bdi[BLOCK_BITS-1-8*b -: 8] = blk[BLOCK_BITS-1-8*b -: 8];
      else if (b == int'(blk_bytes)) bdi[BLOCK_BITS-1-8*b -: 8] = 8'h80;
      else                           bdi[BLOCK_BITS-1-8*b -: 8] = 8'h00;
    end
  end
  assign bdi_size = blk_bytes;
  assign bdi_pad  = (blk_bytes != 5'(BLOCK_BITS/8));
  assign bdi_type = seg_type;
  assign bdi_eot  = (bytes_left == 16'd0);
  assign bdi_eoi  = (bytes_left == 16'd0) && seg_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_INSTR;
      key        <= '0;
      blk        <= '0;
      blk_bytes  <= '0;
      widx       <= '0;
      kwords     <= '0;
      seg_type   <= SEG_AD;
      seg_last   <= 1'b0;
      decrypt    <= 1'b0;
      bytes_left <= '0;
    end else begin
      unique case (state)
        S_INSTR:
          if (pdi_valid) begin
            if (pdi_data[31:28] == OP_ACTKEY) state <= S_KHDR;
            else if (pdi_data[31:28] == OP_ENC || pdi_data[31:28] == OP_DEC) begin
              decrypt <= (pdi_data[31:28] == OP_DEC);
              state   <= S_CMD_I;
            end
          end
        S_KHDR:
          if (sdi_valid) begin
            kwords <= '0;
            state  <= S_KDATA;
          end
        S_KDATA:
          if (sdi_valid) begin
            key    <= {key[KEY_BITS-W-1:0], sdi_data};
            kwords <= kwords + 1'b1;
            if (kwords == 3'(KEY_BITS/W - 1)) state <= S_KOUT;
          end
        S_KOUT:
          if (key_ready) state <= S_INSTR;
        S_CMD_I:
          if (cmd_ready) state <= S_HDR;
        S_HDR:
          if (pdi_valid) begin
            seg_type   <= hdr.stype;
            seg_last   <= hdr.last;
            bytes_left <= hdr.len;
            blk        <= '0;
            blk_bytes  <= '0;
            widx       <= '0;
            if (hdr.stype == SEG_PT || hdr.stype == SEG_CT) state <= S_CMD_M;
            else if (hdr.len == 16'd0)                     state <= S_OUT;
            else                                           state <= S_DATA;
          end
        S_CMD_M:
          if (cmd_ready) state <= (bytes_left == 16'd0) ? S_OUT : S_DATA;
        S_DATA:
          if (pdi_valid) begin
            blk[BLOCK_BITS-1-W*widx -: W] <= pdi_data;
            blk_bytes  <= blk_bytes + 5'(wbytes);
            bytes_left <= bytes_left - 16'(wbytes);
            widx       <= widx + 1'b1;
            if (widx == 2'(BLOCK_BITS/W - 1) || bytes_left <= 16'd4) state <= S_OUT;
          end
        S_OUT:
          if (bdi_ready) begin
            blk       <= '0;
            blk_bytes <= '0;
            widx      <= '0;
            if (bytes_left != 16'd0) state <= S_DATA;
            else if (seg_last)       state <= S_INSTR;
            else                     state <= S_HDR;
          end
        default: state <= S_INSTR;
      endcase
    end
  end

endmodule
