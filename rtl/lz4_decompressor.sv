// lz4_decompressor: streaming LZ4 block decoder, one output byte per cycle.
//
// An LZ4 block is a run of sequences. Each sequence starts with a token byte:
// its high nibble is the literal count and its low nibble the match length
// minus 4. A nibble of 15 is extended by further bytes that are added to it
// until a byte other than 255 appears. The literals follow and are copied to
// the output. Then comes a two-byte little-endian offset, and the match:
// match-length bytes copied from "offset" bytes back in what has already been
// produced. Copying one byte per cycle from a history window makes overlapping
// matches (offset smaller than the length) work without special handling. The
// last sequence of a block carries literals only; its last literal is marked by
// in_last on the input.
//
// Interface: bytes in on in_valid/in_ready/in_data with in_last on the final
// byte of a block; bytes out on out_valid/out_ready/out_data with out_last on
// the final byte of the block. Literals pass straight from input to output in
// the same cycle; match bytes come from the window. error is sticky and flags
// a zero offset or a block that ends in the middle of a sequence.
// Timing: one output byte per cycle when neither side stalls; each token,
// length-extension and offset byte costs one extra cycle.
//
// The LZ4 sequence format (token, literal length, literals, offset, match
// length) follows the source design and the public LZ4 block format. Decoding
// in hardware one byte per cycle, the 64 KiB window (the largest offset LZ4 can
// express) and the end-of-block marking by in_last are this design's choices.
module lz4_decompressor #(
  parameter int unsigned WIN_AW = 16     // window of 2**WIN_AW bytes
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  input  logic       in_last,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_data,
  output logic       out_last,
  output logic       error
);

  typedef enum logic [2:0] {
    S_TOKEN, S_LITEXT, S_LIT, S_OFF0, S_OFF1, S_MLEXT, S_COPY
  } state_e;

  state_e            state;
  logic [7:0]        hist [2**WIN_AW];
  logic [WIN_AW-1:0] wptr;
  logic [31:0]       lit_cnt;    // literals still to copy
  logic [31:0]       mat_cnt;    // match bytes still to copy
  logic [3:0]        mat_nib;
  logic [15:0]       offset;

  logic       in_fire, out_fire;
  logic [7:0] copy_byte;

  assign copy_byte = hist[wptr - WIN_AW'(offset)];

  always_comb begin
    in_ready  = 1'b0;
    out_valid = 1'b0;
    out_data  = in_data;
    out_last  = 1'b0;
    unique case (state)
      S_LIT: begin
        in_ready  = out_ready;
        out_valid = in_valid;
        out_last  = in_last && (lit_cnt == 32'd1);
      end
      S_COPY: begin
        out_valid = 1'b1;
        out_data  = copy_byte;
      end
      default: in_ready = 1'b1;
    endcase
  end

  assign in_fire  = in_valid && in_ready;
  assign out_fire = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (out_fire) hist[wptr] <= out_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_TOKEN;
      wptr    <= '0;
      lit_cnt <= '0;
      mat_cnt <= '0;
      mat_nib <= '0;
      offset  <= '0;
      error   <= 1'b0;
    end else begin
      if (out_fire) wptr <= wptr + 1'b1;
      unique case (state)
        S_TOKEN:
          if (in_fire) begin
            lit_cnt <= 32'(in_data[7:4]);
            mat_nib <= in_data[3:0];
            if (in_last) begin
              // A block that ends on a token must hold no literals.
              if (in_data[7:4] != 4'd0) error <= 1'b1;
              state <= S_TOKEN;
            end else if (in_data[7:4] == 4'd15) state <= S_LITEXT;
            else if (in_data[7:4] == 4'd0)      state <= S_OFF0;
            else                                state <= S_LIT;
          end
        S_LITEXT:
          if (in_fire) begin
            lit_cnt <= lit_cnt + 32'(in_data);
            if (in_last) begin
              error <= 1'b1;
              state <= S_TOKEN;
            end else if (in_data != 8'd255) state <= S_LIT;
          end
        S_LIT:
          if (in_fire) begin
            lit_cnt <= lit_cnt - 1'b1;
            if (lit_cnt == 32'd1) state <= in_last ? S_TOKEN : S_OFF0;
            else if (in_last) begin
              error <= 1'b1;
              state <= S_TOKEN;
            end
          end
        S_OFF0:
          if (in_fire) begin
            offset[7:0] <= in_data;
            if (in_last) begin
              error <= 1'b1;
              state <= S_TOKEN;
            end else state <= S_OFF1;
          end
        S_OFF1:
          if (in_fire) begin
            offset[15:8] <= in_data;
            mat_cnt      <= 32'(mat_nib) + 32'd4;
            if (in_last || {in_data, offset[7:0]} == 16'd0) begin
              error <= 1'b1;
              state <= S_TOKEN;
            end else state <= (mat_nib == 4'd15) ? S_MLEXT : S_COPY;
          end
        S_MLEXT:
          if (in_fire) begin
            mat_cnt <= mat_cnt + 32'(in_data);
            if (in_last) begin
              error <= 1'b1;
              state <= S_TOKEN;
            end else if (in_data != 8'd255) state <= S_COPY;
          end
        S_COPY:
          if (out_fire) begin
            mat_cnt <= mat_cnt - 1'b1;
            if (mat_cnt == 32'd1) state <= S_TOKEN;
          end
        default: state <= S_TOKEN;
      endcase
    end
  end

endmodule
