// lz4_compressor: block LZ4 compressor for partial bitstreams.
//
// A block of up to 2**BLOCK_AW bytes is first loaded into a buffer (the
// block ends at in_last or when the buffer is full). It is then encoded
// greedily in the five steps of LZ4:
//  1. hash computation: the four bytes at the current position are hashed
//     (multiplied by 2654435761, top HASH_AW bits kept) and a table gives the
//     last position that had the same hash; the table is then updated;
//  2. matching: the candidate is a match if it lies behind the current
//     position, within 65535 bytes, and its four bytes are equal;
//  3. backward matching: the match is grown backwards, one byte per cycle, into
//     the literals not yet emitted;
//  4. parameter calculation: the match is grown forwards one byte per cycle,
//     stopping 5 bytes before the end of the block;
//  5. data output: token, literal-length extension, literals, offset and
//     match-length extension are sent out one byte per cycle.
// Without a match the position advances by one. No match may start within the
// last 12 bytes, and the block ends with a literal-only sequence, as the LZ4
// block format requires. Stale table entries need no clearing: a candidate is
// always checked against the buffer before it is used.
//
// Interface: bytes in on in_valid/in_ready/in_data/in_last (in_ready is low
// while a block is being compressed); compressed bytes out on
// out_valid/out_ready/out_data with out_last on the final byte of the block;
// done pulses when the block is finished and comp_bytes holds its size.
// Timing: about 2 cycles per input byte without a match, one cycle per byte
// of match growth, one cycle per output byte.
//
// The LZ4 format and the five-step procedure follow the source design. The
// block buffer size (64 KiB, the smallest LZ4 frame block size), the 4096-entry
// hash table and the one-candidate greedy search are this design's choices.
module lz4_compressor #(
  parameter int unsigned BLOCK_AW = 16,  // block buffer of 2**BLOCK_AW bytes
  parameter int unsigned HASH_AW  = 12   // hash table of 2**HASH_AW entries
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [7:0]  in_data,
  input  logic        in_last,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  output logic        out_last,
  output logic        done,
  output logic [31:0] comp_bytes
);

  localparam int unsigned PW = BLOCK_AW + 1;   // position width

  typedef enum logic [3:0] {
    S_LOAD, S_HASH, S_CMP, S_BACK, S_EXT, S_TOK, S_LEXT, S_LITS,
    S_OFFL, S_OFFH, S_MEXT
  } state_e;

  state_e            state;
  logic [7:0]        buffer [2**BLOCK_AW];
  logic [PW-1:0]     htab   [2**HASH_AW];
  logic [PW-1:0]     n, i, anchor, cand, mlen, p, rem;
  logic              fin;

  logic              in_fire, out_fire;
  logic [31:0]       word_i;
  logic [HASH_AW-1:0] h;
  logic [PW-1:0]     lit, lit_end, offs, mcode;
  logic              cand_ok, offs_ok;

  function automatic logic [7:0] rd(logic [PW-1:0] a);
    return buffer[a[BLOCK_AW-1:0]];
  endfunction

  assign word_i  = {rd(i + PW'(3)), rd(i + PW'(2)), rd(i + PW'(1)), rd(i)};
  assign h       = HASH_AW'((word_i * 32'd2654435761) >> (32 - HASH_AW));
  assign lit_end = fin ? n : i;
  assign lit     = lit_end - anchor;
  assign offs    = i - cand;
  assign mcode   = mlen - PW'(4);
  // The 65,535-byte offset limit only binds when the block is larger than that.
  if (PW > 16) begin : g_far
    assign offs_ok = (offs <= PW'(65535));
  end else begin : g_near
    assign offs_ok = 1'b1;
  end
  assign cand_ok = (cand < i) && offs_ok &&
                   (rd(cand)          == rd(i))          &&
                   (rd(cand + PW'(1)) == rd(i + PW'(1))) &&
                   (rd(cand + PW'(2)) == rd(i + PW'(2))) &&
                   (rd(cand + PW'(3)) == rd(i + PW'(3)));

  assign in_ready = (state == S_LOAD);
  assign in_fire  = in_valid && in_ready;

  always_comb begin
    out_valid = 1'b1;
    out_data  = '0;
    out_last  = 1'b0;
    unique case (state)
      S_TOK:  out_data = {(lit >= PW'(15)) ? 4'd15 : lit[3:0],
                          fin ? 4'd0 : ((mcode >= PW'(15)) ? 4'd15 : mcode[3:0])};
      S_LEXT, S_MEXT:
              out_data = (rem >= PW'(255)) ? 8'd255 : rem[7:0];
      S_LITS: begin
              out_data = rd(p);
              out_last = fin && (p + 1'b1 == lit_end);
      end
      S_OFFL: out_data = offs[7:0];
      S_OFFH: out_data = 8'(offs >> 8);
      default: out_valid = 1'b0;
    endcase
  end
  assign out_fire = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (in_fire) buffer[n[BLOCK_AW-1:0]] <= in_data;
    if (state == S_HASH && !(i + PW'(12) > n)) htab[h] <= i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_LOAD;
      n          <= '0;
      i          <= '0;
      anchor     <= '0;
      cand       <= '0;
      mlen       <= '0;
      p          <= '0;
      rem        <= '0;
      fin        <= 1'b0;
      done       <= 1'b0;
      comp_bytes <= '0;
    end else begin
      done <= 1'b0;
      if (out_fire) comp_bytes <= comp_bytes + 1'b1;
      unique case (state)
        S_LOAD:
          if (in_fire) begin
            n <= n + 1'b1;
            if (n == 0) comp_bytes <= '0;
            if (in_last || n == PW'(2**BLOCK_AW - 1)) begin
              i      <= '0;
              anchor <= '0;
              fin    <= 1'b0;
              state  <= S_HASH;
            end
          end
        S_HASH:
          if (i + PW'(12) > n) begin
            fin   <= 1'b1;
            state <= S_TOK;
          end else begin
            cand  <= htab[h];
            state <= S_CMP;
          end
        S_CMP:
          if (cand_ok) begin
            mlen  <= PW'(4);
            state <= S_BACK;
          end else begin
            i     <= i + 1'b1;
            state <= S_HASH;
          end
        S_BACK:
          if (i > anchor && cand > 0 && rd(i - 1'b1) == rd(cand - 1'b1)) begin
            i    <= i - 1'b1;
            cand <= cand - 1'b1;
            mlen <= mlen + 1'b1;
          end else state <= S_EXT;
        S_EXT:
          if (i + mlen < n - PW'(5) && rd(i + mlen) == rd(cand + mlen))
            mlen <= mlen + 1'b1;
          else state <= S_TOK;
        S_TOK:
          if (out_fire) begin
            p <= anchor;
            if (lit >= PW'(15)) begin
              rem   <= lit - PW'(15);
              state <= S_LEXT;
            end else if (lit != 0) state <= S_LITS;
            else                   state <= S_OFFL;
          end
        S_LEXT:
          if (out_fire) begin
            if (rem >= PW'(255)) rem <= rem - PW'(255);
            else                 state <= S_LITS;
          end
        S_LITS:
          if (out_fire) begin
            p <= p + 1'b1;
            if (p + 1'b1 == lit_end) begin
              if (fin) begin
                done  <= 1'b1;
                n     <= '0;
                state <= S_LOAD;
              end else state <= S_OFFL;
            end
          end
        S_OFFL:
          if (out_fire) state <= S_OFFH;
        S_OFFH:
          if (out_fire) begin
            if (mcode >= PW'(15)) begin
              rem   <= mcode - PW'(15);
              state <= S_MEXT;
            end else begin
              i      <= i + mlen;
              anchor <= i + mlen;
              state  <= S_HASH;
            end
          end
        S_MEXT:
          if (out_fire) begin
            if (rem >= PW'(255)) rem <= rem - PW'(255);
            else begin
              i      <= i + mlen;
              anchor <= i + mlen;
              state  <= S_HASH;
            end
          end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
