// Shared by the LZ4 testbenches: builds a random LZ4 block together with the
// data it decodes to. Literal and match lengths cover the 4-bit field, one
// extension byte and several extension bytes; offsets include 1 and values
// below the match length (overlapping copies). The last sequence holds only
// literals, as in every LZ4 block.
function automatic void lz4_add_len(ref byte unsigned blk[$], input int unsigned rem);
  while (rem >= 255) begin blk.push_back(8'd255); rem -= 255; end
  blk.push_back(8'(rem));
endfunction

function automatic void lz4_gen_block(ref byte unsigned blk[$], ref byte unsigned plain[$],
                                      input int unsigned nseq, input int unsigned max_off);
  int unsigned lit, ml, off, pick;
  for (int unsigned s = 0; s <= nseq; s++) begin
    pick = $urandom % 10;
    lit  = (pick < 5) ? $urandom % 15 : (pick < 8) ? 15 + $urandom % 240 : 255 + $urandom % 400;
    if (s == 0 || s == nseq) lit = lit + 5;
    pick = $urandom % 10;
    ml   = (pick < 5) ? 4 + $urandom % 15 : (pick < 8) ? 19 + $urandom % 240 : 274 + $urandom % 600;
    blk.push_back({(lit >= 15) ? 4'd15 : 4'(lit), (s == nseq) ? 4'd0 : ((ml - 4 >= 15) ? 4'd15 : 4'(ml - 4))});
    if (lit >= 15) lz4_add_len(blk, lit - 15);
    for (int unsigned k = 0; k < lit; k++) begin
      byte unsigned b = 8'($urandom % 4);   // small alphabet
      blk.push_back(b);
      plain.push_back(b);
    end
    if (s == nseq) break;
    pick = $urandom % 4;
    off = (pick == 0) ? 1 : (pick == 1) ? 1 + $urandom % 8 : 1 + $urandom % plain.size();
    if (off > plain.size()) off = plain.size();
    if (off > max_off) off = max_off;
    blk.push_back(8'(off));
    blk.push_back(8'(off >> 8));
    if (ml - 4 >= 15) lz4_add_len(blk, ml - 19);
    for (int unsigned k = 0; k < ml; k++) plain.push_back(plain[plain.size() - off]);
  end
endfunction

// Builds a block that decodes to exactly "target" bytes (target >= 1000),
// with bytes drawn from a small alphabet offset by "flavour".
function automatic void lz4_gen_exact(ref byte unsigned blk[$], ref byte unsigned plain[$],
                                      input int unsigned target, input byte unsigned flavour);
  int unsigned lit, ml, off;
  while (plain.size() + 1200 < target) begin
    lit = ($urandom % 4 == 0) ? 15 + $urandom % 300 : $urandom % 15;
    ml  = ($urandom % 4 == 0) ? 19 + $urandom % 800 : 4 + $urandom % 15;
    if (plain.size() == 0 && lit == 0) lit = 1;
    blk.push_back({(lit >= 15) ? 4'd15 : 4'(lit), (ml - 4 >= 15) ? 4'd15 : 4'(ml - 4)});
    if (lit >= 15) lz4_add_len(blk, lit - 15);
    for (int unsigned k = 0; k < lit; k++) begin
      byte unsigned b = 8'(flavour + $urandom % 5);
      blk.push_back(b);
      plain.push_back(b);
    end
    off = 1 + $urandom % ((plain.size() < 3000) ? plain.size() : 3000);
    blk.push_back(8'(off));
    blk.push_back(8'(off >> 8));
    if (ml - 4 >= 15) lz4_add_len(blk, ml - 19);
    for (int unsigned k = 0; k < ml; k++) plain.push_back(plain[plain.size() - off]);
  end
  lit = target - plain.size();
  blk.push_back({4'd15, 4'd0});
  lz4_add_len(blk, lit - 15);
  for (int unsigned k = 0; k < lit; k++) begin
    byte unsigned b = 8'(flavour + $urandom % 7);
    blk.push_back(b);
    plain.push_back(b);
  end
endfunction
