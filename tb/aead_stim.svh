// Shared by the AEAD testbenches: builds PDI and SDI word streams in the
// formats of dsec_pkg (opcode or segment header, then data words with the
// first byte in bits [31:24]).
function automatic void push_seg(ref logic [31:0] q[$], input dsec_pkg::seg_e t,
                                 input bit last, input byte unsigned d[$]);
  logic [31:0] w;
  q.push_back(dsec_pkg::make_hdr(t, last, 16'(d.size())));
  for (int k = 0; k < d.size(); k += 4) begin
    w = '0;
    for (int j = 0; j < 4; j++)
      if (k + j < d.size()) w[31-8*j -: 8] = d[k+j];
    q.push_back(w);
  end
endfunction

function automatic void build_cmd(ref logic [31:0] q[$], input bit dec,
                                  input byte unsigned npub[$], input byte unsigned ad[$],
                                  input byte unsigned msg[$], input byte unsigned tag[$]);
  q.push_back({dec ? dsec_pkg::OP_DEC : dsec_pkg::OP_ENC, 28'h0});
  push_seg(q, dsec_pkg::SEG_NPUB, 1'b0, npub);
  push_seg(q, dsec_pkg::SEG_AD, 1'b0, ad);
  push_seg(q, dec ? dsec_pkg::SEG_CT : dsec_pkg::SEG_PT, !dec, msg);
  if (dec) push_seg(q, dsec_pkg::SEG_TAG, 1'b1, tag);
endfunction

function automatic void rand_bytes(ref byte unsigned d[$], input int n);
  d.delete();
  for (int k = 0; k < n; k++) d.push_back(8'($urandom));
endfunction
