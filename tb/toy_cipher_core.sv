// toy_cipher_core: behavioural stand-in for the cipher core of the
// reconfigurable partition, for simulation only. It speaks the core side of
// the AEAD interface but its "cipher" is a plain XOR with the key and nonce,
// and its tag the XOR of all data blocks with the key; it offers no security.
// Output blocks carry the same byte count as the input blocks; an empty
// message block produces no output block. ID is reported so tests can see
// which cipher a session loaded.
module toy_cipher_core
  import dsec_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [KEY_BITS-1:0]   key,
  input  logic                  key_valid,
  output logic                  key_ready,
  input  logic [BLOCK_BITS-1:0] bdi,
  input  logic [4:0]            bdi_size,
  input  seg_e                  bdi_type,
  input  logic                  bdi_eot,
  input  logic                  bdi_valid,
  output logic                  bdi_ready,
  input  logic                  decrypt,
  output logic [BLOCK_BITS-1:0] bdo,
  output logic [4:0]            bdo_size,
  output seg_e                  bdo_type,
  output logic                  bdo_valid,
  input  logic                  bdo_ready,
  output logic                  msg_auth_valid,
  output logic                  msg_auth
);
  logic [KEY_BITS-1:0]   k;
  logic [BLOCK_BITS-1:0] npub, acc;
  logic                  tag_pending;

  function automatic logic [BLOCK_BITS-1:0] mask(logic [BLOCK_BITS-1:0] v, logic [4:0] n);
    logic [BLOCK_BITS-1:0] r = '0;
    for (int b = 0; b < 16; b++) if (b < int'(n)) r[127-8*b -: 8] = v[127-8*b -: 8];
    return r;
  endfunction

  assign key_ready = 1'b1;
  assign bdi_ready = !bdo_valid && !tag_pending && !msg_auth_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k <= '0; npub <= '0; acc <= '0; tag_pending <= 0;
      bdo <= '0; bdo_size <= '0; bdo_type <= SEG_CT; bdo_valid <= 0;
      msg_auth_valid <= 0; msg_auth <= 0;
    end else begin
      msg_auth_valid <= 1'b0;
      if (key_valid) k <= key;
      if (bdo_valid && bdo_ready) begin
        bdo_valid <= 1'b0;
      end else if (tag_pending && !bdo_valid) begin
        bdo <= acc ^ k; bdo_size <= 5'd16; bdo_type <= SEG_TAG; bdo_valid <= 1'b1;
        tag_pending <= 1'b0;
      end
      if (bdi_valid && bdi_ready) begin
        unique case (bdi_type)
          SEG_NPUB: begin npub <= bdi; acc <= '0; end
          SEG_AD:   acc <= acc ^ mask(bdi, bdi_size);
          SEG_PT, SEG_CT: begin
            acc <= acc ^ mask(decrypt ? (bdi ^ k ^ npub) : bdi, bdi_size);
            if (bdi_size != 0) begin
              bdo       <= mask(bdi ^ k ^ npub, bdi_size);
              bdo_size  <= bdi_size;
              bdo_type  <= decrypt ? SEG_PT : SEG_CT;
              bdo_valid <= 1'b1;
            end
            if (bdi_eot && !decrypt) tag_pending <= 1'b1;
          end
          SEG_TAG: begin
            msg_auth_valid <= 1'b1;
            msg_auth       <= (bdi == (acc ^ k));
          end
          default: ;
        endcase
      end
    end
  end
endmodule
