// aead_top: the AEAD hardware interface around the reconfigurable cipher core.
//
// It joins the preprocessor (PDI and SDI words in, key and 128-bit blocks out)
// and the postprocessor (128-bit blocks in, DO words out). The cipher core sits
// between them in the reconfigurable partition and is swapped by partial
// reconfiguration, so its side of the interface is brought out as ports: key,
// bdi (block data in) and bdo (block data out) with their flags, and the
// authentication result of a decryption.
//
// Interface: PDI, SDI and DO are 32-bit valid/ready streams; the core side is
// described in preprocessor and postprocessor. Timing is theirs.
//
// The three buses (public data in, secret data in, data out), valid/ready
// handshaking, and a static port wide enough for the largest parameters of the
// three ciphers follow the source design; the port formats are this design's.
module aead_top
  import dsec_pkg::*;
#(
  parameter int unsigned MSG_AW = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  pdi_valid,
  output logic                  pdi_ready,
  input  logic [W-1:0]          pdi_data,
  input  logic                  sdi_valid,
  output logic                  sdi_ready,
  input  logic [W-1:0]          sdi_data,
  output logic                  do_valid,
  input  logic                  do_ready,
  output logic [W-1:0]          do_data,
  // cipher core side
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
  input  logic [BLOCK_BITS-1:0] bdo,
  input  logic [4:0]            bdo_size,
  input  seg_e                  bdo_type,
  input  logic                  bdo_valid,
  output logic                  bdo_ready,
  input  logic                  msg_auth_valid,
  input  logic                  msg_auth,
  // monitoring
  output logic [15:0]           bytes_left,
  output logic                  overflow
);

  pp_cmd_t cmd;
  logic    cmd_valid, cmd_ready;

  preprocessor u_pre (
    .clk, .rst_n,
    .pdi_valid, .pdi_ready, .pdi_data,
    .sdi_valid, .sdi_ready, .sdi_data,
    .key, .key_valid, .key_ready,
    .bdi, .bdi_size, .bdi_type, .bdi_eot, .bdi_eoi, .bdi_pad, .bdi_valid, .bdi_ready,
    .decrypt,
    .cmd, .cmd_valid, .cmd_ready,
    .bytes_left
  );

  postprocessor #(.MSG_AW(MSG_AW)) u_post (
    .clk, .rst_n,
    .cmd, .cmd_valid, .cmd_ready,
    .bdo, .bdo_size, .bdo_type, .bdo_valid, .bdo_ready,
    .msg_auth_valid, .msg_auth,
    .do_valid, .do_ready, .do_data,
    .overflow
  );

endmodule
