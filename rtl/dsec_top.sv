// dsec_top: dynamic IoT security system, static part.
//
// One reconfigurable partition holds one of three authenticated ciphers
// (AEGIS, ASCON or Deoxys-II). For each session the partial reconfiguration
// controller picks the cipher (LFSR algorithm hopping or power adaptive),
// fetches its LZ4-compressed partial bitstream, decompresses it and writes it
// to the configuration port. Meanwhile the partition is decoupled: the AEAD
// interface is held in reset and the core handshakes are masked. Once the
// partition holds a cipher, message data flows from the processor side through
// the SDI and PDI asynchronous FIFOs, the preprocessor, the cipher core, the
// postprocessor and the DO FIFO back to the processor side.
// An LZ4 compressor, used once at start-up, turns the original bitstreams into
// the compressed ones the processor side stores.
//
// Clock domains: ps_clk (processor side: FIFO write ports of PDI/SDI, read port
// of DO, compressor) and pl_clk (programmable logic: AEAD interface and
// reconfiguration controller). rst_n resets both and must be released in
// step with both clocks.
//
// Ports brought out because the parts they connect to are outside this RTL:
//  - fetch_* / bs_*: the processor and its memory, which hold the compressed
//    bitstreams;
//  - icap_*: the configuration port (the vendor's ICAP controller and
//    configuration memory);
//  - core_*: the cipher core in the reconfigurable partition;
//  - cmp_*: the compressor's input and output, fed from and stored to memory
//    by the processor.
//
// The partitioning, the selection techniques, the FIFOs at the AEAD ports
// and the LZ4 compression of partial bitstreams follow the source design.
// Decompressing next to the configuration port instead of on the processor,
// the decoupling and all port formats are this design's choices.
module dsec_top
  import dsec_pkg::*;
#(
  parameter int unsigned BITSTREAM_BYTES = 724760,
  parameter int unsigned WIN_AW          = 16,
  parameter int unsigned CMP_BLOCK_AW    = 16,
  parameter int unsigned HASH_AW         = 12,
  parameter int unsigned FIFO_AW         = 4,
  parameter int unsigned MSG_AW          = 8,
  parameter int unsigned LEVEL_W         = 8,
  parameter int unsigned MID_TH          = 85,
  parameter int unsigned HIGH_TH         = 170
) (
  input  logic               pl_clk,
  input  logic               ps_clk,
  input  logic               rst_n,
  // cipher selection
  input  sel_mode_e          mode,
  input  logic [LEVEL_W-1:0] level,
  input  logic               seed_load,
  input  logic [2:0]         seed,
  input  logic               session_req,
  output logic               pr_busy,
  // compressed bitstream from the processor side (pl_clk)
  output logic               fetch_req,
  output cipher_e            fetch_id,
  input  logic               bs_valid,
  output logic               bs_ready,
  input  logic [7:0]         bs_data,
  input  logic               bs_last,
  // configuration port (pl_clk)
  output logic               icap_valid,
  input  logic               icap_ready,
  output logic [31:0]        icap_data,
  // partition status (pl_clk)
  output logic               rp_decouple,
  output logic               rp_loaded,
  output cipher_e            rp_cipher,
  output logic               reconfig_done,
  output logic [31:0]        reconfig_cycles,
  output logic [31:0]        lfsr_skips,
  output logic               decomp_error,
  // processor side FIFO ports (ps_clk)
  input  logic               pdi_w_valid,
  output logic               pdi_w_ready,
  input  logic [W-1:0]       pdi_w_data,
  input  logic               sdi_w_valid,
  output logic               sdi_w_ready,
  input  logic [W-1:0]       sdi_w_data,
  output logic               do_r_valid,
  input  logic               do_r_ready,
  output logic [W-1:0]       do_r_data,
  // cipher core in the reconfigurable partition (pl_clk)
  output logic [KEY_BITS-1:0]   core_key,
  output logic                  core_key_valid,
  input  logic                  core_key_ready,
  output logic [BLOCK_BITS-1:0] core_bdi,
  output logic [4:0]            core_bdi_size,
  output seg_e                  core_bdi_type,
  output logic                  core_bdi_eot,
  output logic                  core_bdi_eoi,
  output logic                  core_bdi_pad,
  output logic                  core_bdi_valid,
  input  logic                  core_bdi_ready,
  output logic                  core_decrypt,
  input  logic [BLOCK_BITS-1:0] core_bdo,
  input  logic [4:0]            core_bdo_size,
  input  seg_e                  core_bdo_type,
  input  logic                  core_bdo_valid,
  output logic                  core_bdo_ready,
  input  logic                  core_msg_auth_valid,
  input  logic                  core_msg_auth,
  output logic                  msg_overflow,
  // LZ4 compressor (ps_clk)
  input  logic               cmp_in_valid,
  output logic               cmp_in_ready,
  input  logic [7:0]         cmp_in_data,
  input  logic               cmp_in_last,
  output logic               cmp_out_valid,
  input  logic               cmp_out_ready,
  output logic [7:0]         cmp_out_data,
  output logic               cmp_out_last,
  output logic               cmp_done,
  output logic [31:0]        cmp_bytes
);

  // Reconfiguration
  pr_controller #(
    .BITSTREAM_BYTES(BITSTREAM_BYTES), .WIN_AW(WIN_AW),
    .LEVEL_W(LEVEL_W), .MID_TH(MID_TH), .HIGH_TH(HIGH_TH)
  ) u_pr (
    .clk(pl_clk), .rst_n,
    .mode, .level, .seed_load, .seed, .session_req, .busy(pr_busy),
    .fetch_req, .fetch_id, .bs_valid, .bs_ready, .bs_data, .bs_last,
    .icap_valid, .icap_ready, .icap_data,
    .rp_decouple, .rp_loaded, .rp_cipher, .reconfig_done, .reconfig_cycles,
    .lfsr_skips, .decomp_error
  );

  // AEAD interface, held in reset while the partition is not usable
  logic         rp_live, aead_rst_n;
  logic         pdi_valid, pdi_ready, sdi_valid, sdi_ready, do_valid, do_ready;
  logic [W-1:0] pdi_data, sdi_data, do_data;
  logic         key_valid_i, bdi_valid_i, bdo_ready_i;

  assign rp_live    = rp_loaded && !rp_decouple;
  assign aead_rst_n = rst_n && rp_live;

  async_fifo #(.WIDTH(W), .AW(FIFO_AW)) u_pdi_fifo (
    .w_clk(ps_clk), .w_rst_n(rst_n), .w_valid(pdi_w_valid), .w_ready(pdi_w_ready), .w_data(pdi_w_data),
    .r_clk(pl_clk), .r_rst_n(rst_n), .r_valid(pdi_valid), .r_ready(pdi_ready && rp_live), .r_data(pdi_data)
  );

  async_fifo #(.WIDTH(W), .AW(FIFO_AW)) u_sdi_fifo (
    .w_clk(ps_clk), .w_rst_n(rst_n), .w_valid(sdi_w_valid), .w_ready(sdi_w_ready), .w_data(sdi_w_data),
    .r_clk(pl_clk), .r_rst_n(rst_n), .r_valid(sdi_valid), .r_ready(sdi_ready && rp_live), .r_data(sdi_data)
  );

  async_fifo #(.WIDTH(W), .AW(FIFO_AW)) u_do_fifo (
    .w_clk(pl_clk), .w_rst_n(rst_n), .w_valid(do_valid && rp_live), .w_ready(do_ready), .w_data(do_data),
    .r_clk(ps_clk), .r_rst_n(rst_n), .r_valid(do_r_valid), .r_ready(do_r_ready), .r_data(do_r_data)
  );

  aead_top #(.MSG_AW(MSG_AW)) u_aead (
    .clk(pl_clk), .rst_n(aead_rst_n),
    .pdi_valid(pdi_valid && rp_live), .pdi_ready, .pdi_data,
    .sdi_valid(sdi_valid && rp_live), .sdi_ready, .sdi_data,
    .do_valid, .do_ready, .do_data,
    .key(core_key), .key_valid(key_valid_i), .key_ready(core_key_ready && rp_live),
    .bdi(core_bdi), .bdi_size(core_bdi_size), .bdi_type(core_bdi_type),
    .bdi_eot(core_bdi_eot), .bdi_eoi(core_bdi_eoi), .bdi_pad(core_bdi_pad),
    .bdi_valid(bdi_valid_i), .bdi_ready(core_bdi_ready && rp_live),
    .decrypt(core_decrypt),
    .bdo(core_bdo), .bdo_size(core_bdo_size), .bdo_type(core_bdo_type),
    .bdo_valid(core_bdo_valid && rp_live), .bdo_ready(bdo_ready_i),
    .msg_auth_valid(core_msg_auth_valid && rp_live), .msg_auth(core_msg_auth),
    .bytes_left(), .overflow(msg_overflow)
  );

  assign core_key_valid = key_valid_i && rp_live;
  assign core_bdi_valid = bdi_valid_i && rp_live;
  assign core_bdo_ready = bdo_ready_i && rp_live;

  // Start-up compression of the original bitstreams
  lz4_compressor #(.BLOCK_AW(CMP_BLOCK_AW), .HASH_AW(HASH_AW)) u_lz4c (
    .clk(ps_clk), .rst_n,
    .in_valid(cmp_in_valid), .in_ready(cmp_in_ready), .in_data(cmp_in_data), .in_last(cmp_in_last),
    .out_valid(cmp_out_valid), .out_ready(cmp_out_ready), .out_data(cmp_out_data),
    .out_last(cmp_out_last), .done(cmp_done), .comp_bytes(cmp_bytes)
  );

endmodule
