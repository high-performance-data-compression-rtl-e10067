// dsec_pkg: types and constants shared by the dynamic IoT security design.
//
// The design switches one reconfigurable partition between three authenticated
// ciphers (AEGIS, ASCON, Deoxys-II), picks the next cipher either by an LFSR
// (algorithm hopping) or by the device power level (power adaptive), and loads
// the cipher's partial bitstream after LZ4 decompression. This package holds the
// cipher identifiers, the selection modes and the word formats of the AEAD
// interface (public data in, secret data in, data out).
//
// The cipher names, the two selection modes and the three AEAD buses follow the
// source design. The numeric codes (cipher IDs, opcodes, segment types, status
// words) and the 32-bit header layout are this design's own choices, modelled on
// the usual hardware API for CAESAR ciphers.
package dsec_pkg;

  // Cipher held in the reconfigurable partition. Code 2'b11 names no cipher.
  typedef enum logic [1:0] {
    CIPHER_AEGIS  = 2'd0,
    CIPHER_ASCON  = 2'd1,
    CIPHER_DEOXYS = 2'd2
  } cipher_e;

  // How the next cipher is chosen.
  typedef enum logic {
    SEL_HOPPING = 1'b0,   // LFSR pseudorandom choice per session
    SEL_POWER   = 1'b1    // choice by system power level
  } sel_mode_e;

  // Power level classes used by the power adaptive selector.
  typedef enum logic [1:0] {
    PWR_LOW  = 2'd0,
    PWR_MID  = 2'd1,
    PWR_HIGH = 2'd2
  } pwr_class_e;

  // Interface word width (PDI, SDI, DO) and cipher block sizes. The block, key,
  // nonce and tag sizes are the largest among the three ciphers, shared by all.
  localparam int unsigned W          = 32;
  localparam int unsigned BLOCK_BITS = 128;
  localparam int unsigned KEY_BITS   = 128;
  localparam int unsigned TAG_BYTES  = 16;

  // Instruction opcodes, bits [31:28] of the first PDI word of a command.
  typedef enum logic [3:0] {
    OP_ENC    = 4'h2,
    OP_DEC    = 4'h3,
    OP_ACTKEY = 4'h7
  } opcode_e;

  // Segment types, bits [31:28] of a segment header word.
  typedef enum logic [3:0] {
    SEG_AD   = 4'h1,
    SEG_PT   = 4'h4,
    SEG_CT   = 4'h5,
    SEG_TAG  = 4'h8,
    SEG_KEY  = 4'hC,
    SEG_NPUB = 4'hD
  } seg_e;

  // Status words closing every DO message.
  localparam logic [W-1:0] STATUS_SUCCESS = 32'hE000_0000;
  localparam logic [W-1:0] STATUS_FAILURE = 32'hF000_0000;

  // Segment header: [31:28] type, [25] last segment of the command,
  // [15:0] segment length in bytes.
  typedef struct packed {
    seg_e        stype;
    logic [1:0]  rsvd0;
    logic        last;
    logic [8:0]  rsvd1;
    logic [15:0] len;
  } seg_hdr_t;

  function automatic logic [W-1:0] make_hdr(seg_e t, logic last, logic [15:0] len);
    seg_hdr_t h;
    h = '0;
    h.stype = t;
    h.last  = last;
    h.len   = len;
    return h;
  endfunction

  // Command passed from the preprocessor to the postprocessor.
  typedef struct packed {
    logic        is_msg;   // 0: instruction, 1: message segment header
    logic        decrypt;  // instruction was OP_DEC
    logic [15:0] len;      // message length in bytes
  } pp_cmd_t;

endpackage
