// aead_pkg: constants shared by the AEAD PreProcessor, PostProcessor and top.
//
// The communication protocol moves three kinds of w-bit words: instructions,
// segment headers and segment data. An instruction is 24 bits, sent from the
// MSB of the word: Msg ID (8) | 0000 (4) | Opcode (4) | Key ID (8). A segment
// header is Msg ID (8) | Info (8) | zero fill | Seg Len (s), with Seg Len in the
// least significant s bits. Info holds the segment type in its upper nibble,
// EOI in bit 1 and EOT in bit 0. Opcodes and segment type codes are the
// protocol's own. The error word sent when a tag check fails is this design's
// choice (the protocol only says an error word is generated).
package aead_pkg;

  typedef enum logic [3:0] {
    OP_ENC     = 4'b0010,  // authenticated encryption
    OP_DEC     = 4'b0011,  // authenticated decryption
    OP_LDKEY   = 4'b0100,  // load key (secret data input)
    OP_ACTKEY  = 4'b0101   // activate key (public data input)
  } opcode_e;

  typedef enum logic [3:0] {
    ST_NPUB = 4'b0001,
    ST_AD   = 4'b0010,
    ST_MSG  = 4'b0011,
    ST_CT   = 4'b0100,
    ST_TAG  = 4'b0101,
    ST_KEY  = 4'b0110,
    ST_NSEC = 4'b1000
  } seg_type_e;

  // Width of the Seg Len field (s).
  localparam int unsigned SEGLEN_W = 16;

  // Info byte of a segment header.
  typedef struct packed {
    logic [3:0] seg_type;
    logic [1:0] reserved;
    logic       eoi;       // last segment of the input
    logic       eot;       // last segment of its type
  } info_t;

  // Upper byte of the error word sent instead of an unauthenticated message.
  localparam logic [7:0] ERR_CODE = 8'hF0;

endpackage
