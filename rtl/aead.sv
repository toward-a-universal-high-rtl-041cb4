// aead: the AEAD unit of the universal hardware interface for authenticated
// ciphers, without its algorithm-specific CipherCore.
//
// The unit talks to the outside through three w-bit valid/ready streams: PDI
// (public data: instructions, Npub, AD, message or ciphertext, tag), SDI
// (secret data: keys) and DO (data output). Inside, the PreProcessor turns the
// input streams into full blocks for the CipherCore, the PostProcessor turns
// the CipherCore's output blocks and tag back into a word stream, the Bypass
// FIFO carries the instruction, headers, Npub and AD around the CipherCore
// (its data input is the PDI bus), and the AUX FIFO holds a decryption's
// output until the tag has been checked. The wiring follows the block diagram
// of the AEAD. The CipherCore (datapath and controller) belongs to a
// particular cipher and is not part of this unit: its full-block interface is
// brought out as ports, with the signal names of the diagram. The output port
// do is named do_data because do is a SystemVerilog keyword.
//
// Reset is synchronous and active high. See pre_processor and post_processor
// for the protocol and the timing of each interface.
module aead
  import aead_pkg::*;
#(
  parameter int unsigned G_W          = 32,
  parameter int unsigned G_SW         = 32,
  parameter int unsigned KEY_SIZE     = 128,
  parameter int unsigned BLOCK_SIZE   = 128,
  parameter int unsigned IV_SIZE      = 128,
  parameter int unsigned G_TAG_SIZE   = 128,
  parameter int unsigned CTR_AD_SIZE  = 32,
  parameter int unsigned CTR_D_SIZE   = 32,
  parameter int unsigned BYPASS_DEPTH = 16,
  parameter int unsigned AUX_DEPTH    = 512,
  localparam int unsigned G_BS_BYTES  = $clog2(BLOCK_SIZE/8)
) (
  input  logic                   clk,
  input  logic                   rst,
  // public data input
  input  logic [G_W-1:0]         pdi,
  input  logic                   pdi_valid,
  output logic                   pdi_ready,
  // secret data input
  input  logic [G_SW-1:0]        sdi,
  input  logic                   sdi_valid,
  output logic                   sdi_ready,
  // data output
  output logic [G_W-1:0]         do_data,
  output logic                   do_valid,
  input  logic                   do_ready,
  // CipherCore: inputs to it
  output logic [KEY_SIZE-1:0]    key,
  output logic [BLOCK_SIZE-1:0]  bdi,
  output logic [IV_SIZE-1:0]     iv,
  output logic [G_TAG_SIZE-1:0]  exp_tag,
  output logic [CTR_AD_SIZE-1:0] len_a,
  output logic [CTR_D_SIZE-1:0]  len_d,
  output logic                   key_needs_update,
  output logic                   key_ready,
  output logic                   iv_ready,
  output logic                   bdi_ready,
  output logic                   bdi_proc,
  output logic                   bdi_ad,
  output logic                   bdi_nsec,
  output logic                   bdi_decrypt,
  output logic                   bdi_eot,
  output logic                   bdi_eoi,
  output logic                   bdi_nodata,
  output logic [G_BS_BYTES-1:0]  bdi_size,
  output logic                   exp_tag_ready,
  output logic                   bdo_ready,
  output logic                   tag_ready,
  // CipherCore: outputs from it
  input  logic                   key_updated,
  input  logic                   bdi_read,
  input  logic [BLOCK_SIZE-1:0]  bdo,
  input  logic                   bdo_write,
  input  logic [G_BS_BYTES:0]    bdo_size,
  input  logic [G_TAG_SIZE-1:0]  tag,
  input  logic                   tag_write,
  input  logic                   msg_auth_valid,
  input  logic                   msg_auth_done
);
  logic           bypass_wr, bypass_full, bypass_rd, bypass_empty;
  logic [G_W-1:0] bypass_data;
  logic [G_W-1:0] aux_din, aux_dout;
  logic [3:0]     aux_ctrl;
  logic [2:0]     aux_status;

  pre_processor #(
    .G_W(G_W), .G_SW(G_SW), .KEY_SIZE(KEY_SIZE), .BLOCK_SIZE(BLOCK_SIZE),
    .IV_SIZE(IV_SIZE), .G_TAG_SIZE(G_TAG_SIZE),
    .CTR_AD_SIZE(CTR_AD_SIZE), .CTR_D_SIZE(CTR_D_SIZE)
  ) u_pre (
    .clk, .rst,
    .pdi, .pdi_valid, .pdi_ready,
    .sdi, .sdi_valid, .sdi_ready,
    .key, .bdi, .iv, .exp_tag, .len_a, .len_d,
    .key_updated, .key_needs_update, .key_ready, .iv_ready,
    .bdi_ready, .bdi_proc, .bdi_ad, .bdi_nsec, .bdi_decrypt, .bdi_eot,
    .bdi_eoi, .bdi_nodata, .bdi_read, .bdi_size, .exp_tag_ready,
    .msg_auth_done,
    .bypass_full, .bypass_wr
  );

  sync_fifo #(.W(G_W), .DEPTH(BYPASS_DEPTH)) u_bypass_fifo (
    .clk, .rst,
    .flush (1'b0),
    .write (bypass_wr),
    .din   (pdi),
    .full  (bypass_full),
    .read  (bypass_rd),
    .dout  (bypass_data),
    .empty (bypass_empty)
  );

  aux_fifo #(.W(G_W), .DEPTH(AUX_DEPTH)) u_aux_fifo (
    .clk, .rst,
    .din    (aux_din),
    .ctrl   (aux_ctrl),
    .dout   (aux_dout),
    .status (aux_status)
  );

  post_processor #(
    .G_W(G_W), .BLOCK_SIZE(BLOCK_SIZE), .G_TAG_SIZE(G_TAG_SIZE)
  ) u_post (
    .clk, .rst,
    .bdo_data (bdo),
    .tag_data (tag),
    .bdo_ready, .bdo_write, .bdo_size,
    .tag_ready, .tag_write,
    .msg_auth_valid, .msg_auth_done,
    .do_data, .do_valid, .do_ready,
    .bypass_rd, .bypass_empty, .bypass_data,
    .aux_fifo_din    (aux_din),
    .aux_fifo_ctrl   (aux_ctrl),
    .aux_fifo_dout   (aux_dout),
    .aux_fifo_status (aux_status)
  );

endmodule
