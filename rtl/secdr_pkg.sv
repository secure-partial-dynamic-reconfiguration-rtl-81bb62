// secdr_pkg: types and constants shared by the secure-reconfiguration blocks.
//
// Two phases of operation, as in the published architecture: phase 1 receives a bitstream
// encrypted with the key shared with the IP source, checks it and re-encrypts
// it under a per-bitstream key for the external memory; phase 2 reads it
// back, decrypts it and hands the plaintext to the configuration port. The
// register map and slot count are this design's choices.
package secdr_pkg;

  typedef enum logic [0:0] {PHASE1 = 1'b0, PHASE2 = 1'b1} phase_e;

  // operations of a time-shared AES core (1-AES kernel)
  typedef enum logic [1:0] {OP_NONE = 2'd0, OP_D = 2'd1, OP_E = 2'd2, OP_M = 2'd3} op_e;


  // AXI4-Lite register map (byte addresses)
  localparam logic [7:0] REG_CTRL    = 8'h00; // [0] start, [1] phase, [2] mac_en, [3] key store write, [15:8] slot
  localparam logic [7:0] REG_STATUS  = 8'h04; // [0] busy, [1] done, [2] mac_ok, [3] mac_err
  localparam logic [7:0] REG_NBLOCKS = 8'h08; // number of 128-bit blocks in the run
  localparam logic [7:0] REG_KS      = 8'h10; // 0x10..0x1c shared key, word 0 = bits [127:96]
  localparam logic [7:0] REG_KI      = 8'h20; // 0x20..0x2c key to write into the key store
  localparam logic [7:0] REG_IV      = 8'h30; // 0x30..0x3c IV for all three chains
  localparam logic [7:0] REG_TAG     = 8'h40; // 0x40..0x4c tag: expected MAC (phase 1) / key store tag
  localparam logic [7:0] REG_MAC     = 8'h50; // 0x50..0x5c MAC computed by the last run (read only)
  localparam logic [7:0] REG_KSM     = 8'h60; // 0x60..0x6c shared MAC key
  localparam logic [7:0] REG_KIM     = 8'h70; // 0x70..0x7c MAC key to write into the key store

endpackage
