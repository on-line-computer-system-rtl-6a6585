// sds_if_pkg: word sizes, field layouts and shared types of the interface
// between the 24-bit SDS 9300 computer and the spectrometer equipment.
//
// The EOM (energize output from memory) buffer holds 15 bits. Three of
// them give the kind of transfer (the system op code), three choose one of
// eight sub-decoding blocks (the division), and the remaining nine are the
// address handed to that block. The standard group decoder splits the nine
// into 4 group lines and 5 device lines. The widths follow the document;
// the order of the fields inside the 15-bit word is this design's choice
// (op code on top, then division, then address).
//
// The input bus carries 24 data lines and a DEVICE READY line from the
// selected device; the RESET line runs the other way and is a separate
// signal in the modules.
package sds_if_pkg;

  localparam int WORD_W  = 24;  // computer word, PIN and POT lines
  localparam int EOM_W   = 15;  // EOM lines / EOM buffer flip-flops
  localparam int OP_W    = 3;   // system op code lines
  localparam int DIV_W   = 3;   // division (sub-decoder select) lines
  localparam int ADDR_W  = 9;   // address lines of a sub-decoder
  localparam int GROUP_W = 4;   // group lines of the standard decoder
  localparam int DEV_W   = 5;   // device lines inside a group
  localparam int N_DIV   = 1 << DIV_W;    // 8 sub-decoding blocks
  localparam int N_GROUP = 1 << GROUP_W;  // 16 groups
  localparam int N_DEV   = 1 << DEV_W;    // 32 devices per group
  localparam int N_LEVEL = 32;  // priority interrupt levels
  localparam int N_SENSE = 32;  // sense lines
  localparam int BCD_DIGITS = WORD_W / 4;  // 6 decimal digits per word

  typedef logic [WORD_W-1:0] word_t;

  typedef struct packed {
    logic [OP_W-1:0]   op;
    logic [DIV_W-1:0]  division;
    logic [ADDR_W-1:0] addr;
  } eom_word_t;

  // Transfer mode decoded from the system op code.
  typedef struct packed {
    logic convert;      // BCD<->binary conversion on this transfer
    logic reset_after;  // reset the device once its data is taken
    logic ready_test;   // special test: sample the DEVICE READY line
    logic [2:0] spare;  // remaining special tests, brought out as lines
  } xfer_mode_t;

  // What a local multiplexer drives onto the common input bus.
  typedef struct packed {
    word_t data;
    logic  ready;
  } in_bus_t;

endpackage
