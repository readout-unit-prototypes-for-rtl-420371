// Shared types and constants of the Readout Unit (RU).
//
// Transactions on every PCI bus of the RU are modelled at packet level: one
// 64-bit header word (target address and payload length) followed by that many
// 64-bit payload words, carried on a valid/ready stream. The address map uses
// the top four address bits as a region number; each bus agent and each bridge
// port claims a set of regions. Event fragments carry one 64-bit event header
// word (status, event number, word count, first memory block) ahead of their
// data words. The field layout, the region numbers and the command codes are
// choices of this design; the document gives the header's contents, not its
// encoding.
package ru_pkg;

  // ---- PCI packet header ----------------------------------------------------
  localparam int unsigned ADDR_W  = 32;
  localparam int unsigned LEN_W   = 16;

  typedef struct packed {
    logic [ADDR_W-1:0] addr;   // target address, [31:28] is the region
    logic [15:0]       tag;    // free for the initiator
    logic [LEN_W-1:0]  len;    // number of payload words that follow
  } pci_hdr_t;

  function automatic logic [3:0] region_of(input logic [63:0] hdr_word);
    return hdr_word[63:60];
  endfunction

  function automatic logic [LEN_W-1:0] len_of(input logic [63:0] hdr_word);
    return hdr_word[LEN_W-1:0];
  endfunction

  // ---- Address map (regions) ------------------------------------------------
  localparam logic [3:0] REG_HOST      = 4'd0;  // host memory
  localparam logic [3:0] REG_RUM_IN    = 4'd1;  // RUM input interface, event data
  localparam logic [3:0] REG_RUM_CMD   = 4'd2;  // RUM output interface, requests
  localparam logic [3:0] REG_BDN       = 4'd3;  // builder network card (output RUIO)
  localparam logic [3:0] REG_RUM_LB    = 4'd4;  // RUM local bus (bus #3)
  localparam logic [3:0] REG_RUIOI_LB  = 4'd6;  // input RUIO local bus (IOP)
  localparam logic [3:0] REG_RUIOO_LB  = 4'd7;  // output RUIO local bus (IOP)
  localparam logic [3:0] REG_FED       = 4'd8;  // front-end driver card (input RUIO)

  // ---- Event fragments --------------------------------------------------------
  localparam int unsigned EVID_W = 24;
  localparam int unsigned WC_W   = 12;
  localparam int unsigned BLK_W  = 20;

  typedef struct packed {
    logic [7:0]        status;      // bit 7 set by the RU: event not found
    logic [EVID_W-1:0] event_id;
    logic [WC_W-1:0]   word_count;  // data words after this header
    logic [BLK_W-1:0]  first_blk;   // filled in by the RU
  } ev_hdr_t;

  localparam int unsigned ST_MISSING = 7;

  // ---- Requests to the RUM output interface -----------------------------------
  typedef enum logic [7:0] {
    OP_SEND    = 8'h01,   // send the fragment to the address in the request
    OP_RELEASE = 8'h02    // free the memory held by the fragment
  } ru_op_e;

  typedef struct packed {
    ru_op_e            op;
    logic [EVID_W-1:0] event_id;
    logic [ADDR_W-1:0] dest;      // destination address for OP_SEND
  } ru_cmd_t;

  // Command to the MMU
  typedef struct packed {
    ru_op_e            op;
    logic [EVID_W-1:0] event_id;
  } mmu_cmd_t;

  // Read descriptor from the MMU output sequencer to the memory controller
  typedef struct packed {
    logic             first;   // first block of the event: emit header first
    logic             last;    // last block of the event
    ev_hdr_t          hdr;     // event header (valid with first)
    logic [BLK_W-1:0] blk;     // block to read
    logic [WC_W-1:0]  nwords;  // words to read from this block
  } rd_desc_t;

  // Words of the RUM port FIFOs (two 36-bit FIFOs side by side = 72 bits)
  typedef struct packed {
    logic        first;   // event header word
    logic        last;    // last word of a fragment (output side only)
    logic [5:0]  spare;
    logic [63:0] data;
  } fifo_word_t;

endpackage
