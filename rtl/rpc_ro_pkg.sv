// Shared types and constants of the RPC readout chain.
//
// The link system compresses the 24 strip bits a link carries per bunch
// crossing (BX) by cutting them into 6 partitions of 4 bits and sending only the
// non-empty partitions, one packet per 40 MHz clock. A packet carries the
// partition bits, the partition number, the number of clocks it waited in the
// compressor (delay) and an end-of-data flag on the last packet of its BX.
// 24 bits in 6 partitions follows the description of the compression
// algorithm; the field widths of the packet are this design's choice
// (3-bit delay, so a partition may wait at most 7 clocks).
//
// The readout builds events out of 16-bit words. The two top bits are a tag:
//   11  event header: event number (L1Accept count) modulo 2^14
//   10  BX header: bunch crossing number (0..3563) at the L1Accept
//   01  link header: global link number [13:8], packet count [3:0]
//   00  data word: one compressed packet in bits [10:0]
// One packet is one data word, as the readout is specified; the tags and the
// header words are this design's choice.
package rpc_ro_pkg;

  localparam int unsigned HIT_BITS     = 24;  // strips per link and BX
  localparam int unsigned N_PART       = 6;   // partitions per BX
  localparam int unsigned PART_BITS    = HIT_BITS / N_PART;
  localparam int unsigned PNUM_BITS    = 3;
  localparam int unsigned DELAY_BITS   = 3;
  localparam int unsigned MAX_DELAY    = (1 << DELAY_BITS) - 1;
  localparam int unsigned BX_PER_ORBIT = 3564;  // LHC bunch crossings per orbit
  localparam int unsigned SLOTS        = 8;     // packet slots per BX / per page (>= N_PART)
  localparam int unsigned SRB_PAGES    = 16;    // event pages in each SRB buffer

  typedef logic [HIT_BITS-1:0] hits_t;

  typedef struct packed {
    logic [PART_BITS-1:0]  data;   // partition bits
    logic [PNUM_BITS-1:0]  pnum;   // partition number 0..N_PART-1
    logic [DELAY_BITS-1:0] delay;  // clocks waited in the compressor
    logic                  eod;    // last packet of its BX
  } packet_t;

  localparam int unsigned PKT_BITS = $bits(packet_t);

  typedef logic [15:0] word_t;

  typedef enum logic [1:0] {
    TAG_DAT = 2'b00,
    TAG_LNK = 2'b01,
    TAG_BXH = 2'b10,
    TAG_EVH = 2'b11
  } tag_t;

  // Local readout bus request from the MRB to the SRBs of a crate. Read data
  // come back on the next clock (pipelined: one request per clock).
  typedef struct packed {
    logic       rd;     // read strobe
    logic [2:0] board;  // SRB number in the crate
    logic [2:0] chan;   // channel (link) on the SRB
    logic [3:0] page;   // event page = event number mod SRB_PAGES
    logic       len;    // 1: read the packet count of the page
    logic [2:0] word;   // packet index within the page
  } lb_req_t;

  function automatic word_t mk_evh(input logic [13:0] ev);
    return {TAG_EVH, ev};
  endfunction

  function automatic word_t mk_bxh(input logic [11:0] bx);
    return {TAG_BXH, 2'b00, bx};
  endfunction

  function automatic word_t mk_lnk(input logic [5:0] link, input logic [3:0] cnt);
    return {TAG_LNK, link, 4'b0000, cnt};
  endfunction

  function automatic word_t mk_dat(input packet_t p);
    return {TAG_DAT, {(14 - PKT_BITS){1'b0}}, p};
  endfunction

endpackage
