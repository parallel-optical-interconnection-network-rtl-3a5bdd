// symnet_pkg: types and constants shared by the SYMNET address subnetwork.
//
// An address request travels on a bundle of parallel optical lanes (one lane
// per bit, m = b).  The bundle carries a request packet plus one extra lane for
// the snoop response, as in the delay formula of the design where b counts
// "one bit for snoop response".  The packet fields (operation, block address,
// source node, next-sharer pointer) are this design's own encoding; the widths
// assume a 32-bit physical address, 32-byte cache blocks, and node ids wide
// enough for 128 processors, the largest system the power budget supports.
package symnet_pkg;

  localparam int unsigned ADDR_W     = 32;               // physical address bits (assumed)
  localparam int unsigned BLOCK_B    = 32;               // cache block size in bytes
  localparam int unsigned OFF_W      = $clog2(BLOCK_B);  // byte offset bits in a block
  localparam int unsigned BLK_W      = ADDR_W - OFF_W;   // block address bits
  localparam int unsigned MAX_NODES  = 128;              // largest processor count
  localparam int unsigned ID_W       = $clog2(MAX_NODES);

  // Address-network transaction types.
  typedef enum logic [1:0] {
    OP_RD  = 2'd0,   // read miss: requester loads E (snoop low) or S (snoop high)
    OP_RDX = 2'd1,   // read-exclusive for a write: all other copies invalidated
    OP_WB  = 2'd2,   // owner replaces its block: ownership passes to the next sharer
    OP_RPL = 2'd3    // sharer replaces its block: it is unlinked from the sharer list
  } op_e;

  // COSYM line states (MOESI states; E becomes O on a snooped read).
  typedef enum logic [2:0] {
    ST_I = 3'd0,
    ST_S = 3'd1,
    ST_E = 3'd2,
    ST_O = 3'd3,
    ST_M = 3'd4
  } state_e;

  // One address request as it is put on the optical lanes.
  typedef struct packed {
    logic             valid;    // a request pulse is present on the lanes
    op_e              op;
    logic [BLK_W-1:0] blk;      // block address
    logic [ID_W-1:0]  src;      // requesting node
    logic             nxt_v;    // WB/RPL only: the replacing node had a next sharer
    logic [ID_W-1:0]  nxt;      // WB/RPL only: that next sharer
  } addr_pkt_t;

  // All lanes of one link: the request packet and the snoop-response lane.
  typedef struct packed {
    addr_pkt_t pkt;
    logic      snoop;
  } link_t;

  localparam int unsigned LINK_W = $bits(link_t);

  // A state holds ownership of the block (supplies the single snoop response).
  function automatic logic is_owner(state_e s);
    return (s == ST_E) || (s == ST_O) || (s == ST_M);
  endfunction

endpackage
