// hsa_cache_pkg: types and sizes shared by the cache hierarchy.
//
// Addresses inside the hierarchy are word addresses (one word = 32 bits,
// four bytes). A block is 16 words (64 bytes), as in the evaluated
// configuration; no sub-blocks are used. The main-memory address space
// (AW word-address bits) is this design's own choice: 2^16 words = 256 KB.
// Register tags that travel with a read (ID_W bits) are also this design's
// choice; they let a read that missed come back later, out of order, over
// the bypass (return) line to the right destination register.
package hsa_cache_pkg;

  localparam int WORD_W      = 32;
  localparam int BLOCK_WORDS = 16;
  localparam int OFF_W       = $clog2(BLOCK_WORDS);
  localparam int AW          = 16;          // word-address bits
  localparam int BLK_W       = AW - OFF_W;  // block-address bits
  localparam int ID_W        = 6;           // destination-register tag

  typedef logic [WORD_W-1:0]            word_t;
  typedef word_t [BLOCK_WORDS-1:0]      block_t;
  typedef logic [AW-1:0]                waddr_t;
  typedef logic [BLK_W-1:0]             baddr_t;
  typedef logic [OFF_W-1:0]             off_t;
  typedef logic [ID_W-1:0]              id_t;

  // Kind of reference held in the Outstanding References Buffer.
  typedef enum logic [1:0] {
    REF_READ     = 2'd0,  // load: data goes back over the bypass line
    REF_WRITE    = 2'd1,  // Data Write Buffer record stalled on a write miss
    REF_PREFETCH = 2'd2   // prefetch: block is only placed in the cache
  } ref_kind_e;

  // One reference toward the next level (an ORB record).
  typedef struct packed {
    ref_kind_e kind;
    baddr_t    blk;
    off_t      off;
    id_t       id;
  } miss_ref_t;

  // One Data Write Buffer record: destination address, data and the
  // status flag marking a record that missed and waits for its block.
  typedef struct packed {
    logic   miss;
    waddr_t addr;
    word_t  data;
  } dwb_rec_t;

  // Write-back of a dirty victim block to the next level.
  typedef struct packed {
    baddr_t blk;
    block_t data;
  } blk_wr_t;

  // Block returned from the next level.
  typedef struct packed {
    baddr_t blk;
    block_t data;
  } blk_ret_t;

  // One-cycle event pulses of the data-cache level, for counting.
  typedef struct packed {
    logic [1:0] dwb_read_hit;   // reads served from the Data Write Buffer
    logic [1:0] cache_read_hit; // reads served from the cache
    logic       read_miss;      // read accepted into the ORB
    logic       orb_merge;      // reference merged, no new block request
    logic       block_request;  // block request sent to the next level
    logic       bypass_return;  // read completed over the bypass line
    logic       write_miss;     // Data Write Buffer head missed, block requested
    logic       write_back;     // dirty victim sent to the next level
    logic       write_stall;    // a write was refused (buffer full)
    logic       read_stall;     // a read was refused (miss path busy)
    logic       prefetch;       // prefetch accepted into the ORB
    logic       dual_drain;     // two or more records drained in one cycle
    logic       fill;           // block written into the cache
  } dcache_events_t;

  function automatic baddr_t blk_of(waddr_t a);
    return a[AW-1:OFF_W];
  endfunction

  function automatic off_t off_of(waddr_t a);
    return a[OFF_W-1:0];
  endfunction

endpackage
