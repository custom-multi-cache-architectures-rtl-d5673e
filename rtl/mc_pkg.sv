// mc_pkg: types and constants shared by the hybrid multi-cache memory system.
//
// Every cache in the system is direct-mapped and write-back, with a line of one
// 64-bit word. A heap partition (one data-structure type of one parallel unit,
// or the shared region) is a private word-addressed region of ADDR_W bits; the
// memory arbiter prepends a region number to form the off-chip address.
// The 64-bit line follows the evaluated systems; the region size, the ring
// message format and the coherence states are this implementation's choices.
package mc_pkg;

  localparam int unsigned DATA_W = 64;   // cache line width = data word width
  localparam int unsigned ADDR_W = 22;   // word address inside one heap region
  localparam int unsigned NODE_W = 8;    // ring node identifier width

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Request from a kernel-side bridge into a cache.
  typedef struct packed {
    logic  we;
    addr_t addr;
    data_t wdata;
  } cache_req_t;

  // Request from a cache towards the off-chip memory (region-local address).
  typedef struct packed {
    logic  we;
    addr_t addr;
    data_t wdata;
  } mem_req_t;

  // Line states of a coherent cache.
  typedef enum logic [1:0] {
    COH_I = 2'd0,   // invalid
    COH_S = 2'd1,   // shared, clean
    COH_M = 2'd2    // modified, only copy
  } coh_state_t;

  // Ring request kinds.
  typedef enum logic {
    RING_GETS = 1'b0,   // requester wants a readable copy
    RING_GETX = 1'b1    // requester wants the only, writable copy
  } ring_op_t;

  typedef struct packed {
    logic              valid;
    ring_op_t          op;
    logic [NODE_W-1:0] src;
    addr_t             addr;
  } ring_msg_t;

endpackage
