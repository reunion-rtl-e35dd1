// reunion_pkg: types and constants shared by the Reunion redundant-execution blocks.
//
// A retire group is what one core's reorder buffer hands to the check stage in one
// cycle: up to RETIRE_W instructions (4-wide retirement). Each slot carries the state
// update that the fingerprint must cover: the register write, the branch target or
// store address, and the store value. The retirement width and the 16-bit CRC follow
// the document; the 64-bit values, 32 architectural registers and the encodings of
// the request and probe types are this design's choices.
package reunion_pkg;

  localparam int unsigned RETIRE_W = 4;   // instructions retired per cycle
  localparam int unsigned XLEN     = 64;  // register and address width
  localparam int unsigned NREG     = 32;  // architectural integer registers
  localparam int unsigned REG_AW   = $clog2(NREG);
  localparam int unsigned FP_W     = 16;  // fingerprint (CRC) width

  // One instruction leaving the reorder buffer towards check.
  typedef struct packed {
    logic              valid;       // slot holds an instruction
    logic              we;          // writes a register
    logic [REG_AW-1:0] rd;          // destination register
    logic [XLEN-1:0]   value;       // register result or store value
    logic [XLEN-1:0]   addr;        // store address, branch target or uncached load address
    logic              is_store;    // drains to the store buffer at retirement
    logic              is_load;     // load or atomic: ends a single-step interval
    logic              serializing; // trap, barrier, atomic or non-idempotent access
  } slot_t;

  typedef slot_t [RETIRE_W-1:0] group_t;

  // Bits of a slot that enter the fingerprint (everything that is an update).
  localparam int unsigned SLOT_FP_BITS = 1 + 1 + REG_AW + XLEN + XLEN + 1;
  localparam int unsigned GROUP_FP_BITS = RETIRE_W * SLOT_FP_BITS;

  function automatic logic [SLOT_FP_BITS-1:0] slot_fp_bits(slot_t s);
    if (!s.valid) return '0;
    return {s.valid, s.we, s.rd, s.value, s.addr, s.is_store};
  endfunction

  function automatic logic [GROUP_FP_BITS-1:0] group_fp_bits(group_t g);
    logic [GROUP_FP_BITS-1:0] r;
    for (int i = 0; i < RETIRE_W; i++) r[i*SLOT_FP_BITS +: SLOT_FP_BITS] = slot_fp_bits(g[i]);
    return r;
  endfunction

  // Requests from a private L1 to the shared L2 controller.
  typedef enum logic [2:0] {
    REQ_READ  = 3'd0,  // read, shared permission
    REQ_WRITE = 3'd1,  // read for ownership
    REQ_WB    = 3'd2,  // writeback of a dirty block (evicts it)
    REQ_EVICT = 3'd3,  // clean eviction notice
    REQ_SYNC  = 3'd4   // synchronizing request (both cores of a pair)
  } req_e;

  // Probes from the L2 controller to a private L1.
  typedef enum logic [1:0] {
    PROBE_INV  = 2'd0, // invalidate; return the data if dirty
    PROBE_DOWN = 2'd1, // downgrade to shared; return the data if dirty
    PROBE_PEEK = 2'd2  // return the data, change nothing (global phantom request)
  } probe_e;

  // How hard a phantom request looks for coherent data.
  typedef enum logic [1:0] {
    PH_NULL   = 2'd0,  // arbitrary data on any request
    PH_SHARED = 2'd1,  // L2 data on a hit, arbitrary on a miss
    PH_GLOBAL = 2'd2   // L2, vocal private caches, and memory on a miss
  } phantom_e;

endpackage
