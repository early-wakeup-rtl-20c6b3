// ew_pkg: shared constants and types of the early-wakeup drowsy data cache.
//
// The default geometry is the L1 data cache of the evaluated system: 32 KB,
// 2-way set associative, 32-byte lines, which gives 512 sets, a 9-bit set
// index, a 5-bit byte offset and, with 32-bit addresses, an 18-bit tag.
// The prediction table defaults to 1024 entries, the largest and best
// performing of the sizes evaluated (1024, 512, 256, 128, 64).
// The wakeup latency of a drowsy line defaults to 1 cycle (the drowsy-cache
// literature quotes 1-2 cycles). The 32-bit address and instruction-address
// widths and the drowsy window are choices of this design.
package ew_pkg;

  parameter int unsigned ADDR_W        = 32;    // byte address width (PC and data)
  parameter int unsigned DATA_W        = 32;    // load/store word width
  parameter int unsigned CACHE_BYTES   = 32768; // 32 KB L1 data cache
  parameter int unsigned NUM_WAYS      = 2;     // 2-way
  parameter int unsigned LINE_BYTES    = 32;    // 32-byte line
  parameter int unsigned NUM_SETS      = CACHE_BYTES / (NUM_WAYS * LINE_BYTES);
  parameter int unsigned SET_W         = $clog2(NUM_SETS);
  parameter int unsigned WAY_W         = (NUM_WAYS > 1) ? $clog2(NUM_WAYS) : 1;
  parameter int unsigned PT_ENTRIES    = 1024;  // prediction table entries
  parameter int unsigned WAKE_CYCLES   = 1;     // drowsy -> normal latency
  parameter int unsigned DROWSY_WINDOW = 4000;  // cycles between global sleeps

  // Memory-stage request kind.
  typedef enum logic [0:0] {
    OP_LOAD  = 1'b0,
    OP_STORE = 1'b1
  } mem_op_e;

  // Power mode of one cache line.
  typedef enum logic [1:0] {
    LINE_DROWSY = 2'd0,   // reduced supply, data retained, not accessible
    LINE_WAKING = 2'd1,   // supply being raised
    LINE_AWAKE  = 2'd2    // nominal supply, accessible
  } line_mode_e;

endpackage
