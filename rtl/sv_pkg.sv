// sv_pkg: sizes shared by the store-vector dependence predictor and load scheduler.
//
// The queue sizes, the store-vector length, the predictor budget and the number of
// memory ports are those of the evaluated machine (32-entry load and store queues,
// 32-bit store vectors, a 2 KB store vector table, two memory ports). The PC width,
// the PC bit the table index starts at and the table reset interval are this
// design's own choices.
package sv_pkg;
  localparam int unsigned LQ_ENTRIES  = 32;    // load queue entries = LSM rows
  localparam int unsigned STQ_ENTRIES = 32;    // store queue entries = LSM columns
  localparam int unsigned SV_LEN      = 32;    // bits per store vector
  localparam int unsigned SVT_BYTES   = 2048;  // predictor budget
  localparam int unsigned SVT_ENTRIES = SVT_BYTES * 8 / SV_LEN;  // 512
  localparam int unsigned LD_ISSUE_W  = 2;     // memory ports offered to loads
  localparam int unsigned PC_W        = 64;    // Alpha program counter
  localparam int unsigned PC_LSB      = 2;     // 4-byte instructions
  localparam int unsigned SVT_CLEAR_INTERVAL = 32'd1 << 20;  // cycles between table resets
endpackage
