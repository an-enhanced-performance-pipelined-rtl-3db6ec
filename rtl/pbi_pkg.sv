// Shared constants of the partitioned bus-invert link.
//
// The link carries an 8-bit data word split into two 4-bit halves; each half
// has its own majority voter and its own invert line. DATA_W and SEG_W are the
// defaults used by every module; NSEG is the number of halves (invert lines).
package pbi_pkg;
  localparam int unsigned DATA_W = 8;  // width of the data bus
  localparam int unsigned SEG_W  = 4;  // bits per independently inverted segment
  localparam int unsigned NSEG   = DATA_W / SEG_W;
endpackage
