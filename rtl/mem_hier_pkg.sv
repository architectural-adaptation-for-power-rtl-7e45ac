// mem_hier_pkg: widths, geometry and shared types of the adaptive
// instruction memory hierarchy (L0 with predicted bypass, L1 I-cache,
// unified L2 with run-time fetch size profiling).
//
// Byte addresses are 32 bits. The CPU fetches one 16-byte block per access
// (four 32-bit instructions, matching a fetch width of 4), which is also the
// L0 line. L1 lines are 32 bytes, L2 lines 64 bytes. These line sizes follow
// the cache configuration the design is built around; the 32-bit address
// and 32-bit instruction width are this design's own choice.
package mem_hier_pkg;

  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned FBLK_B   = 16;          // fetch block = L0 line, bytes
  localparam int unsigned L1LINE_B = 32;          // L1 line, bytes
  localparam int unsigned L2LINE_B = 64;          // L2 line, bytes

  localparam int unsigned FBLK_W   = FBLK_B * 8;    // 128
  localparam int unsigned L1LINE_W = L1LINE_B * 8;  // 256
  localparam int unsigned L2LINE_W = L2LINE_B * 8;  // 512

  // Address of a fetch block, of an L1 line and of an L2 line.
  localparam int unsigned FADDR_W  = ADDR_W - $clog2(FBLK_B);    // 28
  localparam int unsigned L1ADDR_W = ADDR_W - $clog2(L1LINE_B);  // 27
  localparam int unsigned L2ADDR_W = ADDR_W - $clog2(L2LINE_B);  // 26

  typedef logic [FADDR_W-1:0]  faddr_t;
  typedef logic [L1ADDR_W-1:0] l1addr_t;
  typedef logic [L2ADDR_W-1:0] l2addr_t;
  typedef logic [FBLK_W-1:0]   fblk_t;
  typedef logic [L1LINE_W-1:0] l1line_t;
  typedef logic [L2LINE_W-1:0] l2line_t;

  // L2 fetch sizes profiled at run time: 64B, 128B, 256B and 512B,
  // i.e. 1, 2, 4 or 8 L2 lines per miss-fetch. Encoded as log2(lines).
  typedef enum logic [1:0] {
    FS_64B  = 2'd0,
    FS_128B = 2'd1,
    FS_256B = 2'd2,
    FS_512B = 2'd3
  } fsize_e;

  localparam int unsigned NUM_FSIZES = 4;

  // Which cache the next instruction fetch goes to.
  typedef enum logic {
    SEL_L0 = 1'b0,
    SEL_L1 = 1'b1
  } cache_sel_e;

endpackage
