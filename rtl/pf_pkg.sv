// pf_pkg: types and constants shared by the L2 hybrid stream-buffer prefetcher.
//
// Addresses are 32-bit byte addresses; L2 lines are 64 bytes, so a line address
// is the byte address without its low 6 bits. Pointers found in memory lines are
// 32-bit little-endian words. The line size and the 16-byte memory data bus are
// the design's configuration; the 32-bit address and pointer width are this
// implementation's choice.
package pf_pkg;
  localparam int unsigned ADDR_W     = 32;
  localparam int unsigned LINE_BYTES = 64;
  localparam int unsigned LINE_W     = LINE_BYTES * 8;
  localparam int unsigned OFF_BITS   = $clog2(LINE_BYTES);
  localparam int unsigned LADDR_W    = ADDR_W - OFF_BITS;
  localparam int unsigned BUS_BYTES  = 16;
  localparam int unsigned BEATS      = LINE_BYTES / BUS_BYTES;
  localparam int unsigned DOFF_W     = 16;   // signed pointer offset / displacement width
  localparam int unsigned STRIDE_W   = 16;   // signed stride in lines

  typedef logic [ADDR_W-1:0]          addr_t;
  typedef logic [LADDR_W-1:0]         laddr_t;
  typedef logic [LINE_W-1:0]          line_t;
  typedef logic [BUS_BYTES*8-1:0]     beat_t;
  typedef logic signed [DOFF_W-1:0]   doff_t;
  typedef logic signed [STRIDE_W-1:0] stride_t;

  typedef enum logic {SB_STRIDE = 1'b0, SB_LDS = 1'b1} sb_mode_e;

  // Line address of a byte address.
  function automatic laddr_t line_of(addr_t a);
    return a[ADDR_W-1:OFF_BITS];
  endfunction

  // The aligned 32-bit word at byte address a, taken from line l.
  function automatic addr_t word_at(line_t l, addr_t a);
    logic [OFF_BITS-3:0] w;
    w = a[OFF_BITS-1:2];
    return l[w*32 +: 32];
  endfunction
endpackage
