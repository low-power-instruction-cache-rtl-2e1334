// lpic_pkg: constants and types shared by the low-power instruction cache.
//
// The cache is two-way set associative with 32-bit byte addresses and 32-bit
// instruction words. An address splits into OTAG | PTAG | INDEX | OFFSET; the
// PTAG field is the few least significant tag bits that are checked first
// (pre-tag check), OTAG the remaining "other" tag bits. The field widths are
// computed from the cache size, block size and pre-tag width with the helper
// functions below, so that 8 KB / 16-byte blocks / 3-bit pre-tag gives
// OTAG<17> PTAG<3> INDEX<8> OFFSET<4>, the split the cache is built around.
// The AHB constants follow the AMBA AHB encoding.
package lpic_pkg;

  localparam int unsigned ADDR_W = 32;  // byte address width
  localparam int unsigned WORD_W = 32;  // instruction word width
  localparam int unsigned WAYS   = 2;   // set associativity (fixed: one LRU bit per set)

  // INDEX width: log2(cache bytes / (block bytes * ways))
  function automatic int unsigned index_w(int unsigned cache_bytes, int unsigned block_bytes);
    return $clog2(cache_bytes / (block_bytes * WAYS));
  endfunction

  // OFFSET width: log2(block bytes)
  function automatic int unsigned offset_w(int unsigned block_bytes);
    return $clog2(block_bytes);
  endfunction

  // Full tag width (OTAG + PTAG)
  function automatic int unsigned tag_w(int unsigned cache_bytes, int unsigned block_bytes);
    return ADDR_W - index_w(cache_bytes, block_bytes) - offset_w(block_bytes);
  endfunction

  // Per-cycle SRAM activity of both ways, used to account for access power
  // (number of pre-tag, other-tag and data memories enabled this cycle).
  typedef struct packed {
    logic [WAYS-1:0] ptag;
    logic [WAYS-1:0] otag;
    logic [WAYS-1:0] data;
  } act_t;

  // AHB encodings
  typedef enum logic [1:0] {HTRANS_IDLE = 2'b00, HTRANS_BUSY = 2'b01,
                            HTRANS_NONSEQ = 2'b10, HTRANS_SEQ = 2'b11} htrans_e;
  localparam logic [2:0] HBURST_WRAP4 = 3'b010;
  localparam logic [2:0] HBURST_WRAP8 = 3'b100;
  localparam logic [2:0] HBURST_WRAP16 = 3'b110;
  localparam logic [2:0] HSIZE_WORD   = 3'b010;
  localparam logic       HRESP_OKAY   = 1'b0;

endpackage
