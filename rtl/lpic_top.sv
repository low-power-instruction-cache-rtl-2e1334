// lpic_top: low-power two-way set-associative instruction cache with its
// AHB refill master.
//
// The cache cuts access power with three techniques and can add a fourth:
//   * two-phased access: tag work in the first half of the clock cycle, data
//     memory read in the second half, and only in the way that matched;
//   * pre-tag checking: only PTAG_W low tag bits are compared in the first
//     half; the remaining tag bits and the data are read only in ways whose
//     pre-tag matched, and the full compare confirms the hit;
//   * tag skipping with the processor's `seq` signal: a sequential fetch that
//     stays inside the last block reuses the last hit and reads no tag at all;
//   * memory sub-banking (TAG_SUB, DATA_SUB > 1): each memory is split so only
//     one sub-bank is active per access.
// Defaults: 8 KB, 16-byte blocks, 3-bit pre-tag, no sub-banking. Setting
// TAG_SUB = 4 and DATA_SUB = 8 gives the sub-banked variant.
// Interface and timing: see lpic_ctrl (fetch port: one cycle per hit; a miss
// costs the AHB burst plus two cycles) and ahb_burst_master (AHB-Lite master
// port). `act` reports the memories enabled in each cycle and `ev_miss` the
// access cycles that missed, for power and behaviour accounting.
module lpic_top
  import lpic_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 8192,
  parameter int unsigned BLOCK_BYTES = 16,
  parameter int unsigned PTAG_W      = 3,
  parameter int unsigned TAG_SUB     = 1,
  parameter int unsigned DATA_SUB    = 1,
  localparam int unsigned IW  = index_w(CACHE_BYTES, BLOCK_BYTES),
  localparam int unsigned OW  = offset_w(BLOCK_BYTES),
  localparam int unsigned WW  = OW - 2,
  localparam int unsigned TW  = tag_w(CACHE_BYTES, BLOCK_BYTES),
  localparam int unsigned OTW = TW - PTAG_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor fetch port
  input  logic              cpu_req,
  input  logic [ADDR_W-1:0] cpu_addr,
  input  logic              cpu_seq,
  output logic              cpu_ready,
  output logic              rsp_valid,
  output logic              rsp_hit,
  output logic [WORD_W-1:0] rsp_data,
  // AHB-Lite master port
  output logic [ADDR_W-1:0] haddr,
  output logic [1:0]        htrans,
  output logic [2:0]        hburst,
  output logic [2:0]        hsize,
  output logic              hwrite,
  output logic [3:0]        hprot,
  input  logic              hready,
  input  logic [WORD_W-1:0] hrdata,
  input  logic              hresp,
  // activity
  output act_t              act,
  output logic              ev_miss,
  output logic              ev_skip    // access cycle served by tag skipping
);

  logic              lk_en, lk_skip;
  logic [IW-1:0]     lk_index;
  logic              acc_v, acc_skip, acc_skip_way;
  logic [PTAG_W-1:0] acc_ptag;
  logic [OTW-1:0]    acc_otag;
  logic [IW-1:0]     acc_index;
  logic [WW-1:0]     acc_word;
  logic [WAYS-1:0]   acc_valid, hit_way, cen;
  logic              hit;
  logic [WORD_W-1:0] rdata;
  logic              wr_data_v, wr_tag_v, wr_way;
  logic [IW-1:0]     wr_index;
  logic [WW-1:0]     wr_word;
  logic [WORD_W-1:0] wr_data;
  logic [PTAG_W-1:0] wr_ptag;
  logic [OTW-1:0]    wr_otag;
  logic              fill_start, fill_busy, beat_v, beat_last;
  logic [ADDR_W-1:0] fill_addr;
  logic [WW-1:0]     beat_word;
  logic [WORD_W-1:0] beat_data;

  lpic_ctrl #(.CACHE_BYTES(CACHE_BYTES), .BLOCK_BYTES(BLOCK_BYTES), .PTAG_W(PTAG_W)) u_ctrl (
    .clk, .rst_n,
    .cpu_req, .cpu_addr, .cpu_seq, .cpu_ready, .rsp_valid, .rsp_hit, .rsp_data,
    .lk_en, .lk_skip, .lk_index,
    .acc_v, .acc_skip, .acc_skip_way, .acc_ptag, .acc_otag, .acc_index, .acc_word, .acc_valid,
    .hit_way, .hit, .rdata,
    .wr_data_v, .wr_tag_v, .wr_way, .wr_index, .wr_word, .wr_data, .wr_ptag, .wr_otag,
    .fill_start, .fill_addr, .beat_v, .beat_word, .beat_last, .beat_data,
    .ev_miss);

  lpic_array #(.CACHE_BYTES(CACHE_BYTES), .BLOCK_BYTES(BLOCK_BYTES), .PTAG_W(PTAG_W),
               .TAG_SUB(TAG_SUB), .DATA_SUB(DATA_SUB)) u_array (
    .clk, .rst_n,
    .lk_en, .lk_skip, .lk_index,
    .acc_v, .acc_skip, .acc_skip_way, .acc_ptag, .acc_otag, .acc_index, .acc_word, .acc_valid,
    .wr_data_v, .wr_tag_v, .wr_way, .wr_index, .wr_word, .wr_data, .wr_ptag, .wr_otag,
    .cen, .hit_way, .hit, .rdata, .act);

  ahb_burst_master #(.BEATS(BLOCK_BYTES / 4)) u_ahb (
    .clk, .rst_n,
    .start(fill_start), .start_addr(fill_addr), .busy(fill_busy),
    .beat_v, .beat_word, .beat_last, .beat_data,
    .haddr, .htrans, .hburst, .hsize, .hwrite, .hprot, .hready, .hrdata, .hresp);

  assign ev_skip = acc_v && acc_skip;

  // a refill is requested only while the master is idle
  a_fill_idle: assert property (@(posedge clk) disable iff (!rst_n) fill_start |-> !fill_busy);
  // a look-up can hit only in a way whose pre-tag matched
  a_hit_cen: assert property (@(posedge clk) disable iff (!rst_n)
                              (acc_v && !acc_skip) |-> ((hit_way & ~cen) == '0));

endmodule
