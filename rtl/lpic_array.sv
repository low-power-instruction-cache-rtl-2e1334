// lpic_array: the memories of the two-way cache and their comparators,
// organised as a two-phased cache with pre-tag checking.
//
// Each way has three memories: a pre-tag memory (SETS x PTAG_W), an other-tag
// memory (SETS x OTAG_W) and a data memory (SETS*words-per-block x 32). A
// look-up runs in one clock cycle, the access cycle:
//   * The pre-tag memories of both ways are read at the rising edge that
//     starts the access cycle (address `lk_index`, taken while the request is
//     accepted). During the high half of the cycle their words are compared
//     with the PTAG field; a valid way whose pre-tag matches raises its
//     `cen` (chip-enable) line.
//   * At the falling edge, only the ways with `cen` set read their other-tag
//     and data memories (addresses {INDEX} and {INDEX, word}). During the low
//     half the other tag is compared with OTAG; an AND gate per way passes the
//     data of the way whose full tag matched, and an OR gate merges the ways
//     into `rdata`. `hit` is ready before the next rising edge.
// A way without a pre-tag match has neither its other-tag nor its data memory
// enabled. When the control unit marks the access as a skip (`acc_skip`, a
// sequential fetch inside the block that hit last time), no tag memory is
// read at all: only the data memory of `acc_skip_way` is enabled and the hit
// is taken from the control unit.
// Refill writes use the same single-ported memories: `wr_data_v` writes one
// word into the data memory of `wr_way` at the falling edge of the cycle,
// `wr_tag_v` writes the two tag parts (other tag at the falling edge, pre-tag
// at the closing rising edge). The control unit never looks up and writes in
// the same cycle. `act` reports which memories are enabled in the cycle, for
// power accounting. TAG_SUB / DATA_SUB split the tag memories and the data
// memory of every way into sub-banks (1 = not split).
// The organisation (memory sizes, half-cycle phases, AND-OR output) follows
// the design; the write port and the valid bits coming from the control unit
// are this implementation's choices.
module lpic_array
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
  localparam int unsigned OTW = TW - PTAG_W,
  localparam int unsigned DAW = IW + WW
) (
  input  logic              clk,
  input  logic              rst_n,
  // request phase (cycle before the access cycle)
  input  logic              lk_en,        // request accepted: read pre-tags at next rising edge
  input  logic              lk_skip,      // ... unless the tag look-up is skipped
  input  logic [IW-1:0]     lk_index,
  // access cycle
  input  logic              acc_v,
  input  logic              acc_skip,
  input  logic              acc_skip_way,
  input  logic [PTAG_W-1:0] acc_ptag,
  input  logic [OTW-1:0]    acc_otag,
  input  logic [IW-1:0]     acc_index,
  input  logic [WW-1:0]     acc_word,
  input  logic [WAYS-1:0]   acc_valid,    // valid bits of set acc_index
  // refill write port
  input  logic              wr_data_v,
  input  logic              wr_tag_v,
  input  logic              wr_way,
  input  logic [IW-1:0]     wr_index,
  input  logic [WW-1:0]     wr_word,
  input  logic [WORD_W-1:0] wr_data,
  input  logic [PTAG_W-1:0] wr_ptag,
  input  logic [OTW-1:0]    wr_otag,
  // results of the access cycle
  output logic [WAYS-1:0]   cen,          // pre-tag match per way
  output logic [WAYS-1:0]   hit_way,
  output logic              hit,
  output logic [WORD_W-1:0] rdata,
  output act_t              act
);

  logic [PTAG_W-1:0] ptag_q [WAYS];
  logic [OTW-1:0]    otag_q [WAYS];
  logic [WORD_W-1:0] data_q [WAYS];

  logic [WAYS-1:0] ptag_ce, otag_ce, data_ce, wsel;

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    assign wsel[w] = (wr_way == 1'(w));

    // high half-cycle: pre-tag check
    assign cen[w] = acc_v && !acc_skip && acc_valid[w] && (ptag_q[w] == acc_ptag);

    // chip enables
    assign ptag_ce[w] = (lk_en && !lk_skip) || (wr_tag_v && wsel[w]);
    assign otag_ce[w] = cen[w] || (wr_tag_v && wsel[w]);
    assign data_ce[w] = (acc_v && (acc_skip ? (acc_skip_way == 1'(w)) : cen[w]))
                        || (wr_data_v && wsel[w]);

    subbank_sram #(.DEPTH(2**IW), .WIDTH(PTAG_W), .NSUB(TAG_SUB), .NEGEDGE(1'b0)) u_ptag (
      .clk, .rst_n,
      .ce(ptag_ce[w]), .we(wr_tag_v),
      .addr(wr_tag_v ? wr_index : lk_index),
      .wdata(wr_ptag), .q(ptag_q[w]), .bank_en());

    subbank_sram #(.DEPTH(2**IW), .WIDTH(OTW), .NSUB(TAG_SUB), .NEGEDGE(1'b1)) u_otag (
      .clk, .rst_n,
      .ce(otag_ce[w]), .we(wr_tag_v),
      .addr(wr_tag_v ? wr_index : acc_index),
      .wdata(wr_otag), .q(otag_q[w]), .bank_en());

    subbank_sram #(.DEPTH(2**DAW), .WIDTH(WORD_W), .NSUB(DATA_SUB), .NEGEDGE(1'b1)) u_data (
      .clk, .rst_n,
      .ce(data_ce[w]), .we(wr_data_v),
      .addr(wr_data_v ? {wr_index, wr_word} : {acc_index, acc_word}),
      .wdata(wr_data), .q(data_q[w]), .bank_en());

    // low half-cycle: other-tag check, AND gate on the way's data
    assign hit_way[w] = acc_v && (acc_skip ? (acc_skip_way == 1'(w))
                                           : (cen[w] && (otag_q[w] == acc_otag)));
  end

  // OR gate merging the ways
  always_comb begin
    rdata = '0;
    for (int w = 0; w < WAYS; w++)
      rdata |= data_q[w] & {WORD_W{hit_way[w]}};
  end

  assign hit = |hit_way;

  // memory activity of this cycle: a pre-tag read is enabled in the request
  // cycle and happens at the rising edge that opens the access cycle, so it
  // is reported (registered) in the access cycle; writes count in the cycle
  // they happen in
  logic [WAYS-1:0] ptag_rd_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptag_rd_q <= '0;
    else        ptag_rd_q <= wr_tag_v ? '0 : ptag_ce;
  end

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      act.ptag[w] = ptag_rd_q[w] || (wr_tag_v && wsel[w]);
      act.otag[w] = otag_ce[w];
      act.data[w] = data_ce[w];
    end
  end

endmodule
