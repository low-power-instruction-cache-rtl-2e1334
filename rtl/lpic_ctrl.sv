// lpic_ctrl: control unit of the low-power instruction cache.
//
// Fetch protocol: the processor drives `cpu_req`, `cpu_addr` and `cpu_seq`
// (address = previous address + 4); the request is taken at the rising edge
// where `cpu_ready` is high. The following cycle is the access cycle: on a
// hit `rsp_valid` is high in that cycle with the instruction on `rsp_data`,
// and a new request can be taken at its end, so hits stream at one per
// cycle. On a miss `cpu_ready` falls in the access cycle, the block is
// fetched over AHB (critical word first) and written into the victim way,
// and `rsp_valid` returns the missing word in the cycle after the last beat
// (`rsp_hit` low). The next request is taken one cycle later.
// The unit holds the per-set valid-bit table and LRU-bit table in flip-flops
// (both cleared by reset). The victim is an invalid way if there is one, else
// the least recently used way. For tag-memory access skipping it keeps the
// hit information of the last completed access (`last_ok`, `last_way`): a
// request that the block boundary detector finds sequential and inside the
// same block is issued to the array as a skip, so no tag memory is read, the
// stored hit is resent and only the data memory of the stored way is
// enabled. A completed refill counts as a hit in the victim way. The hit
// information is dropped while a refill is under way.
// Which parts follow the design: the valid and LRU tables, LRU replacement,
// seq/A[OFFSET_W] skipping with the resent hit. This implementation's choices:
// the request/response handshake, critical-word return, the one cycle spent
// writing the last word and the tags, and invalid-way-first victim choice.
module lpic_ctrl
  import lpic_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 8192,
  parameter int unsigned BLOCK_BYTES = 16,
  parameter int unsigned PTAG_W      = 3,
  localparam int unsigned IW    = index_w(CACHE_BYTES, BLOCK_BYTES),
  localparam int unsigned OW    = offset_w(BLOCK_BYTES),
  localparam int unsigned WW    = OW - 2,
  localparam int unsigned TW    = tag_w(CACHE_BYTES, BLOCK_BYTES),
  localparam int unsigned OTW   = TW - PTAG_W,
  localparam int unsigned SETS  = 2**IW
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
  // array: request phase
  output logic              lk_en,
  output logic              lk_skip,
  output logic [IW-1:0]     lk_index,
  // array: access cycle
  output logic              acc_v,
  output logic              acc_skip,
  output logic              acc_skip_way,
  output logic [PTAG_W-1:0] acc_ptag,
  output logic [OTW-1:0]    acc_otag,
  output logic [IW-1:0]     acc_index,
  output logic [WW-1:0]     acc_word,
  output logic [WAYS-1:0]   acc_valid,
  input  logic [WAYS-1:0]   hit_way,
  input  logic              hit,
  input  logic [WORD_W-1:0] rdata,
  // array: refill writes
  output logic              wr_data_v,
  output logic              wr_tag_v,
  output logic              wr_way,
  output logic [IW-1:0]     wr_index,
  output logic [WW-1:0]     wr_word,
  output logic [WORD_W-1:0] wr_data,
  output logic [PTAG_W-1:0] wr_ptag,
  output logic [OTW-1:0]    wr_otag,
  // refill engine
  output logic              fill_start,
  output logic [ADDR_W-1:0] fill_addr,
  input  logic              beat_v,
  input  logic [WW-1:0]     beat_word,
  input  logic              beat_last,
  input  logic [WORD_W-1:0] beat_data,
  // events
  output logic              ev_miss     // access cycle ends in a miss
);

  typedef enum logic [1:0] {S_RUN, S_FILL, S_RESP} state_e;
  state_e state;

  logic [WAYS-1:0] valid_tab [SETS];
  logic            lru_tab   [SETS];   // way to replace next

  logic            last_ok, last_way;
  logic            accept, bbd, skip_now, skip_way_now, hit_w1;
  logic            victim;
  logic [WORD_W-1:0] crit;

  // address fields
  logic [IW-1:0]     req_index;
  assign req_index = cpu_addr[OW +: IW];

  assign hit_w1 = hit_way[1];

  assign cpu_ready = (state == S_RUN) && (!acc_v || hit);
  assign accept    = cpu_req && cpu_ready;

  bbd_detector u_bbd (
    .clk, .rst_n, .en(accept), .pc_bit(cpu_addr[OW]), .seq(cpu_seq), .bbd);

  // the previous access is either the one finishing now with a hit, or the
  // last completed one
  assign skip_way_now = acc_v ? hit_w1 : last_way;
  assign skip_now     = cpu_seq && !bbd && (acc_v ? hit : last_ok);

  assign lk_en    = accept;
  assign lk_skip  = skip_now;
  assign lk_index = req_index;

  assign acc_valid = valid_tab[acc_index];
  assign ev_miss   = (state == S_RUN) && acc_v && !hit;

  assign victim = !acc_valid[0] ? 1'b0 : !acc_valid[1] ? 1'b1 : lru_tab[acc_index];

  always_comb begin
    rsp_valid = 1'b0;
    rsp_hit   = 1'b0;
    rsp_data  = rdata;
    if (state == S_RUN && acc_v && hit) begin
      rsp_valid = 1'b1;
      rsp_hit   = 1'b1;
    end else if (state == S_RESP) begin
      rsp_valid = 1'b1;
      rsp_data  = crit;
    end
  end

  assign fill_addr = {acc_otag, acc_ptag, acc_index, acc_word, 2'b00};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_RUN;
      acc_v        <= 1'b0;
      acc_skip     <= 1'b0;
      acc_skip_way <= 1'b0;
      acc_ptag     <= '0;
      acc_otag     <= '0;
      acc_index    <= '0;
      acc_word     <= '0;
      last_ok      <= 1'b0;
      last_way     <= 1'b0;
      fill_start   <= 1'b0;
      wr_data_v    <= 1'b0;
      wr_tag_v     <= 1'b0;
      wr_way       <= 1'b0;
      wr_index     <= '0;
      wr_word      <= '0;
      wr_data      <= '0;
      wr_ptag      <= '0;
      wr_otag      <= '0;
      crit         <= '0;
      for (int s = 0; s < SETS; s++) begin
        valid_tab[s] <= '0;
        lru_tab[s]   <= 1'b0;
      end
    end else begin
      fill_start <= 1'b0;
      wr_data_v  <= 1'b0;
      wr_tag_v   <= 1'b0;
      unique case (state)
        S_RUN: begin
          if (acc_v && hit) begin
            last_ok            <= 1'b1;
            last_way           <= hit_w1;
            lru_tab[acc_index] <= !hit_w1;
          end
          if (acc_v && !hit) begin
            // miss: keep the request fields, start the refill
            state      <= S_FILL;
            acc_v      <= 1'b0;
            last_ok    <= 1'b0;
            fill_start <= 1'b1;
            wr_way     <= victim;
            wr_index   <= acc_index;
            wr_ptag    <= acc_ptag;
            wr_otag    <= acc_otag;
          end else if (accept) begin
            acc_v        <= 1'b1;
            acc_skip     <= skip_now;
            acc_skip_way <= skip_way_now;
            acc_otag     <= cpu_addr[ADDR_W-1 -: OTW];
            acc_ptag     <= cpu_addr[OW+IW +: PTAG_W];
            acc_index    <= req_index;
            acc_word     <= cpu_addr[2 +: WW];
          end else begin
            acc_v <= 1'b0;
          end
        end
        S_FILL: begin
          if (beat_v) begin
            wr_data_v <= 1'b1;
            wr_word   <= beat_word;
            wr_data   <= beat_data;
            if (beat_word == acc_word) crit <= beat_data;
            if (beat_last) begin
              wr_tag_v                  <= 1'b1;
              valid_tab[wr_index][wr_way] <= 1'b1;
              lru_tab[wr_index]         <= !wr_way;
              last_ok                   <= 1'b1;
              last_way                  <= wr_way;
              state                     <= S_RESP;
            end
          end
        end
        S_RESP: state <= S_RUN;
        default: state <= S_RUN;
      endcase
    end
  end

  // a skipped access always resends a hit
  a_skip_hits: assert property (@(posedge clk) disable iff (!rst_n) (acc_v && acc_skip) |-> hit);
  // no look-up while the array is being written
  a_no_rw: assert property (@(posedge clk) disable iff (!rst_n) (wr_data_v || wr_tag_v) |-> !lk_en);

endmodule
