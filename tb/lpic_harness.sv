// lpic_harness: processor model, main memory and reference model for
// end-to-end tests of lpic_top. Connect it to one cache instance.
//
// The processor model issues N_FETCH fetches: mostly sequential runs (seq
// high, address + 4), with branches into a small loop region (locality),
// into a few heavily conflicting sets (same index, equal or different
// pre-tags, so that every pre-tag case occurs), or anywhere. It holds a
// request until the cache takes it and sometimes inserts idle cycles.
// A reference model of the two-way cache (valid bits, full tags, LRU bits,
// invalid-way-first victim) predicts for each fetch: hit or miss, the number
// of ways whose pre-tag matches, and whether the tag look-up is skipped.
// Checked for every fetch: the returned word (against tb_mem_pkg), hit flag,
// response latency (1 cycle on a hit, 3 + LAT + words-per-block on a miss),
// the memories enabled in the access cycle (pre-tag / other-tag / data:
// 2/m/m for a look-up with m pre-tag matches, 0/0/1 for a skip), the skip
// and miss events, `cpu_ready`, and the first address of each refill burst.
// Each mechanism (hit, miss, skip, skip refused at a block boundary, the four
// pre-tag cases, stall, critical-word-first burst, LRU replacement) must
// occur at least once. Drives inputs 1 time unit after the rising edge and
// samples 8 units after it (clock period 10).
module lpic_harness
  import lpic_pkg::*;
  import tb_mem_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 8192,
  parameter int unsigned BLOCK_BYTES = 16,
  parameter int unsigned PTAG_W      = 3,
  parameter int unsigned LAT         = 10,
  parameter int unsigned N_FETCH     = 2000,
  parameter int unsigned SEED        = 1,
  parameter string       NAME        = "cache"
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        cpu_req,
  output logic [31:0] cpu_addr,
  output logic        cpu_seq,
  input  logic        cpu_ready,
  input  logic        rsp_valid,
  input  logic        rsp_hit,
  input  logic [31:0] rsp_data,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  output logic        hready,
  output logic [31:0] hrdata,
  output logic        hresp,
  input  act_t        act,
  input  logic        ev_miss,
  input  logic        ev_skip,
  output logic        done,
  output int          checks,
  output int          failures
);
  localparam int unsigned IW   = index_w(CACHE_BYTES, BLOCK_BYTES);
  localparam int unsigned OW   = offset_w(BLOCK_BYTES);
  localparam int unsigned SETS = 2**IW;
  localparam int unsigned TW   = tag_w(CACHE_BYTES, BLOCK_BYTES);
  localparam int unsigned MISS_RSP = 3 + LAT + BLOCK_BYTES / 4;

  int bursts, perr;
  ahb_mem_model #(.LAT(LAT)) u_mem (
    .clk, .rst_n, .haddr, .htrans, .hwrite, .hready, .hrdata, .hresp,
    .bursts, .protocol_errors(perr));

  // reference model
  logic          rv  [SETS][2];
  logic [TW-1:0] rt  [SETS][2];
  logic          rl  [SETS];

  // mechanism counters
  int n_hit, n_miss, n_skip, n_bbd, n_bc1, n_bc2, n_wc1, n_wc2, n_stall, n_wrap, n_lru;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("[%s] FAIL %s at %0t", NAME, what, $time);
    end
  endtask

  function automatic logic [31:0] conflict_addr();
    logic [31:0] a;
    a = ($urandom_range(0, 2) << (OW + IW + PTAG_W)) | ($urandom_range(0, 1) << (OW + IW))
      | ($urandom_range(0, 3) << OW) | ($urandom_range(0, BLOCK_BYTES / 4 - 1) << 2);
    return a;
  endfunction

  logic [31:0] prev_addr, out_addr, miss_addr, dbg_prev;
  bit          took, have_prev, out_pending, out_hit, out_skip, miss_burst_seen;
  int          out_m, out_cycles, issued, answered, idle_left;
  logic [31:0] next_a;
  bit          next_s;

  task automatic pick_next();
    int r;
    r = $urandom_range(0, 99);
    if (r < 70) begin
      next_a = cpu_addr + 32'd4; next_s = 1'b1;
    end else begin
      next_s = 1'b0;
      r = $urandom_range(0, 9);
      if (r < 5)      next_a = 32'h0001_0000 + ($urandom_range(0, 511) << 2);
      else if (r < 9) next_a = conflict_addr();
      else            next_a = ($urandom & 32'hFFFF_FFFC);
    end
  endtask

  // model one fetch in program order; returns expectations
  task automatic model_fetch(input logic [31:0] a, input bit seq,
                             output bit hit, output int m, output bit skip);
    int unsigned idx;
    logic [TW-1:0] tag;
    int v;
    idx = (a >> OW) & (SETS - 1);
    tag = TW'(a >> (OW + IW));
    skip = seq && have_prev && ((a >> OW) == (prev_addr >> OW));
    if (seq && have_prev && !skip) n_bbd++;
    m = 0; hit = 1'b0; v = 0;
    for (int w = 0; w < 2; w++) begin
      if (rv[idx][w] && rt[idx][w][PTAG_W-1:0] == tag[PTAG_W-1:0]) m++;
      if (rv[idx][w] && rt[idx][w] == tag) begin hit = 1'b1; v = w; end
    end
    if (!hit) begin
      if (!rv[idx][0]) v = 0;
      else if (!rv[idx][1]) v = 1;
      else begin v = int'(rl[idx]); n_lru++; end
      rv[idx][v] = 1'b1;
      rt[idx][v] = tag;
    end
    rl[idx] = (v == 0);
    dbg_prev = prev_addr;
    prev_addr = a;
    have_prev = 1'b1;
  endtask

  // first address of each refill burst must be the missed word
  always @(posedge clk) begin
    if (rst_n && hready && htrans == 2'b10) begin
      check(out_pending && !out_hit && haddr == {out_addr[31:2], 2'b00}, "burst start address");
      if (out_addr[OW-1:2] != '0) n_wrap++;
      miss_burst_seen = 1'b1;
    end
  end

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    cpu_req = 1'b0; cpu_addr = 32'h0001_0000; cpu_seq = 1'b0;
    n_hit = 0; n_miss = 0; n_skip = 0; n_bbd = 0; n_bc1 = 0; n_bc2 = 0; n_wc1 = 0;
    n_wc2 = 0; n_stall = 0; n_wrap = 0; n_lru = 0;
    have_prev = 0; out_pending = 0; issued = 0; answered = 0; idle_left = 0;
    miss_burst_seen = 0;
    for (int s = 0; s < SETS; s++) begin
      rv[s][0] = 0; rv[s][1] = 0; rl[s] = 0; rt[s][0] = '0; rt[s][1] = '0;
    end
    void'($urandom(SEED));
    @(posedge clk iff rst_n);
    #1;
    cpu_req = 1'b1; issued = 1;
    forever begin
      bit exp_ready, was_pending, resp_miss;
      #7;  // sample point, 8 units after the rising edge
      was_pending = out_pending;
      resp_miss = 1'b0;
      if (out_pending) begin
        out_cycles++;
        if (out_cycles == 1) begin
          int np, no, nd;
          np = $countones(act.ptag); no = $countones(act.otag); nd = $countones(act.data);
          if (out_skip) begin
            check(np == 0 && no == 0 && nd == 1, "activity of skipped access");
            n_skip++;
          end else begin
            check(np == 2 && no == out_m && nd == out_m, "activity of look-up");
            if (out_m == 0) n_bc2++;
            else if (out_m == 2) n_wc1++;
            else if (out_hit) n_bc1++;
            else n_wc2++;
          end
          check(ev_skip == out_skip, $sformatf("skip event addr=%h prev=%h skip=%0d", out_addr, dbg_prev, out_skip));
          check(ev_miss == !out_hit, "miss event");
        end
        if (rsp_valid) begin
          check(rsp_data == mem_word(out_addr), "instruction word");
          check(rsp_hit == out_hit, "hit flag");
          check(out_cycles == (out_hit ? 1 : int'(MISS_RSP)), "response latency");
          if (out_hit) n_hit++; else begin n_miss++; resp_miss = 1'b1; end
          out_pending = 1'b0;
          answered++;
        end else if (out_cycles > int'(MISS_RSP)) begin
          check(1'b0, "response timeout");
          out_pending = 1'b0;
          answered++;
        end
      end else begin
        check(!rsp_valid, "no spurious response");
      end
      exp_ready = !(was_pending && (out_pending || resp_miss));
      check(cpu_ready == exp_ready, "cpu_ready");
      if (cpu_req && !cpu_ready) n_stall++;
      took = cpu_req && cpu_ready;
      if (took) begin
        bit h, sk; int mm;
        model_fetch(cpu_addr, cpu_seq, h, mm, sk);
        out_pending = 1'b1; out_addr = cpu_addr; out_hit = h || sk; out_m = mm;
        out_skip = sk; out_cycles = 0;
      end
      if (answered >= int'(N_FETCH) && !out_pending) break;
      @(posedge clk); #1;
      // next request
      if (took) begin
        pick_next();
        cpu_addr = next_a; cpu_seq = next_s;
        if (issued >= int'(N_FETCH)) cpu_req = 1'b0;
        else begin
          issued++;
          if ($urandom_range(0, 19) == 0) begin cpu_req = 1'b0; idle_left = $urandom_range(1, 2); end
        end
      end else if (!cpu_req && idle_left > 0) begin
        idle_left--;
        if (idle_left == 0) cpu_req = 1'b1;
      end
    end
    check(perr == 0, "AHB protocol");
    check(bursts == n_miss, "one burst per miss");
    $display("[%s] fetches=%0d hits=%0d misses=%0d skips=%0d boundary=%0d BC1=%0d BC2=%0d WC1=%0d WC2=%0d stalls=%0d wrap=%0d lru=%0d",
             NAME, answered, n_hit, n_miss, n_skip, n_bbd, n_bc1, n_bc2, n_wc1, n_wc2, n_stall, n_wrap, n_lru);
    check(n_hit > 0, "hit happened");
    check(n_miss > 0, "miss happened");
    check(n_skip > 0, "tag skip happened");
    check(n_bbd > 0, "block boundary happened");
    check(n_bc1 > 0, "BC I happened");
    check(n_bc2 > 0, "BC II happened");
    check(n_wc1 > 0, "WC I happened");
    check(n_wc2 > 0, "WC II happened");
    check(n_stall > 0, "stall happened");
    check(n_wrap > 0, "critical-word-first happened");
    check(n_lru > 0, "LRU replacement happened");
    done = 1'b1;
  end
endmodule
