// tb_lpic_ctrl: checks the control unit with the real memory array but
// without the AHB side: the testbench answers each refill request itself,
// returning the words of the block in wrapping order from the requested
// word with random gaps between beats (1 to 4 cycles), so the control unit
// must cope with an irregular beat stream. A processor model issues a
// random mix of sequential runs and branches into a few sets. Checked
// against a reference model (valid bits, tags, LRU bits, invalid-first
// victim): the refill address, one refill per miss, the victim way written
// with the tags, every returned word and hit flag, the skip decision taken
// at the request, `cpu_ready` low while a refill is outstanding, and the
// response one cycle after a hit request and one cycle after the last beat.
module tb_lpic_ctrl;
  import lpic_pkg::*;
  import tb_mem_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int IW = 8, OW = 4, WW = 2, PW = 3, OTW = 17, SETS = 256, TW = 20;

  logic cpu_req, cpu_seq, cpu_ready, rsp_valid, rsp_hit, ev_miss;
  logic [31:0] cpu_addr, rsp_data, rdata, wr_data, beat_data, fill_addr;
  logic lk_en, lk_skip, acc_v, acc_skip, acc_skip_way, hit, wr_data_v, wr_tag_v, wr_way;
  logic [IW-1:0] lk_index, acc_index, wr_index;
  logic [PW-1:0] acc_ptag, wr_ptag;
  logic [OTW-1:0] acc_otag, wr_otag;
  logic [WW-1:0] acc_word, wr_word, beat_word;
  logic [1:0] acc_valid, hit_way, cen;
  logic fill_start, beat_v, beat_last;
  act_t act;

  lpic_ctrl u_dut (.*);
  lpic_array u_array (.*);

  int checks = 0, failures = 0, cyc = 0;
  int n_fill = 0, n_miss = 0, n_skip = 0, n_hit = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // refill responder
  logic [31:0] f_addr;
  int          f_left, f_gap, f_n, last_beat_cyc;
  initial begin
    beat_v = 0; beat_word = 0; beat_last = 0; beat_data = 0; f_left = 0;
    forever begin
      @(posedge clk); #1;
      beat_v = 0;
      if (fill_start) begin
        n_fill++; f_addr = fill_addr; f_left = 4; f_n = 0; f_gap = $urandom_range(1, 4);
      end else if (f_left > 0) begin
        if (--f_gap == 0) begin
          logic [31:0] a;
          a = {f_addr[31:4], 4'(f_addr[3:0] + 4 * f_n)};
          beat_v = 1; beat_word = a[3:2]; beat_data = mem_word(a); beat_last = (f_left == 1);
          if (f_left == 1) last_beat_cyc = cyc;
          f_left--; f_n++; f_gap = $urandom_range(1, 4);
        end
      end
    end
  end

  // reference model
  logic          rv [SETS][2];
  logic [TW-1:0] rt [SETS][2];
  logic          rl [SETS];
  logic [31:0]   prev;
  bit            have_prev;

  initial begin
    int answered, pend_cycles; bit pend, pend_hit, took; logic [31:0] pend_addr;
    int exp_victim;
    cpu_req = 0; cpu_addr = 32'h2000; cpu_seq = 0; have_prev = 0; pend = 0; answered = 0;
    exp_victim = 0; pend_hit = 0; pend_cycles = 0; pend_addr = 0;
    for (int s = 0; s < SETS; s++) begin rv[s][0] = 0; rv[s][1] = 0; rl[s] = 0; end
    #12 rst_n = 1'b1;
    @(posedge clk); #1; cpu_req = 1;
    while (answered < 3000) begin
      #7;
      if (pend) begin
        pend_cycles++;
        if (rsp_valid) begin
          chk(rsp_data == mem_word(pend_addr), "word");
          chk(rsp_hit == pend_hit, "hit flag");
          if (pend_hit) chk(pend_cycles == 1, "hit latency");
          else chk(cyc == last_beat_cyc + 1, "miss response one cycle after last beat");
          pend = 0; answered++;
        end else begin
          chk(!cpu_ready, "no request taken during refill");
          if (pend_cycles > 100) begin chk(0, "timeout"); pend = 0; answered++; end
        end
      end
      took = cpu_req && cpu_ready;
      if (took) begin
        int unsigned idx; logic [TW-1:0] tag; bit h, sk; int v;
        idx = 32'(cpu_addr[OW +: IW]); tag = cpu_addr[31 -: TW];
        sk = cpu_seq && have_prev && (cpu_addr[31:OW] == prev[31:OW]);
        chk(lk_skip == sk, "skip decision");
        h = 0; v = 0;
        for (int w = 0; w < 2; w++) if (rv[idx][w] && rt[idx][w] == tag) begin h = 1; v = w; end
        if (!h) begin
          v = !rv[idx][0] ? 0 : !rv[idx][1] ? 1 : int'(rl[idx]);
          rv[idx][v] = 1; rt[idx][v] = tag; n_miss++;
        end else n_hit++;
        if (sk) n_skip++;
        exp_victim = v;
        rl[idx] = (v == 0);
        prev = cpu_addr; have_prev = 1;
        pend = 1; pend_hit = h; pend_addr = cpu_addr; pend_cycles = 0;
      end
      @(posedge clk); #1;
      if (fill_start) chk(fill_addr == {pend_addr[31:2], 2'b00}, "refill address");
      if (wr_tag_v) chk(wr_way == 1'(exp_victim) && wr_ptag == pend_addr[14:12] &&
                        wr_otag == pend_addr[31:15] && wr_index == pend_addr[11:4], "tag write");
      if (took) begin
        if ($urandom_range(0, 99) < 65) begin cpu_addr = cpu_addr + 4; cpu_seq = 1; end
        else begin
          cpu_seq = 0;
          cpu_addr = ($urandom_range(0, 3) << 15) | ($urandom_range(0, 1) << 12)
                   | ($urandom_range(0, 7) << 4) | ($urandom_range(0, 3) << 2);
        end
      end
    end
    chk(n_fill == n_miss, "one refill per miss");
    chk(n_skip > 0 && n_miss > 0 && n_hit > n_skip, "all cases seen");
    $display("hits %0d misses %0d skips %0d", n_hit, n_miss, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (cyc > 100000) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      $finish;
    end
  end
endmodule
