// tb_lpic_array: checks the two-phased, pre-tag-checked memory array at its
// default size (8 KB, 16-byte blocks, 3-bit pre-tag). It writes every block
// of both ways through the refill port, with tags drawn from a small pool so
// that pre-tags often collide, then runs random look-ups and skipped
// accesses. Per access it checks against a reference model: the pre-tag
// match lines (`cen`), the per-way hit, the word returned, and which
// memories were enabled (both pre-tags; other-tag and data only where the
// pre-tag matched; for a skip only the named data memory). It also checks
// that the pre-tag read is issued only when `lk_en` is set without `lk_skip`.
module tb_lpic_array;
  import lpic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int IW = 8, WW = 2, PW = 3, OTW = 17, SETS = 256;

  logic lk_en, lk_skip, acc_v, acc_skip, acc_skip_way;
  logic [IW-1:0] lk_index, acc_index, wr_index;
  logic [PW-1:0] acc_ptag, wr_ptag;
  logic [OTW-1:0] acc_otag, wr_otag;
  logic [WW-1:0] acc_word, wr_word;
  logic [1:0] acc_valid, cen, hit_way;
  logic wr_data_v, wr_tag_v, wr_way, hit;
  logic [31:0] wr_data, rdata;
  act_t act;

  lpic_array u_dut (.*);

  logic [PW-1:0]  r_ptag [SETS][2];
  logic [OTW-1:0] r_otag [SETS][2];
  logic [31:0]    r_data [SETS][2][4];
  logic           r_valid [SETS][2];
  int checks = 0, failures = 0, cyc = 0, n_m [3], n_hit = 0, n_skip = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic idle();
    lk_en = 0; lk_skip = 0; acc_v = 0; acc_skip = 0; wr_data_v = 0; wr_tag_v = 0;
  endtask

  initial begin
    idle(); acc_skip_way = 0; lk_index = 0; acc_index = 0; wr_index = 0; acc_ptag = 0;
    wr_ptag = 0; acc_otag = 0; wr_otag = 0; acc_word = 0; wr_word = 0; acc_valid = 0;
    wr_way = 0; wr_data = 0;
    n_m[0] = 0; n_m[1] = 0; n_m[2] = 0;
    #12 rst_n = 1'b1;
    // fill: distinct full tags per set
    for (int s = 0; s < SETS; s++) begin
      for (int w = 0; w < 2; w++) begin
        do begin
          r_ptag[s][w] = PW'($urandom_range(0, 1));
          r_otag[s][w] = OTW'($urandom_range(0, 2));
        end while (w == 1 && r_ptag[s][1] == r_ptag[s][0] && r_otag[s][1] == r_otag[s][0]);
        r_valid[s][w] = ($urandom_range(0, 7) != 0);
        for (int k = 0; k < 4; k++) begin
          @(posedge clk); #1;
          idle();
          r_data[s][w][k] = $urandom;
          wr_data_v = 1; wr_way = 1'(w); wr_index = IW'(s); wr_word = WW'(k);
          wr_data = r_data[s][w][k];
          if (k == 3) begin wr_tag_v = 1; wr_ptag = r_ptag[s][w]; wr_otag = r_otag[s][w]; end
        end
      end
    end
    @(posedge clk); #1; idle();
    for (int n = 0; n < 4000; n++) begin
      int s, m; bit sk; logic [PW-1:0] pt; logic [OTW-1:0] ot; int k, sw;
      logic [1:0] e_cen, e_hit; logic [31:0] e_data;
      s = $urandom_range(0, SETS - 1); k = $urandom_range(0, 3);
      pt = PW'($urandom_range(0, 1)); ot = OTW'($urandom_range(0, 2));
      sk = ($urandom_range(0, 4) == 0); sw = $urandom_range(0, 1);
      // request cycle
      @(posedge clk); #1;
      lk_en = 1; lk_skip = sk; lk_index = IW'(s);
      // access cycle
      @(posedge clk); #1;
      lk_en = 0; lk_skip = 0;
      acc_v = 1; acc_skip = sk; acc_skip_way = 1'(sw); acc_index = IW'(s); acc_word = WW'(k);
      acc_ptag = pt; acc_otag = ot; acc_valid = {r_valid[s][1], r_valid[s][0]};
      #7;
      e_cen = '0; e_hit = '0; e_data = '0;
      if (sk) begin
        e_hit[sw] = 1'b1;
        e_data = r_data[s][sw][k];
      end else begin
        for (int w = 0; w < 2; w++) begin
          e_cen[w] = r_valid[s][w] && r_ptag[s][w] == pt;
          e_hit[w] = e_cen[w] && r_otag[s][w] == ot;
          if (e_hit[w]) e_data = r_data[s][w][k];
        end
      end
      m = $countones(e_cen);
      chk(cen == e_cen, "pre-tag match");
      chk(hit_way == e_hit && hit == |e_hit, "hit");
      chk(rdata == e_data, "data");
      if (sk) chk(act.ptag == 0 && act.otag == 0 && act.data == (2'b01 << sw), "skip activity");
      else chk(act.ptag == 2'b11 && act.otag == e_cen && act.data == e_cen, "look-up activity");
      if (sk) n_skip++; else n_m[m]++;
      if (|e_hit) n_hit++;
      @(posedge clk); #1; idle();
    end
    chk(n_m[0] > 0 && n_m[1] > 0 && n_m[2] > 0 && n_skip > 0 && n_hit > 0, "all cases seen");
    $display("pre-tag matches 0/1/2: %0d/%0d/%0d  skips %0d  hits %0d", n_m[0], n_m[1], n_m[2], n_skip, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the pre-tag memories are read only for a non-skipped request
  always @(posedge clk) begin
    if (rst_n && lk_en) begin
      checks++;
      if (u_dut.ptag_ce != (lk_skip ? 2'b00 : 2'b11)) failures++;
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (cyc > 40000) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      $finish;
    end
  end
endmodule
