// tb_lpic_top: end-to-end test of the instruction cache. Four caches run
// the same kind of fetch stream side by side, each with its own processor
// model, main memory and reference model (lpic_harness):
//   * the default configuration (8 KB, 16-byte blocks, 3-bit pre-tag);
//   * the sub-banked variant (tag memories in 4, data memories in 8
//     sub-banks), where it is also checked that every data-memory read
//     enables exactly one sub-bank;
//   * 8 KB with 32-byte blocks (A[5] is the block boundary bit, 8-beat bursts);
//   * 32 KB with 16-byte blocks, sub-banked (10-bit index, 15-bit other tag).
// Prints TB_RESULT with the summed checks and failures.
module tb_lpic_top;
  import lpic_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks [4], failures [4];
  logic [3:0] done;
  int sub_checks = 0, sub_fail = 0, sub_seen = 0, cyc = 0;

  for (genvar g = 0; g < 4; g++) begin : g_cfg
    localparam int unsigned BB  = (g == 2) ? 32 : 16;
    localparam int unsigned TS  = (g == 1 || g == 3) ? 4 : 1;
    localparam int unsigned DS  = (g == 1 || g == 3) ? 8 : 1;
    localparam int unsigned CB  = (g == 3) ? 32768 : 8192;
    logic        cpu_req, cpu_seq, cpu_ready, rsp_valid, rsp_hit, hwrite, hready, hresp;
    logic [31:0] cpu_addr, rsp_data, haddr, hrdata;
    logic [1:0]  htrans;
    logic [2:0]  hburst, hsize;
    logic [3:0]  hprot;
    act_t        act;
    logic        ev_miss, ev_skip;

    lpic_top #(.CACHE_BYTES(CB), .BLOCK_BYTES(BB), .PTAG_W(3), .TAG_SUB(TS), .DATA_SUB(DS)) u_dut (
      .clk, .rst_n, .cpu_req, .cpu_addr, .cpu_seq, .cpu_ready, .rsp_valid, .rsp_hit, .rsp_data,
      .haddr, .htrans, .hburst, .hsize, .hwrite, .hprot, .hready, .hrdata, .hresp,
      .act, .ev_miss, .ev_skip);

    lpic_harness #(.CACHE_BYTES(CB), .BLOCK_BYTES(BB), .PTAG_W(3), .N_FETCH(3000),
                   .SEED(g + 7), .NAME(g == 0 ? "8KB/16B" : g == 1 ? "8KB/16B sub-banked" : g == 2 ? "8KB/32B" : "32KB/16B sub-banked")) u_h (
      .clk, .rst_n, .cpu_req, .cpu_addr, .cpu_seq, .cpu_ready, .rsp_valid, .rsp_hit, .rsp_data,
      .haddr, .htrans, .hwrite, .hready, .hrdata, .hresp, .act, .ev_miss, .ev_skip,
      .done(done[g]), .checks(checks[g]), .failures(failures[g]));
  end

  // sub-banking: one data sub-bank per enabled data memory, sampled at the falling edge
  always @(negedge clk) begin
    if (rst_n) begin
      for (int w = 0; w < 2; w++) begin
        logic [7:0] be;
        be = (w == 0) ? g_cfg[1].u_dut.u_array.g_way[0].u_data.bank_en
                      : g_cfg[1].u_dut.u_array.g_way[1].u_data.bank_en;
        if (g_cfg[1].act.data[w]) begin
          sub_checks++;
          if ($countones(be) != 1) sub_fail++;
          sub_seen++;
        end else if (be != 0) begin
          sub_checks++; sub_fail++;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    wait (&done);
    begin
      int c, f;
      c = sub_checks + 1; f = sub_fail + (sub_seen == 0 ? 1 : 0);
      for (int g = 0; g < 4; g++) begin c += checks[g]; f += failures[g]; end
      $display("TB_RESULT checks=%0d failures=%0d", c, f);
    end
    $finish;
  end

  // watchdog
  always @(posedge clk) begin
    cyc++;
    if (cyc > 200000) begin
      int c, f;
      c = 0; f = 1;
      for (int g = 0; g < 4; g++) begin c += checks[g]; f += failures[g]; end
      $display("watchdog expired: answered %0d %0d %0d %0d", g_cfg[0].u_h.answered, g_cfg[1].u_h.answered, g_cfg[2].u_h.answered, g_cfg[3].u_h.answered);
      $display("TB_RESULT checks=%0d failures=%0d", c, f);
      $finish;
    end
  end
endmodule
