// tb_lpic_full: the instruction cache at its default configuration (8 KB,
// two ways, 16-byte blocks, 3-bit pre-tag, no sub-banking), no parameter
// overridden, running a long fetch stream (20000 fetches) through the same
// processor model, main memory and reference model as tb_lpic_top. Besides
// the per-fetch checks it reports the memory accesses per fetch, the
// (N_PTag, N_OTag, N_Data) averages that set the access power.
module tb_lpic_full;
  import lpic_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cpu_req, cpu_seq, cpu_ready, rsp_valid, rsp_hit, hwrite, hready, hresp;
  logic [31:0] cpu_addr, rsp_data, haddr, hrdata;
  logic [1:0]  htrans;
  logic [2:0]  hburst, hsize;
  logic [3:0]  hprot;
  act_t        act;
  logic        ev_miss, ev_skip, done;
  int          checks, failures, cyc = 0;
  longint      n_acc = 0, s_p = 0, s_o = 0, s_d = 0;

  lpic_top u_dut (
    .clk, .rst_n, .cpu_req, .cpu_addr, .cpu_seq, .cpu_ready, .rsp_valid, .rsp_hit, .rsp_data,
    .haddr, .htrans, .hburst, .hsize, .hwrite, .hprot, .hready, .hrdata, .hresp,
    .act, .ev_miss, .ev_skip);

  lpic_harness #(.N_FETCH(20000), .SEED(3), .NAME("8KB/16B full")) u_h (
    .clk, .rst_n, .cpu_req, .cpu_addr, .cpu_seq, .cpu_ready, .rsp_valid, .rsp_hit, .rsp_data,
    .haddr, .htrans, .hwrite, .hready, .hrdata, .hresp, .act, .ev_miss, .ev_skip,
    .done, .checks, .failures);

  // memory reads of the access cycles (the cycle after a request is taken)
  logic in_acc = 1'b0;
  always @(posedge clk) begin
    if (in_acc) begin
      n_acc++;
      s_p += $countones(act.ptag); s_o += $countones(act.otag); s_d += $countones(act.data);
    end
    in_acc <= cpu_req && cpu_ready;
  end

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    wait (done);
    $display("accesses %0d: N_PTag %0.3f N_OTag %0.3f N_Data %0.3f per access",
             n_acc, real'(s_p) / n_acc, real'(s_o) / n_acc, real'(s_d) / n_acc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (cyc > 1000000) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      $finish;
    end
  end
endmodule
