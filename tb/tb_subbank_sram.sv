// tb_subbank_sram: checks the sub-banked memory at its default size
// (1024 x 32 in 8 sub-banks) and a 4-sub-bank tag memory (256 x 17)
// against reference arrays: correct data through the output multiplexer,
// the decoder enabling exactly the sub-bank named by the address MSBs, and
// no sub-bank enabled when the memory is idle.
module tb_subbank_sram;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        ce_d, we_d, ce_t, we_t;
  logic [9:0]  addr_d;
  logic [7:0]  addr_t;
  logic [31:0] wd_d, q_d;
  logic [16:0] wd_t, q_t;
  logic [7:0]  be_d;
  logic [3:0]  be_t;
  logic [31:0] ref_d [1024];
  logic [16:0] ref_t [256];
  int checks = 0, failures = 0, cyc = 0;

  subbank_sram u_data (.clk, .rst_n, .ce(ce_d), .we(we_d), .addr(addr_d), .wdata(wd_d),
                       .q(q_d), .bank_en(be_d));
  subbank_sram #(.DEPTH(256), .WIDTH(17), .NSUB(4), .NEGEDGE(1'b1)) u_tag (
    .clk, .rst_n, .ce(ce_t), .we(we_t), .addr(addr_t), .wdata(wd_t), .q(q_t), .bank_en(be_t));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    ce_d = 0; we_d = 0; addr_d = 0; wd_d = 0; ce_t = 0; we_t = 0; addr_t = 0; wd_t = 0;
    #12 rst_n = 1'b1;
    for (int a = 0; a < 1024; a++) begin
      @(posedge clk); #1;
      ce_d = 1; we_d = 1; addr_d = 10'(a); wd_d = $urandom; ref_d[a] = wd_d;
      ce_t = (a < 256); we_t = 1; addr_t = 8'(a); wd_t = 17'($urandom);
      if (a < 256) ref_t[a] = wd_t;
      #1;
      chk(be_d == (8'b1 << addr_d[9:7]), "data decoder on write");
      if (a < 256) chk(be_t == (4'b1 << addr_t[7:6]), "tag decoder on write");
    end
    @(posedge clk); #1;
    ce_d = 0; we_d = 0; ce_t = 0; we_t = 0;
    #1 chk(be_d == 0 && be_t == 0, "idle: no sub-bank enabled");
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk); #1;
      ce_d = 1; we_d = ($urandom_range(0, 3) == 0); addr_d = 10'($urandom); wd_d = $urandom;
      ce_t = 1; we_t = ($urandom_range(0, 3) == 0); addr_t = 8'($urandom); wd_t = 17'($urandom);
      #1;
      chk($onehot(be_d) && be_d[addr_d[9:7]], "data sub-bank enable");
      chk($onehot(be_t) && be_t[addr_t[7:6]], "tag sub-bank enable");
      @(negedge clk); #1;
      if (we_t) ref_t[addr_t] = wd_t;
      else chk(q_t == ref_t[addr_t], "tag read data");
      @(posedge clk); #1;
      if (we_d) ref_d[addr_d] = wd_d;
      else chk(q_d == ref_d[addr_d], "data read data");
      ce_d = 0; ce_t = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (cyc > 20000) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      $finish;
    end
  end
endmodule
