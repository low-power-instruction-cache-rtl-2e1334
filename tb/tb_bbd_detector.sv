// tb_bbd_detector: drives random fetch streams into the block boundary
// detector and checks `bbd` against a model that keeps the
// block-address bit of the last accepted fetch.
module tb_bbd_detector;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic en, pc_bit, seq, bbd;
  logic last;
  int checks = 0, failures = 0, cyc = 0, n_cross = 0, n_same = 0;

  bbd_detector u_dut (.clk, .rst_n, .en, .pc_bit, .seq, .bbd);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [31:0] pc;
    en = 0; pc_bit = 0; seq = 0; last = 0; pc = 32'h100;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(posedge clk); #1;
      // next fetch: sequential (+4) or a jump
      seq = ($urandom_range(0, 3) != 0);
      pc  = seq ? pc + 4 : ($urandom & 32'hFFFF_FFFC);
      pc_bit = pc[4];
      en = ($urandom_range(0, 4) != 0);
      #2;
      chk(bbd == (seq && (pc[4] != last)), "bbd");
      if (bbd) n_cross++;
      if (seq && !bbd) n_same++;
      if (en) last = pc[4];
      else pc = pc - (seq ? 4 : 0);   // not accepted: fetch is repeated
    end
    chk(n_cross > 0 && n_same > 0, "both outcomes seen");
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
