// tb_sram_sp: checks the SRAM macro model in both clock-edge variants
// against a reference array: writes, reads (word valid right after the
// active edge, not before), and that a disabled macro holds its output and
// ignores writes.
module tb_sram_sp;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;   // rising edges at 5, 15, ...; falling at 10, 20, ...

  localparam int D = 64, W = 20;
  logic          ce [2], we [2];
  logic [5:0]    addr [2];
  logic [W-1:0]  wdata [2], q [2];
  logic [W-1:0]  ref_mem [2][D];
  logic [W-1:0]  exp_q [2];
  int checks = 0, failures = 0, cyc = 0;

  sram_sp #(.DEPTH(D), .WIDTH(W), .NEGEDGE(1'b0)) u_pos (
    .clk, .rst_n, .ce(ce[0]), .we(we[0]), .addr(addr[0]), .wdata(wdata[0]), .q(q[0]));
  sram_sp #(.DEPTH(D), .WIDTH(W), .NEGEDGE(1'b1)) u_neg (
    .clk, .rst_n, .ce(ce[1]), .we(we[1]), .addr(addr[1]), .wdata(wdata[1]), .q(q[1]));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    for (int i = 0; i < 2; i++) begin ce[i] = 0; we[i] = 0; addr[i] = 0; wdata[i] = 0; exp_q[i] = 0; end
    #12 rst_n = 1'b1;
    // fill both memories
    for (int a = 0; a < D; a++) begin
      @(posedge clk); #1;
      for (int i = 0; i < 2; i++) begin
        ce[i] = 1; we[i] = 1; addr[i] = 6'(a); wdata[i] = W'($urandom); ref_mem[i][a] = wdata[i];
      end
      @(posedge clk); #1;  // both edges passed: write done
      for (int i = 0; i < 2; i++) begin ce[i] = 0; we[i] = 0; end
    end
    // random reads, writes and idle cycles; each operation is set up 1 unit
    // after a rising edge and applied by the next active edge of each macro
    for (int n = 0; n < 2000; n++) begin
      int op [2];
      @(posedge clk); #1;
      for (int i = 0; i < 2; i++) begin
        op[i] = $urandom_range(0, 2);   // 0 idle, 1 read, 2 write
        ce[i] = (op[i] != 0); we[i] = (op[i] == 2);
        addr[i] = 6'($urandom_range(0, D - 1)); wdata[i] = W'($urandom);
      end
      // falling-edge macro: before its edge the old output must remain
      #3 chk(q[1] == exp_q[1], "negedge q before edge");
      @(negedge clk); #1;
      if (op[1] == 1) exp_q[1] = ref_mem[1][addr[1]];
      if (op[1] == 2) ref_mem[1][addr[1]] = wdata[1];
      chk(q[1] == exp_q[1], "negedge q after edge");
      chk(q[0] == exp_q[0], "posedge q held until edge");
      @(posedge clk); #1;
      if (op[0] == 1) exp_q[0] = ref_mem[0][addr[0]];
      if (op[0] == 2) ref_mem[0][addr[0]] = wdata[0];
      chk(q[0] == exp_q[0], "posedge q after edge");
      for (int i = 0; i < 2; i++) begin ce[i] = 0; we[i] = 0; end
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
