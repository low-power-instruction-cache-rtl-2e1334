// tb_ahb_burst_master: runs refill bursts of 4 and of 8 words against the
// behavioural AHB memory (10-cycle first access, random wait states on the
// later beats). Checks: NONSEQ then SEQ transfer types, HBURST, word size,
// read-only, address held while HREADY is low, wrapping address order
// starting at the requested word, every returned word and its position in
// the block, the last-beat flag, one beat per requested word, and the
// first-word latency (the critical word arrives LAT cycles after its
// address phase, LAT + 1 cycles after the cycle in which `start` is high).
module tb_ahb_burst_master;
  import lpic_pkg::*;
  import tb_mem_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int LAT = 10;
  int checks = 0, failures = 0, cyc = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic        start [2], busy [2], beat_v [2], beat_last [2], hwrite [2], hready [2], hresp [2];
  logic [31:0] start_addr [2], beat_data [2], haddr [2], hrdata [2];
  logic [1:0]  htrans [2];
  logic [2:0]  hburst [2], hsize [2];
  logic [3:0]  hprot [2];
  logic [2:0]  beat_word [2];
  int          bursts [2], perr [2];

  logic [1:0] bw4;
  ahb_burst_master #(.BEATS(4)) u_m4 (
    .clk, .rst_n, .start(start[0]), .start_addr(start_addr[0]), .busy(busy[0]),
    .beat_v(beat_v[0]), .beat_word(bw4), .beat_last(beat_last[0]), .beat_data(beat_data[0]),
    .haddr(haddr[0]), .htrans(htrans[0]), .hburst(hburst[0]), .hsize(hsize[0]),
    .hwrite(hwrite[0]), .hprot(hprot[0]), .hready(hready[0]), .hrdata(hrdata[0]), .hresp(hresp[0]));
  assign beat_word[0] = {1'b0, bw4};
  ahb_burst_master #(.BEATS(8)) u_m8 (
    .clk, .rst_n, .start(start[1]), .start_addr(start_addr[1]), .busy(busy[1]),
    .beat_v(beat_v[1]), .beat_word(beat_word[1]), .beat_last(beat_last[1]), .beat_data(beat_data[1]),
    .haddr(haddr[1]), .htrans(htrans[1]), .hburst(hburst[1]), .hsize(hsize[1]),
    .hwrite(hwrite[1]), .hprot(hprot[1]), .hready(hready[1]), .hrdata(hrdata[1]), .hresp(hresp[1]));

  for (genvar g = 0; g < 2; g++) begin : g_mem
    ahb_mem_model #(.LAT(LAT), .RAND_WAIT(1'b1)) u_mem (
      .clk, .rst_n, .haddr(haddr[g]), .htrans(htrans[g]), .hwrite(hwrite[g]),
      .hready(hready[g]), .hrdata(hrdata[g]), .hresp(hresp[g]),
      .bursts(bursts[g]), .protocol_errors(perr[g]));
  end

  // address and control must hold while the slave stretches a transfer
  logic [31:0] last_haddr [2];
  logic [1:0]  last_htrans [2];
  logic        was_stalled [2];
  always @(posedge clk) begin
    for (int g = 0; g < 2; g++) begin
      if (rst_n && was_stalled[g]) begin
        checks++;
        if (haddr[g] != last_haddr[g] || htrans[g] != last_htrans[g]) failures++;
      end
      was_stalled[g] = rst_n && !hready[g] && htrans[g] != 2'b00;
      last_haddr[g] = haddr[g]; last_htrans[g] = htrans[g];
    end
  end

  task automatic run_burst(input int g, input int beats);
    logic [31:0] a; int got, first_lat, t; bit seen_first;
    a = ($urandom & 32'hFFFF_FFFC);
    @(posedge clk); #1;
    start[g] = 1; start_addr[g] = a;
    @(posedge clk); #1;
    start[g] = 0;
    got = 0; t = 0; seen_first = 0;
    while (got < beats && t < 200) begin
      #7;
      t++;
      if (htrans[g] != 2'b00 && hready[g]) begin
        int n;
        n = got + (seen_first ? 1 : 0);
        chk(htrans[g] == ((haddr[g] == a) ? 2'b10 : 2'b11), "transfer type");
        chk(hburst[g] == (beats == 4 ? 3'b010 : 3'b100) && hsize[g] == 3'b010 && !hwrite[g],
            "burst, size, direction");
        if (haddr[g] == a) seen_first = 1;
      end
      if (beat_v[g]) begin
        logic [31:0] ea;
        ea = (a & ~32'(beats * 4 - 1)) | (((a >> 2) + 32'(got)) % beats) << 2;
        chk(beat_word[g] == 3'(ea[4:2] & 3'(beats - 1)), "beat position");
        chk(beat_data[g] == mem_word(ea), "beat data");
        chk(beat_last[g] == (got == beats - 1), "last flag");
        if (got == 0) chk(t == LAT + 1, $sformatf("first-word latency %0d", t));
        got++;
      end
      @(posedge clk); #1;
    end
    chk(got == beats, "beat count");
    @(posedge clk); #1;
    chk(!busy[g], "idle after burst");
  endtask

  initial begin
    for (int g = 0; g < 2; g++) begin start[g] = 0; start_addr[g] = 0; was_stalled[g] = 0; end
    #12 rst_n = 1'b1;
    for (int n = 0; n < 60; n++) begin
      run_burst(0, 4);
      run_burst(1, 8);
    end
    chk(perr[0] == 0 && perr[1] == 0, "protocol");
    chk(bursts[0] == 60 && bursts[1] == 60, "burst count");
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
