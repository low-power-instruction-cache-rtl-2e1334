// subbank_sram: a memory of DEPTH x WIDTH partitioned into NSUB sub-banks.
//
// The most significant log2(NSUB) address bits (the SUB field of the set
// index) go through a sub-bank address decoder that enables only the one
// sub-bank holding the word; the remaining bits (the sub-index) address the
// word inside it. An NSUB-to-1 multiplexer, steered by the SUB field captured
// at the same clock edge as the read, picks the output of the enabled
// sub-bank. Only 1/NSUB of the memory is active per access. With NSUB = 1
// the block is a single macro with no decoder and no multiplexer. Timing is
// that of sram_sp: the read word is valid after the active edge selected by
// NEGEDGE. The use of the index MSBs as SUB field follows the design; that
// the multiplexer select is a register is this implementation's choice.
module subbank_sram #(
  parameter int unsigned DEPTH   = 1024,
  parameter int unsigned WIDTH   = 32,
  parameter int unsigned NSUB    = 8,
  parameter bit          NEGEDGE = 1'b0,
  localparam int unsigned AW     = $clog2(DEPTH),
  localparam int unsigned SW     = (NSUB > 1) ? $clog2(NSUB) : 1,
  localparam int unsigned SDEPTH = DEPTH / NSUB,
  localparam int unsigned SAW    = (SDEPTH > 1) ? $clog2(SDEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] q,
  output logic [NSUB-1:0]  bank_en   // decoder output: sub-bank enabled this access
);

  logic [WIDTH-1:0] bank_q [NSUB];

  if (NSUB == 1) begin : g_single
    assign bank_en = ce;
    sram_sp #(.DEPTH(DEPTH), .WIDTH(WIDTH), .NEGEDGE(NEGEDGE)) u_bank (
      .clk, .rst_n, .ce, .we, .addr, .wdata, .q(bank_q[0]));
    assign q = bank_q[0];
  end else begin : g_multi
    logic [SW-1:0]  sub;
    logic [SAW-1:0] sub_index;
    logic [SW-1:0]  sel_q;

    assign sub       = addr[AW-1 -: SW];
    assign sub_index = addr[SAW-1:0];

    // sub-bank address decoder
    always_comb begin
      bank_en = '0;
      bank_en[sub] = ce;
    end

    for (genvar b = 0; b < NSUB; b++) begin : g_bank
      sram_sp #(.DEPTH(SDEPTH), .WIDTH(WIDTH), .NEGEDGE(NEGEDGE)) u_bank (
        .clk, .rst_n, .ce(bank_en[b]), .we, .addr(sub_index), .wdata, .q(bank_q[b]));
    end

    // output multiplexer select, captured with the read
    if (NEGEDGE) begin : g_sel_neg
      always_ff @(negedge clk or negedge rst_n)
        if (!rst_n)           sel_q <= '0;
        else if (ce && !we)   sel_q <= sub;
    end else begin : g_sel_pos
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n)           sel_q <= '0;
        else if (ce && !we)   sel_q <= sub;
    end

    assign q = bank_q[sel_q];
  end

endmodule
