// sram_sp: single-port synchronous SRAM, the memory-compiler macro the cache
// is assembled from (one instance per tag, pre-tag or data memory, or per
// sub-bank of one).
//
// A word is read or written only when the active-high chip enable `ce` is set
// at the active clock edge: a disabled macro does nothing and holds its last
// output, which is what saves its access power. `we` selects a write; a read
// puts the addressed word on `q` right after the edge. NEGEDGE selects the
// active edge: the cache's pre-tag memories work on the rising edge (first
// half of the cycle) and its other-tag and data memories on the falling edge
// (second half), so that one access fits in one clock cycle. The storage is
// not reset, as in a real macro; `q` is reset to zero so that the output is
// defined before the first read. Contents are the cache's own choice of a
// plain array; the macro's power figures come from the memory compiler and
// are not modelled.
module sram_sp #(
  parameter int unsigned DEPTH   = 256,
  parameter int unsigned WIDTH   = 20,
  parameter bit          NEGEDGE = 1'b0,
  localparam int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] mem [DEPTH];

  if (NEGEDGE) begin : g_neg
    always_ff @(negedge clk or negedge rst_n) begin
      if (!rst_n)            q <= '0;
      else if (ce && !we)    q <= mem[addr];
    end
    always_ff @(negedge clk) begin
      if (ce && we) mem[addr] <= wdata;
    end
  end else begin : g_pos
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)            q <= '0;
      else if (ce && !we)    q <= mem[addr];
    end
    always_ff @(posedge clk) begin
      if (ce && we) mem[addr] <= wdata;
    end
  end

endmodule
