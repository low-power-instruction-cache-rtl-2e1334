// bbd_detector: block boundary detector for tag-memory access skipping.
//
// The processor raises `seq` when the fetch address is the previous one plus
// one word. A sequential fetch stays in the previous block unless it crosses
// a block boundary, and for a sequential step that crossing is exactly a
// change of the lowest block-address bit A[OFFSET_W] (A[4] for 16-byte
// blocks). The detector keeps that bit of the last fetch in a flip-flop
// (pc_r), compares it with the current one in an XOR gate and ANDs the result
// with `seq`: `bbd` is high for a sequential fetch that has entered a new
// block. A sequential fetch with `bbd` low is in the previous block, so the
// cache may skip the tag look-up and reuse the previous hit. The flip-flop loads only
// when `en` marks a fetch the cache accepted, so that a stalled fetch does not
// disturb it; the enable is this implementation's addition to the
// XOR/AND/flip-flop structure of the design. Purely combinational outputs;
// pc_r is reset to 0.
module bbd_detector (
  input  logic clk,
  input  logic rst_n,
  input  logic en,        // current fetch is accepted this cycle
  input  logic pc_bit,    // A[OFFSET_W] of the current fetch
  input  logic seq,       // current fetch is sequential to the previous one
  output logic bbd        // sequential fetch crossed a block boundary
);

  logic pc_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  pc_r <= 1'b0;
    else if (en) pc_r <= pc_bit;
  end

  assign bbd = seq & (pc_bit ^ pc_r);

endmodule
