// ahb_burst_master: AHB-Lite master that refills one cache block.
//
// On `start` it reads the BEATS words of the block that holds `start_addr`
// as one wrapping burst (WRAP4 for 4-word blocks, WRAP8 for 8-word blocks),
// beginning with the requested word, so the word the processor is waiting
// for comes back first. Transfers are pipelined the AHB way: the address
// phase of beat n+1 overlaps the data phase of beat n, and everything
// advances only when HREADY is high. Every word returned is handed to the
// control unit on `beat_v` together with its position in the block
// (`beat_word`); `beat_last` marks the final beat. `busy` is high from
// `start` until the last beat. Reads only (HWRITE low), word size,
// HPROT = opcode fetch, non-cacheable, privileged. `start` is ignored while
// busy. The design only says that an AHB master fetches the missing block
// from main memory; burst type, wrapping order and HPROT are this
// implementation's choices. HRESP is expected to be OKAY (error responses
// are not handled; an assertion flags them).
module ahb_burst_master
  import lpic_pkg::*;
#(
  parameter int unsigned BEATS = 4,
  localparam int unsigned WW   = (BEATS > 1) ? $clog2(BEATS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // control unit side
  input  logic              start,
  input  logic [ADDR_W-1:0] start_addr,
  output logic              busy,
  output logic              beat_v,
  output logic [WW-1:0]     beat_word,
  output logic              beat_last,
  output logic [WORD_W-1:0] beat_data,
  // AHB-Lite master
  output logic [ADDR_W-1:0] haddr,
  output logic [1:0]        htrans,
  output logic [2:0]        hburst,
  output logic [2:0]        hsize,
  output logic              hwrite,
  output logic [3:0]        hprot,
  input  logic              hready,
  input  logic [WORD_W-1:0] hrdata,
  input  logic              hresp
);

  logic              addr_v, data_v;
  logic [WW-1:0]     addr_cnt, data_cnt;
  logic [WW-1:0]     first_word;
  logic [ADDR_W-1:0] blk_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_v     <= 1'b0;
      data_v     <= 1'b0;
      addr_cnt   <= '0;
      data_cnt   <= '0;
      first_word <= '0;
      blk_addr   <= '0;
    end else begin
      if (start && !busy) begin
        addr_v     <= 1'b1;
        addr_cnt   <= '0;
        first_word <= start_addr[2 +: WW];
        blk_addr   <= {start_addr[ADDR_W-1:WW+2], {(WW+2){1'b0}}};
      end else if (hready) begin
        data_v <= addr_v;
        if (addr_v) begin
          data_cnt <= addr_cnt;
          if (addr_cnt == WW'(BEATS - 1)) addr_v <= 1'b0;
          addr_cnt <= addr_cnt + 1'b1;
        end
      end
    end
  end

  assign busy      = addr_v || data_v;
  assign htrans    = !addr_v ? HTRANS_IDLE : (addr_cnt == '0 ? HTRANS_NONSEQ : HTRANS_SEQ);
  assign haddr     = blk_addr | {{(ADDR_W-WW-2){1'b0}}, WW'(first_word + addr_cnt), 2'b00};
  assign hburst    = (BEATS == 16) ? HBURST_WRAP16 : (BEATS == 8) ? HBURST_WRAP8 : HBURST_WRAP4;
  assign hsize     = HSIZE_WORD;
  assign hwrite    = 1'b0;
  assign hprot     = 4'b0010;

  assign beat_v    = data_v && hready;
  assign beat_word = WW'(first_word + data_cnt);
  assign beat_last = (data_cnt == WW'(BEATS - 1));
  assign beat_data = hrdata;

  a_okay: assert property (@(posedge clk) disable iff (!rst_n) data_v |-> hresp == HRESP_OKAY)
    else $error("ahb_burst_master: error response");

endmodule
