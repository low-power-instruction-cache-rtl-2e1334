// ahb_mem_model: behavioural AHB-Lite slave standing for the main memory.
// Read-only; the data come from tb_mem_pkg::mem_word. A NONSEQ transfer is
// answered LAT cycles after its address phase (LAT-1 wait states), so the
// first (critical) word of a burst arrives ten cycles after the access with
// the default LAT = 10; SEQ beats follow without wait states unless
// RAND_WAIT adds random ones. It counts bursts and checks that SEQ beats
// follow a NONSEQ. Not synthesizable.
module ahb_mem_model #(
  parameter int unsigned LAT       = 10,
  parameter bit          RAND_WAIT = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  output logic        hready,
  output logic [31:0] hrdata,
  output logic        hresp,
  output int          bursts,
  output int          protocol_errors
);
  import tb_mem_pkg::*;

  logic        d_pend;
  logic [31:0] d_addr;
  int          wait_cnt;
  logic        in_burst;

  assign hready = !d_pend || (wait_cnt == 0);
  assign hrdata = d_pend ? mem_word(d_addr) : 32'h0;
  assign hresp  = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_pend <= 1'b0; d_addr <= '0; wait_cnt <= 0; bursts <= 0;
      protocol_errors <= 0; in_burst <= 1'b0;
    end else begin
      if (hready) begin
        if (htrans[1]) begin
          d_pend <= 1'b1;
          d_addr <= haddr;
          if (hwrite) protocol_errors <= protocol_errors + 1;
          if (htrans == 2'b10) begin
            wait_cnt <= int'(LAT) - 1;
            bursts   <= bursts + 1;
            in_burst <= 1'b1;
          end else begin
            wait_cnt <= RAND_WAIT ? int'($urandom_range(0, 2)) : 0;
            if (!in_burst) protocol_errors <= protocol_errors + 1;
          end
        end else begin
          d_pend   <= 1'b0;
          in_burst <= 1'b0;
        end
      end else begin
        wait_cnt <= wait_cnt - 1;
      end
    end
  end
endmodule
