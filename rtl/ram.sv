// ram: simple dual-port RAM with independent write and read clocks, holding
// the products of multiplier_mem (256 words of 32 bits by default).
//
// How it works: on a rising edge of wrclock with wren high, data is stored at
// wraddress. On a rising edge of rdclock with rden high, the word at
// rdaddress is loaded into the output register q; with rden low q holds its
// value. rd_aclr clears q to zero at once (asynchronously) and holds it at
// zero while high; it does not touch the stored words.
//
// Timing: one rdclock of read latency. A read of the address being written
// in the same instant returns the old or the new word, depending on the
// relative phase of the two clocks (there is no bypass between clock
// domains).
//
// Follows the reference design: the port names, the widths and the separate
// write and read clocks, read enable and read-side clear. Own choices: the
// single output register (read latency 1) and what rd_aclr clears.
module ram
  import multiplier_mem_pkg::*;
#(
  parameter int unsigned WIDTH  = PRODUCT_W,
  parameter int unsigned ADDR_W = RAM_ADDR_W
) (
  input  logic              wrclock,
  input  logic              wren,
  input  logic [ADDR_W-1:0] wraddress,
  input  logic [WIDTH-1:0]  data,
  input  logic              rdclock,
  input  logic              rden,
  input  logic              rd_aclr,
  input  logic [ADDR_W-1:0] rdaddress,
  output logic [WIDTH-1:0]  q
);
  logic [WIDTH-1:0] mem [2**ADDR_W];

  always_ff @(posedge wrclock) begin
    if (wren) mem[wraddress] <= data;
  end

  always_ff @(posedge rdclock or posedge rd_aclr) begin
    if (rd_aclr)   q <= '0;
    else if (rden) q <= mem[rdaddress];
  end
endmodule
