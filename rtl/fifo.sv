// fifo: dual-clock (asynchronous) FIFO that moves one operand stream from its
// write clock into the read clock domain.
//
// How it works: the storage is a 2**ADDR_W-word array written on wrclk and
// read on rdclk. Each side keeps a binary pointer one bit wider than the
// address plus its Gray-coded copy; the Gray pointer is passed to the other
// clock through a two-flop synchronizer. The write side is full when its Gray
// pointer equals the synchronized read pointer with the two top bits inverted;
// the read side is empty when its Gray pointer equals the synchronized write
// pointer. Both flags are registered, so they are pessimistic by the
// synchronizer delay: a word written becomes visible to the reader 2-3 rdclk
// edges later, and space freed by a read is seen by the writer 2-3 wrclk
// edges later.
//
// Interface (port names follow the reference design's FIFO instance):
//   data/wrreq on wrclk, wrfull on wrclk; rdreq on rdclk, q and rdempty on rdclk.
//   A write while wrfull and a read while rdempty are ignored (overflow and
//   underflow protection), so a producer or consumer may ignore the flags.
// Timing: "normal" (not look-ahead) read mode: q takes the head word on the
//   rdclk edge that accepts rdreq, and holds it until the next accepted read.
//
// Own choices: the depth (ADDR_W), the Gray-pointer structure, the protected
// full/empty behaviour and the asynchronous clear aclr, which resets both
// pointers and q; the reference design only names the FIFO and its ports.
module fifo
  import multiplier_mem_pkg::*;
#(
  parameter int unsigned WIDTH  = OPERAND_W,
  parameter int unsigned ADDR_W = FIFO_ADDR_W
) (
  input  logic             aclr,
  input  logic             wrclk,
  input  logic             wrreq,
  input  logic [WIDTH-1:0] data,
  output logic             wrfull,
  input  logic             rdclk,
  input  logic             rdreq,
  output logic [WIDTH-1:0] q,
  output logic             rdempty
);
  localparam int unsigned DEPTH = 2 ** ADDR_W;
  typedef logic [ADDR_W:0] ptr_t;

  logic [WIDTH-1:0] mem [DEPTH];

  ptr_t wbin, wgray, rbin, rgray;
  ptr_t wq1_rgray, wq2_rgray;   // read pointer seen in the write domain
  ptr_t rq1_wgray, rq2_wgray;   // write pointer seen in the read domain

  function automatic ptr_t bin2gray(ptr_t bin);
    return bin ^ (bin >> 1);
  endfunction

  // ---------------- write domain ----------------
  logic wr_ok;
  ptr_t wbin_next, wgray_next;
  assign wr_ok      = wrreq && !wrfull;
  assign wbin_next  = wbin + ptr_t'(wr_ok);
  assign wgray_next = bin2gray(wbin_next);

  always_ff @(posedge wrclk) begin
    if (wr_ok) mem[wbin[ADDR_W-1:0]] <= data;
  end

  always_ff @(posedge wrclk or posedge aclr) begin
    if (aclr) begin
      wbin      <= '0;
      wgray     <= '0;
      wrfull    <= 1'b0;
      wq1_rgray <= '0;
      wq2_rgray <= '0;
    end else begin
      wbin      <= wbin_next;
      wgray     <= wgray_next;
      wq1_rgray <= rgray;
      wq2_rgray <= wq1_rgray;
      wrfull    <= (wgray_next == {~wq2_rgray[ADDR_W:ADDR_W-1], wq2_rgray[ADDR_W-2:0]});
      // A Gray pointer changes by at most one bit per clock; this is what
      // makes the two-flop synchronizers safe.
      a_wgray_one_bit: assert ($countones(wgray ^ wgray_next) <= 1);
    end
  end

  // ---------------- read domain ----------------
  logic rd_ok;
  ptr_t rbin_next, rgray_next;
  assign rd_ok      = rdreq && !rdempty;
  assign rbin_next  = rbin + ptr_t'(rd_ok);
  assign rgray_next = bin2gray(rbin_next);

  always_ff @(posedge rdclk or posedge aclr) begin
    if (aclr) begin
      rbin      <= '0;
      rgray     <= '0;
      rdempty   <= 1'b1;
      rq1_wgray <= '0;
      rq2_wgray <= '0;
      q         <= '0;
    end else begin
      rbin      <= rbin_next;
      rgray     <= rgray_next;
      rq1_wgray <= wgray;
      rq2_wgray <= rq1_wgray;
      rdempty   <= (rgray_next == rq2_wgray);
      if (rd_ok) q <= mem[rbin[ADDR_W-1:0]];
      a_rgray_one_bit: assert ($countones(rgray ^ rgray_next) <= 1);
    end
  end

endmodule
