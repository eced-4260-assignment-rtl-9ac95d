// multiplier_mem: multiplies two operand streams that arrive on two
// different clocks and stores the products in a dual-port RAM that is read
// on a third clock.
//
// Data path: operand a is written into fifo_inst1 on clk_wr1 (wr_en1), and
// operand b into fifo_inst2 on clk_wr2 (wr_en2). Both FIFOs are read on
// clk_rd. A registered read request, read_req <= !empty1 && !empty2 on every
// clk_rd edge, pops one word from each FIFO together, so the i-th a is paired
// with the i-th b. The pair (a_q, b_q) feeds the clocked multiplier, whose
// 32-bit product m goes to the RAM's write port. The RAM stores m at addr_wr
// on clk_wr1 when wr_en_bram is high, and is read at addr_rd on clk_rd when
// rd_en_bram is high; qout is its registered output, cleared by clr.
//
// Timing (read side): a pair becomes visible 2-3 clk_rd edges after its later
// operand is written; read_req rises on the next edge, a_q/b_q change on the
// edge after that, and m follows MULT_LATENCY clk_rd edges later. a_q, b_q and
// m then hold until the next pair. Because m is produced on clk_rd and
// sampled by the RAM on clk_wr1, the writer must give m time to settle before
// raising wr_en_bram for its address, for instance by pacing its writes much
// slower than clk_rd.
//
// Follows the reference design: the ports, the three clocks, the blocks and
// their wiring, and the registered read request. Own choices: clr also
// clears both FIFOs and read_req (the reference uses it only as the RAM's
// read clear), and the FIFOs' rdreq is read_req gated with "both FIFOs not
// empty". The registered request can still be high one edge after a FIFO
// ran empty; without the gate, a FIFO that is one word ahead of the other
// would be popped alone and the pairing of a and b would slip.
module multiplier_mem
  import multiplier_mem_pkg::*;
(
  input  logic      clr,
  input  logic      clk_wr1,
  input  logic      clk_wr2,
  input  logic      wr_en1,
  input  logic      wr_en2,
  input  logic      wr_en_bram,
  input  logic      rd_en_bram,
  input  logic      clk_rd,
  input  operand_t  a,
  input  operand_t  b,
  input  ram_addr_t addr_rd,
  input  ram_addr_t addr_wr,
  output product_t  qout
);
  operand_t a_q, b_q;
  product_t m;
  logic     full1, full2, empty1, empty2;
  logic     read_req;
  logic     pop;

  // Pop both FIFOs together, only when both hold a word.
  assign pop = read_req && !empty1 && !empty2;

  fifo #(.WIDTH(OPERAND_W), .ADDR_W(FIFO_ADDR_W)) fifo_inst1 (
    .aclr   (clr),
    .wrclk  (clk_wr1),
    .wrreq  (wr_en1),
    .data   (a),
    .wrfull (full1),
    .rdclk  (clk_rd),
    .rdreq  (pop),
    .q      (a_q),
    .rdempty(empty1)
  );

  fifo #(.WIDTH(OPERAND_W), .ADDR_W(FIFO_ADDR_W)) fifo_inst2 (
    .aclr   (clr),
    .wrclk  (clk_wr2),
    .wrreq  (wr_en2),
    .data   (b),
    .wrfull (full2),
    .rdclk  (clk_rd),
    .rdreq  (pop),
    .q      (b_q),
    .rdempty(empty2)
  );

  qlpm_mult #(.WIDTH(OPERAND_W), .LATENCY(MULT_LATENCY)) qlpm_mult_inst (
    .clock (clk_rd),
    .dataa (a_q),
    .datab (b_q),
    .result(m)
  );

  ram #(.WIDTH(PRODUCT_W), .ADDR_W(RAM_ADDR_W)) ram_inst (
    .wrclock  (clk_wr1),
    .wren     (wr_en_bram),
    .wraddress(addr_wr),
    .data     (m),
    .rdclock  (clk_rd),
    .rden     (rd_en_bram),
    .rd_aclr  (clr),
    .rdaddress(addr_rd),
    .q        (qout)
  );

  // Read request: registered on clk_rd from the two empty flags.
  always_ff @(posedge clk_rd or posedge clr) begin
    if (clr) read_req <= 1'b0;
    else     read_req <= !empty1 && !empty2;
  end

  // The full flags are produced for a writer that wants them; this top, like
  // the reference, brings no full flag out, and the FIFOs drop writes made
  // while full.
  logic unused_full;
  assign unused_full = full1 | full2;
endmodule
