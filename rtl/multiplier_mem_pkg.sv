// multiplier_mem_pkg: widths shared by the operand FIFOs, the multiplier and
// the product RAM of multiplier_mem.
//
// The operand width (16), product width (32) and RAM address width (8, so 256
// words) are the ones of the reference design's port list. The FIFO depth is
// this design's own choice: the reference names the FIFO without giving its
// depth.
package multiplier_mem_pkg;
  localparam int unsigned OPERAND_W   = 16;                // a, b
  localparam int unsigned PRODUCT_W   = 2 * OPERAND_W;     // m, qout
  localparam int unsigned RAM_ADDR_W  = 8;                 // addr_rd, addr_wr
  localparam int unsigned FIFO_ADDR_W = 8;                 // 256-word FIFOs (own choice)
  localparam int unsigned MULT_LATENCY = 1;                // clocked multiplier stages (own choice)

  typedef logic [OPERAND_W-1:0]  operand_t;
  typedef logic [PRODUCT_W-1:0]  product_t;
  typedef logic [RAM_ADDR_W-1:0] ram_addr_t;
endpackage
