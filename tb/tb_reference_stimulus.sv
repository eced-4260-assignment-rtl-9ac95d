// tb_reference_stimulus: runs multiplier_mem, at its default sizes, under the
// stimulus the design was originally exercised with, for 2 ms of simulated
// time (one time unit here is 0.5 ns).
//
// Stimulus: clk_wr1 and clk_wr2 at 100 MHz in antiphase, clk_rd at 200 MHz
// with edges on clk_wr1's edges. clr rises at 0.5 ns and is released at 10 ns; 50 ns later a
// loop starts that, every 20 ns, writes a = 1, 2, 3, ... into FIFO 1, then
// 10 ns later b = 1, 2, 3, ... into FIFO 2, while wr_en_bram and rd_en_bram
// stay high and addr_wr and addr_rd each advance by one per loop (wrapping
// at 256). Each FIFO is therefore written at 50 MHz and read at up to
// 200 MHz, the product of pair i is i*i (i taken modulo 2**16), and the RAM
// is overwritten continuously.
//
// Checks: the k-th pair popped must be (k, k) and the multiplier output must
// follow it one clk_rd edge later; every qout value read must be the square
// of a pair already popped (or zero, written before the first product); no
// FIFO may ever fill; and by the end every pair written must have been
// popped except those still in flight, so the design keeps up with the
// stimulus.
module tb_reference_stimulus;
  import multiplier_mem_pkg::*;

  logic clr = 1'b0;
  logic clk_wr1 = 1'b0, clk_wr2 = 1'b1, clk_rd = 1'b1;
  logic wr_en1 = 1'b0, wr_en2 = 1'b0, wr_en_bram = 1'b0, rd_en_bram = 1'b0;
  operand_t  a = '0, b = '0;
  ram_addr_t addr_rd = '0, addr_wr = '0;
  product_t  qout;

  multiplier_mem dut (.*);

  localparam longint RUN_UNITS = 4_000_000;   // 2 ms

  always #10 begin clk_wr1 = ~clk_wr1; clk_wr2 = ~clk_wr2; end
  always #5 clk_rd = ~clk_rd;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Stimulus loop.
  int n_written = 0;
  initial begin
    #1 clr = 1'b1;     // a rising edge, so the asynchronous clear takes effect
    #19 clr = 1'b0;
    #200;
    forever begin
      wr_en_bram = 1'b1;
      wr_en1 = 1'b1;
      addr_wr = addr_wr + 1'b1;
      a = a + 1'b1;
      #20;
      wr_en1 = 1'b0;
      wr_en2 = 1'b1;
      b = b + 1'b1;
      n_written++;
      #20;
      rd_en_bram = 1'b1;
      addr_rd = addr_rd + 1'b1;
      wr_en2 = 1'b0;
    end
  end

  // Monitor, sampled between clk_rd edges.
  int unsigned n_pop = 0, n_full = 0, n_reads = 0;
  operand_t exp_q = '0;
  product_t exp_m;
  int warm = 0;
  always @(negedge clk_rd) begin
    if (!clr && $time > 2) begin
      if (warm > 1) check(dut.m == exp_m, $sformatf("m=%0h expected %0h", dut.m, exp_m));
      else warm++;
      exp_m = PRODUCT_W'(exp_q) * PRODUCT_W'(exp_q);   // m after the next edge
      if (dut.full1 || dut.full2) n_full++;
      if (rd_en_bram) begin
        // qout must be the square of an operand already popped.
        int unsigned r;
        r = $rtoi($floor($sqrt(real'(qout)) + 0.5));
        n_reads++;
        check(longint'(r) * longint'(r) == longint'(qout) && (n_pop >= 65536 || r <= n_pop),
              $sformatf("qout=%0d is not the square of a popped operand", qout));
      end
      if (dut.pop) begin
        n_pop++;
        check(dut.a_q == exp_q && dut.b_q == exp_q, "a_q/b_q before pop");
        exp_q = operand_t'(n_pop);
      end
    end
  end

  initial begin
    #(RUN_UNITS);
    check(n_full == 0, $sformatf("a FIFO filled %0d times", n_full));
    check(n_written - int'(n_pop) >= 0 && n_written - int'(n_pop) <= 2,
          $sformatf("%0d pairs written, %0d popped", n_written, n_pop));
    check(n_reads > 0, "RAM never read");
    $display("pairs written %0d, popped %0d, RAM reads checked %0d", n_written, n_pop, n_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(RUN_UNITS + 100_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
