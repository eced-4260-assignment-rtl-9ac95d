// tb_multiplier_mem: end-to-end, self-checking testbench for multiplier_mem
// at its default sizes (16-bit operands, 256-word FIFOs, 256 x 32 RAM).
//
// Clocks: clk_wr1 and clk_wr2 share a 20-unit period in antiphase, and
// clk_rd runs at twice that rate (10-unit period), as in the reference
// stimulus; clk_rd is shifted by 2 units so that its edges never coincide
// with clk_wr1's, which keeps the testbench's sampling of the product free
// of races.
//
// Checking: a monitor follows every clk_rd edge. It keeps its own queues of
// the operands accepted by each FIFO and, whenever the design pops a pair,
// takes the next a and the next b from those queues and predicts the
// multiplier output one edge later; the product itself is computed here.
// A pop with either queue empty is an error. The RAM is checked through the
// top's own ports: every word the design writes is recorded from the
// predicted product and read back through addr_rd/qout.
//
// Phases and the mechanisms each one exercises (every one is counted, and a
// mechanism that never happened counts as a failure):
//   directed  single pairs, corner values included; each product is written
//             to the RAM and read back; latency from the later operand write
//             to the product is measured;
//   fill A    only a is written: FIFO 1 fills and drops the extra writes;
//   fill B    only b is written: the pairs of the dropped-a phase drain,
//             then FIFO 2 fills in turn;
//   stream    a and b written alternately as in the reference stimulus, with
//             the RAM written at a rising address every clk_wr1 cycle;
//   readback  every RAM word written in the stream is read back; rd_en_bram
//             low must hold qout; clr must clear qout at once and leave the
//             stored words intact.
module tb_multiplier_mem;
  import multiplier_mem_pkg::*;

  localparam int unsigned FIFO_DEPTH = 2 ** FIFO_ADDR_W;
  localparam int unsigned RAM_WORDS  = 2 ** RAM_ADDR_W;

  logic clr = 1'b1;
  logic clk_wr1 = 1'b0, clk_wr2 = 1'b1, clk_rd = 1'b0;
  logic wr_en1 = 1'b0, wr_en2 = 1'b0, wr_en_bram = 1'b0, rd_en_bram = 1'b0;
  operand_t  a = '0, b = '0;
  ram_addr_t addr_rd = '0, addr_wr = '0;
  product_t  qout;

  multiplier_mem dut (.*);

  always #10 begin clk_wr1 = ~clk_wr1; clk_wr2 = ~clk_wr2; end
  initial begin
    #2;
    forever #5 clk_rd = ~clk_rd;
  end

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- operand writers ----------------
  operand_t qa [$], qb [$];
  int n_full1 = 0, n_full2 = 0, n_drop1 = 0, n_drop2 = 0;

  task automatic write_a(input operand_t v);
    @(negedge clk_wr1);
    wr_en1 = 1'b1; a = v;
    if (dut.full1) begin n_full1++; n_drop1++; end
    else qa.push_back(v);
    @(negedge clk_wr1);
    wr_en1 = 1'b0;
  endtask

  task automatic write_b(input operand_t v);
    @(negedge clk_wr2);
    wr_en2 = 1'b1; b = v;
    if (dut.full2) begin n_full2++; n_drop2++; end
    else qb.push_back(v);
    @(negedge clk_wr2);
    wr_en2 = 1'b0;
  endtask

  // ---------------- product monitor ----------------
  product_t exp_pipe [MULT_LATENCY];
  operand_t exp_aq = '0, exp_bq = '0;
  product_t exp_m;
  int  warm = 0;
  int  n_pop = 0, n_gated = 0, n_req = 0, n_one_sided = 0;
  logic mon_en = 1'b0;

  assign exp_m = exp_pipe[MULT_LATENCY-1];

  // Sample between clk_rd edges, then advance the model past the next edge.
  always @(negedge clk_rd) begin
    if (mon_en) begin
      if (warm > int'(MULT_LATENCY)) check(dut.m == exp_m,
          $sformatf("product m=%0h expected %0h", dut.m, exp_m));
      else warm++;
      if (dut.read_req) n_req++;
      if (dut.read_req && !dut.pop) n_gated++;
      if (dut.read_req && (dut.empty1 != dut.empty2)) n_one_sided++;
      for (int i = int'(MULT_LATENCY) - 1; i > 0; i--) exp_pipe[i] = exp_pipe[i-1];
      exp_pipe[0] = PRODUCT_W'(exp_aq) * PRODUCT_W'(exp_bq);
      if (dut.pop) begin
        n_pop++;
        check(qa.size() != 0 && qb.size() != 0, "pop with a FIFO empty");
        if (qa.size() != 0) exp_aq = qa.pop_front();
        if (qb.size() != 0) exp_bq = qb.pop_front();
      end
    end
  end

  // ---------------- RAM shadow ----------------
  product_t shadow [RAM_WORDS];
  bit       shadow_ok [RAM_WORDS];
  int n_ram_wr = 0;

  // The RAM samples m on clk_wr1; exp_m is the model's m at that moment.
  always @(posedge clk_wr1) begin
    if (wr_en_bram && !clr) begin
      shadow[addr_wr]    <= exp_m;
      shadow_ok[addr_wr] <= 1'b1;
      n_ram_wr++;
    end
  end

  task automatic ram_write(input ram_addr_t addr);
    @(negedge clk_wr1);
    wr_en_bram = 1'b1; addr_wr = addr;
    @(negedge clk_wr1);
    wr_en_bram = 1'b0;
  endtask

  task automatic ram_read(input ram_addr_t addr, output product_t v);
    @(negedge clk_rd);
    rd_en_bram = 1'b1; addr_rd = addr;
    @(negedge clk_rd);
    v = qout;
    rd_en_bram = 1'b0;
  endtask

  task automatic wait_drained();
    int guard = 0;
    while ((qa.size() != 0 && qb.size() != 0) && guard < 20 * FIFO_DEPTH + 100) begin
      @(negedge clk_rd); guard++;
    end
    repeat (MULT_LATENCY + 4) @(negedge clk_rd);
  endtask

  // ---------------- stimulus ----------------
  operand_t da [8] = '{16'd3, 16'hFFFF, 16'd0, 16'd1, 16'h1234, 16'h8000, 16'hFFFF, 16'd77};
  operand_t db [8] = '{16'd5, 16'hFFFF, 16'hABCD, 16'd1, 16'h5678, 16'h0002, 16'd1, 16'd0};
  int lat, max_lat = 0, n_hold = 0, n_clr = 0;
  product_t v, held;
  ram_addr_t stream_start;
  int stream_n;

  initial begin
    #35 clr = 1'b0;
    check(qout == '0, "qout cleared by clr");
    @(negedge clk_rd);
    mon_en = 1'b1;

    // Directed pairs: write, wait for the product, store, read back.
    for (int k = 0; k < 8; k++) begin
      fork
        write_a(da[k]);
        write_b(db[k]);
      join
      lat = 0;
      while (dut.m != PRODUCT_W'(da[k]) * PRODUCT_W'(db[k]) && lat < 50) begin
        @(posedge clk_rd); lat++;
      end
      if (lat > max_lat) max_lat = lat;
      check(lat <= 8, $sformatf("pair %0d: product after %0d clk_rd edges", k, lat));
      ram_write(ram_addr_t'(200 + k));
      ram_read(ram_addr_t'(200 + k), v);
      check(v == PRODUCT_W'(da[k]) * PRODUCT_W'(db[k]),
            $sformatf("RAM[%0d]=%0h expected %0h", 200 + k, v, PRODUCT_W'(da[k]) * PRODUCT_W'(db[k])));
    end

    // Fill FIFO 1 alone, then FIFO 2 alone.
    for (int i = 0; i < FIFO_DEPTH + 8; i++) write_a(16'h4000 + operand_t'(i));
    check(n_drop1 >= 8, $sformatf("FIFO 1 dropped %0d writes while full", n_drop1));
    for (int i = 0; i < FIFO_DEPTH; i++) write_b(16'h2000 + operand_t'(i));
    wait_drained();
    check(qa.size() == 0 && qb.size() == 0, "fill-A pairs drained");
    for (int i = 0; i < FIFO_DEPTH + 8; i++) write_b(16'h6000 + operand_t'(i));
    check(n_drop2 >= 8, $sformatf("FIFO 2 dropped %0d writes while full", n_drop2));
    for (int i = 0; i < FIFO_DEPTH; i++) write_a(16'h0100 + operand_t'(i));
    wait_drained();
    check(qa.size() == 0 && qb.size() == 0, "fill-B pairs drained");

    // Stream, as in the reference stimulus: a on clk_wr1, b on clk_wr2, RAM
    // written every clk_wr1 cycle at a rising address.
    stream_start = addr_wr + 1'b1;
    stream_n = 180;
    fork
      for (int i = 1; i <= stream_n; i++) write_a(operand_t'(i));
      for (int i = 1; i <= stream_n; i++) write_b(operand_t'(3 * i));
      begin
        @(negedge clk_wr1);
        wr_en_bram = 1'b1;
        for (int i = 0; i < 2 * stream_n; i++) begin
          addr_wr = stream_start + ram_addr_t'(i % 190);
          @(negedge clk_wr1);
        end
        wr_en_bram = 1'b0;
      end
    join
    wait_drained();
    check(qa.size() == 0 && qb.size() == 0, "stream pairs drained");

    // Read back every word written so far.
    for (int i = 0; i < int'(RAM_WORDS); i++) begin
      if (shadow_ok[i]) begin
        ram_read(ram_addr_t'(i), v);
        check(v == shadow[i], $sformatf("RAM[%0d]=%0h expected %0h", i, v, shadow[i]));
      end
    end

    // rd_en_bram low holds qout.
    ram_read(ram_addr_t'(200), held);
    for (int i = 0; i < 6; i++) begin
      @(negedge clk_rd);
      addr_rd = ram_addr_t'(201 + i);
      @(negedge clk_rd);
      check(qout == held, "qout holds while rd_en_bram is low");
      n_hold++;
    end

    // clr clears qout at once; the RAM keeps its words.
    @(posedge clk_rd);
    #1 mon_en = 1'b0; clr = 1'b1;
    #1 check(qout == '0, "clr clears qout between clock edges");
    n_clr++;
    repeat (3) @(negedge clk_rd);
    clr = 1'b0;
    exp_aq = '0; exp_bq = '0; warm = 0;
    ram_read(ram_addr_t'(200), v);
    check(v == held, "RAM words survive clr");

    // Every mechanism must have happened.
    check(n_full1 > 0, "FIFO 1 full never seen");
    check(n_full2 > 0, "FIFO 2 full never seen");
    check(n_pop > 0,   "no pair popped");
    check(n_gated > 0, "stale read request never gated");
    check(n_one_sided > 0, "read request with only one FIFO empty never seen");
    check(n_ram_wr > 0, "RAM never written");
    check(n_hold > 0 && n_clr > 0, "hold or clear never exercised");
    $display("pairs popped %0d, read requests %0d, gated requests %0d (one FIFO empty %0d), full1 %0d, full2 %0d, RAM writes %0d, max latency %0d clk_rd edges",
             n_pop, n_req, n_gated, n_one_sided, n_full1, n_full2, n_ram_wr, max_lat);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk_rd);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
