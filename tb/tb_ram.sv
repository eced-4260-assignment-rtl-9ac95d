// tb_ram: self-checking testbench for the dual-clock product RAM.
//
// Fills all 256 words with random data on the write clock (10-unit period)
// while the read clock (8-unit period, unrelated phase) is running, then
// reads every word back and compares it with a copy kept by the testbench.
// It also checks the one-cycle read latency, that q holds while rden is low,
// that rd_aclr clears q at once without waiting for a clock, that a write
// with wren low leaves the word alone, and that the stored words survive the
// clear.
module tb_ram;
  localparam int unsigned W = 32;
  localparam int unsigned A = 8;

  logic wrclock = 1'b0, rdclock = 1'b0;
  logic wren = 1'b0, rden = 1'b0, rd_aclr = 1'b1;
  logic [A-1:0] wraddress = '0, rdaddress = '0;
  logic [W-1:0] data = '0, q;
  logic [W-1:0] shadow [2**A];
  int checks = 0, failures = 0;

  ram #(.WIDTH(W), .ADDR_W(A)) dut (.*);

  always #5   wrclock = ~wrclock;
  always #4 rdclock = ~rdclock;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic write_word(input int addr, input logic [W-1:0] val, input logic en);
    @(negedge wrclock);
    wren = en; wraddress = A'(addr); data = val;
    @(negedge wrclock);
    wren = 1'b0;
  endtask

  task automatic read_word(input int addr, output logic [W-1:0] val);
    @(negedge rdclock);
    rden = 1'b1; rdaddress = A'(addr);
    @(negedge rdclock);          // one rdclock edge later q holds the word
    val = q;
    rden = 1'b0;
  endtask

  initial begin
    logic [W-1:0] v, held;
    #12 rd_aclr = 1'b0;
    check(q, '0, "q cleared by rd_aclr");

    for (int i = 0; i < 2**A; i++) begin
      shadow[i] = W'($urandom);
      write_word(i, shadow[i], 1'b1);
    end
    for (int i = 0; i < 2**A; i++) begin
      read_word((i * 37) % (2**A), v);
      check(v, shadow[(i * 37) % (2**A)], $sformatf("read addr %0d", (i * 37) % (2**A)));
    end

    // A write with wren low changes nothing.
    write_word(5, ~shadow[5], 1'b0);
    read_word(5, v);
    check(v, shadow[5], "write with wren low");

    // rden low: q holds while the address moves.
    read_word(10, held);
    for (int i = 0; i < 8; i++) begin
      @(negedge rdclock);
      rdaddress = A'(20 + i);
      @(negedge rdclock);
      check(q, held, "q holds while rden is low");
    end

    // rd_aclr clears q between clock edges.
    read_word(11, v);
    check(v, shadow[11], "read before clear");
    @(posedge rdclock);
    #1 rd_aclr = 1'b1;
    #1 check(q, '0, "asynchronous clear of q");
    @(negedge rdclock);
    rden = 1'b1; rdaddress = 8'd12;
    @(negedge rdclock);
    check(q, '0, "q stays clear while rd_aclr is high");
    rden = 1'b0;
    rd_aclr = 1'b0;
    read_word(11, v);
    check(v, shadow[11], "contents survive the clear");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge wrclock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
