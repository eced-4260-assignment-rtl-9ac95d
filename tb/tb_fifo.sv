// tb_fifo: self-checking testbench for the dual-clock FIFO.
//
// Runs an 8-word instance (ADDR_W = 3) with a 10-unit write clock and a
// 7-unit read clock. The testbench keeps its own queue of accepted words and
// checks every word read against it. Phases:
//   1. after clear: empty, not full;
//   2. one word into the empty FIFO: rdempty must fall within 2 to 4 rdclk
//      edges (the two-flop synchronizer plus the registered flag);
//   3. writes only: wrfull must rise after exactly 8 accepted words, and
//      writes while full must be dropped;
//   4. reads only: the 8 words come out in order, then rdempty rises and a
//      read while empty leaves q unchanged;
//   5. random writes and reads on both clocks at once.
module tb_fifo;
  localparam int unsigned W  = 16;
  localparam int unsigned AW = 3;
  localparam int unsigned DEPTH = 2 ** AW;

  logic aclr = 1'b1;
  logic wrclk = 1'b0, rdclk = 1'b0;
  logic wrreq = 1'b0, rdreq = 1'b0;
  logic [W-1:0] data = '0, q;
  logic wrfull, rdempty;
  int checks = 0, failures = 0;

  fifo #(.WIDTH(W), .ADDR_W(AW)) dut (.*);

  always #5 wrclk = ~wrclk;
  always #7 rdclk = ~rdclk;

  logic [W-1:0] model [$];
  logic [W-1:0] next_val = 16'h1000;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // One write attempt; returns whether it was accepted.
  task automatic write_attempt(input logic en, output logic accepted);
    @(negedge wrclk);
    wrreq = en;
    data  = next_val;
    accepted = en && !wrfull;
    if (accepted) begin
      model.push_back(next_val);
      next_val++;
    end
    @(negedge wrclk);
    wrreq = 1'b0;
  endtask

  // One read attempt; checks q after the edge when the read was accepted.
  task automatic read_attempt(input logic en, output logic accepted);
    logic [W-1:0] q_prev, q_exp;
    @(negedge rdclk);
    rdreq = en;
    q_prev = q;
    accepted = en && !rdempty;
    if (accepted) q_exp = model.pop_front();
    @(negedge rdclk);
    rdreq = 1'b0;
    if (accepted) check(q == q_exp, $sformatf("read data %0h expected %0h", q, q_exp));
    else if (en)  check(q == q_prev, "q unchanged by a read while empty");
  endtask

  logic acc;
  int n_acc, lat;
  logic wdone;

  initial begin
    #23 aclr = 1'b0;
    // 1. after clear
    check(rdempty && !wrfull, "empty and not full after clear");
    check(q == '0, "q cleared");

    // 2. write-to-visible latency
    write_attempt(1'b1, acc);
    lat = 0;
    while (rdempty && lat < 20) begin @(posedge rdclk); lat++; end
    #1;
    check(lat >= 2 && lat <= 4, $sformatf("rdempty fell after %0d rdclk edges", lat));
    read_attempt(1'b1, acc);
    check(acc, "single word read");
    repeat (6) @(posedge wrclk);

    // 3. fill
    n_acc = 0;
    for (int i = 0; i < DEPTH + 5; i++) begin
      write_attempt(1'b1, acc);
      if (acc) n_acc++;
    end
    check(n_acc == DEPTH, $sformatf("accepted %0d words before full", n_acc));
    check(wrfull, "wrfull after filling");

    // 4. drain
    repeat (4) @(posedge rdclk);
    for (int i = 0; i < DEPTH; i++) begin
      read_attempt(1'b1, acc);
      check(acc, "read accepted while not empty");
    end
    #1 check(rdempty, "rdempty after draining");
    read_attempt(1'b1, acc);
    check(!acc, "read while empty dropped");
    repeat (6) @(posedge wrclk);
    check(!wrfull, "wrfull clears after draining");

    // 5. random traffic on both clocks
    wdone = 1'b0;
    fork
      begin
        for (int i = 0; i < 600; i++) write_attempt(($urandom % 3) != 0, acc);
        wdone = 1'b1;
      end
      begin
        while (!wdone || model.size() != 0) read_attempt(($urandom % 4) != 0, acc);
      end
    join
    check(model.size() == 0, "all words read back");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge wrclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
