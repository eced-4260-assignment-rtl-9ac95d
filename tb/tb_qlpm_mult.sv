// tb_qlpm_mult: self-checking testbench for the clocked multiplier.
//
// Drives random 16-bit operand pairs (plus the corner values 0, 1 and
// 0xFFFF) into two instances, one at the default latency and one with three
// pipeline stages, on every clock, and checks that each result equals the
// product, computed here with 64-bit arithmetic, of the operands presented
// LATENCY clocks earlier.
module tb_qlpm_mult;
  localparam int unsigned W  = 16;
  localparam int unsigned L1 = multiplier_mem_pkg::MULT_LATENCY;
  localparam int unsigned L3 = 3;

  logic clk = 1'b0;
  logic [W-1:0] a, b;
  logic [2*W-1:0] r1, r3;
  int checks = 0, failures = 0;
  int cycles = 0;

  qlpm_mult #(.WIDTH(W))               dut1 (.clock(clk), .dataa(a), .datab(b), .result(r1));
  qlpm_mult #(.WIDTH(W), .LATENCY(L3)) dut3 (.clock(clk), .dataa(a), .datab(b), .result(r3));

  always #5 clk = ~clk;

  // Expected products, newest first.
  longint unsigned hist [$];

  initial begin
    a = '0; b = '0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // Results of the operands presented n-L cycles ago.
      if (hist.size() >= L1) begin
        checks++;
        if (64'(r1) != hist[L1-1]) begin
          failures++;
          $display("FAIL L=%0d cycle %0d: got %0h expected %0h", L1, n, r1, hist[L1-1]);
        end
      end
      if (hist.size() >= L3) begin
        checks++;
        if (64'(r3) != hist[L3-1]) begin
          failures++;
          $display("FAIL L=%0d cycle %0d: got %0h expected %0h", L3, n, r3, hist[L3-1]);
        end
      end
      case (n % 10)
        0: begin a = '1; b = '1; end
        1: begin a = '0; b = W'($urandom); end
        2: begin a = 1;  b = W'($urandom); end
        default: begin a = W'($urandom); b = W'($urandom); end
      endcase
      hist.push_front(longint'(a) * longint'(b));
      if (hist.size() > 8) void'(hist.pop_back());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    forever begin
      @(posedge clk);
      cycles++;
      if (cycles > 10000) begin
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
