// qlpm_mult: clocked unsigned multiplier, OPERAND_W x OPERAND_W -> 2*OPERAND_W.
//
// How it works: the full product dataa*datab is formed combinationally and
// passed through LATENCY pipeline registers on the rising edge of clock, so
// result is the product of the operands presented LATENCY clocks earlier. A
// new operand pair may be presented on every clock.
//
// Interface: clock, dataa, datab, result (the port names of the reference
// design's multiplier instance). No reset: the pipeline holds whatever it was
// last given, and it starts from an unknown value until LATENCY clocks after
// the first operands.
//
// Own choices: unsigned arithmetic and LATENCY = 1; the reference design only
// gives the ports, with a clock, and shows the values as unsigned.
module qlpm_mult
  import multiplier_mem_pkg::*;
#(
  parameter int unsigned WIDTH   = OPERAND_W,
  parameter int unsigned LATENCY = MULT_LATENCY
) (
  input  logic               clock,
  input  logic [WIDTH-1:0]   dataa,
  input  logic [WIDTH-1:0]   datab,
  output logic [2*WIDTH-1:0] result
);
  logic [2*WIDTH-1:0] prod;
  logic [2*WIDTH-1:0] pipe [LATENCY];

  assign prod = (2*WIDTH)'(dataa) * (2*WIDTH)'(datab);

  always_ff @(posedge clock) begin
    pipe[0] <= prod;
    for (int i = 1; i < int'(LATENCY); i++) pipe[i] <= pipe[i-1];
  end

  assign result = pipe[LATENCY-1];

  initial assert (LATENCY >= 1) else $error("qlpm_mult: LATENCY must be at least 1");
endmodule
