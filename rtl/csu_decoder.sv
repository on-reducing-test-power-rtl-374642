// csu_decoder - decoder of one compressed scan unit.
//
// Maps the code held in a compressed scan unit to the pattern of the scan-chain
// segment that the unit serves. The mapping is a constant table produced by
// the encoding flow for one test set (merged segment patterns, each assigned a
// code by the power optimisation), so the decoder is purely combinational:
// pattern = ROM[code*OUT_W +: OUT_W]. A synthesis tool reduces the constant
// table to logic. The decoder's role, the fan-out limit and the example
// contents follow the scheme; the table form, and decoding unused codes to
// zero, are this design's choices.
//
// Both schemes of the architecture use this block: the VIFO scheme with a
// fixed OUT_W (4 in the examples) and a code width of 1 to 3 bits, the FIVO
// scheme with a fixed IN_W (3, 4 or 5) and a variable OUT_W of at most
// MAX_FANOUT (256) cells.
//
// Parameters: IN_W code bits, OUT_W decoded bits, ROM the table (entry c at
// bits [c*OUT_W +: OUT_W]; the most significant bit of an entry goes to the
// segment cell whose bit is shifted in first). Defaults: segment 3 of the VIFO
// example, 3-bit code to 4 cells.
// Ports: code in, pattern out. No clock; zero latency.
module csu_decoder
  import spc_pkg::*;
#(
  parameter int unsigned IN_W  = 3,
  parameter int unsigned OUT_W = 4,
  parameter logic [(2**IN_W)*OUT_W-1:0] ROM = VIFO_SEG3
) (
  input  logic [IN_W-1:0]  code,
  output logic [OUT_W-1:0] pattern
);

  if (OUT_W > MAX_FANOUT) begin : g_fanout_check
    $error("csu_decoder: OUT_W exceeds the decoder fan-out limit");
  end
  if (IN_W < 1) begin : g_width_check
    $error("csu_decoder: IN_W must be at least 1");
  end

  always_comb begin
    pattern = ROM[code*OUT_W +: OUT_W];
  end

endmodule
