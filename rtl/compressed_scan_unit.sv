// compressed_scan_unit - one compressed scan unit (CSU) of the compressed scan
// chain.
//
// A CSU is IN_W scan flip-flops in series, part of the compressed scan chain,
// whose parallel contents drive a csu_decoder; the decoder's OUT_W outputs go
// to OUT_W consecutive cells of the normal scan chain. IN_W cycles of shifting
// put a new code into the unit, after which the decoded segment pattern is
// steady on dout for the parallel transfer.
//
// Shifting: when shift_en is high, si enters code[0] and every bit moves one
// place up; so = code[IN_W-1] feeds the next unit towards the far end of the
// chain. After IN_W shifts the first bit shifted in is code[IN_W-1], the most
// significant code bit. The flip-flops reset to 0, the initial chain state the
// power optimisation assumes.
//
// The unit's structure (serial code flip-flops driving one decoder) follows
// the scheme; the single shift-enable control and the bit order are this
// design's choices.
//
// Parameters: IN_W, OUT_W, ROM as in csu_decoder (default: VIFO segment 3).
// Ports: clk, rst_n (asynchronous, active low), shift_en, si, so, code (the
// held code, for observation), dout (decoded segment pattern, combinational
// from the registered code).
module compressed_scan_unit
  import spc_pkg::*;
#(
  parameter int unsigned IN_W  = 3,
  parameter int unsigned OUT_W = 4,
  parameter logic [(2**IN_W)*OUT_W-1:0] ROM = VIFO_SEG3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic             si,
  output logic             so,
  output logic [IN_W-1:0]  code,
  output logic [OUT_W-1:0] dout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code <= '0;
    end else if (shift_en) begin
      code <= (code << 1) | IN_W'(si);
    end
  end

  assign so = code[IN_W-1];

  csu_decoder #(
    .IN_W (IN_W),
    .OUT_W(OUT_W),
    .ROM  (ROM)
  ) u_dec (
    .code   (code),
    .pattern(dout)
  );

endmodule
