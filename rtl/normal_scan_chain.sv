// normal_scan_chain - the normal scan chain (NSC): the scan cells of the
// circuit under test.
//
// SPL scan cells, each a flip-flop with a four-way input: hold, shift from
// the previous cell, parallel load from a compressed-scan-unit decoder, or
// capture of the circuit's functional next state. Uncompressed patterns are
// shifted in bit by bit from si; compressed patterns arrive through the
// decoders in one SCAN_TRANSFER cycle. While the compressed chain shifts
// (SCAN_SHIFT_CSC) the cells hold, so the long chain does not toggle.
//
// Cell order: si enters q[0]; q[SPL-1] is the far end and drives so. After SPL
// shifts the first bit shifted in sits in q[SPL-1], so q read as a vector
// equals the pattern as written with its first bit at the most significant
// end; load_d uses the same order. Responses leave through so while the next
// pattern is shifted in. Cells reset to 0.
//
// The parallel load from the decoders and holding during compressed shifting
// follow the scheme; functional capture, response scan-out and the operation
// encoding are ordinary mux-scan practice chosen by this design.
//
// Parameter: SPL, the scan chain length (default 21, the worked example).
// Ports: clk, rst_n (async, active low), op (scan_op_e), si, so, load_d
// (decoder outputs), func_d (functional next state from the circuit), q (cell
// contents, to the circuit). Every operation takes one clock cycle.
module normal_scan_chain
  import spc_pkg::*;
#(
  parameter int unsigned SPL = VIFO_SPL
) (
  input  logic           clk,
  input  logic           rst_n,
  input  scan_op_e       op,
  input  logic           si,
  output logic           so,
  input  logic [SPL-1:0] load_d,
  input  logic [SPL-1:0] func_d,
  output logic [SPL-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else begin
      unique case (op)
        SCAN_SHIFT_NSC: q <= (q << 1) | SPL'(si);
        SCAN_TRANSFER:  q <= load_d;
        SCAN_CAPTURE:   q <= func_d;
        default:        q <= q;     // SCAN_HOLD, SCAN_SHIFT_CSC
      endcase
    end
  end

  assign so = q[SPL-1];

endmodule
