// compressed_scan_chain - the compressed scan chain (CSC) with its decoders.
//
// NUM_SEG compressed scan units in series. Segment s (s = 0 is "Decoder 1")
// has a SEG_IN_W[s]-bit code and drives SEG_OUT_W[s] cells of the normal scan
// chain. The compressed scan-in csi enters the unit of the last segment
// (Decoder N); the unit of segment 1 sits at the far end. A compressed pattern
// of CSC_LEN = sum(SEG_IN_W) bits is shifted in first bit first, so after
// CSC_LEN shifts the whole chain, read as the vector csc_q with the first bit
// at the most significant end, equals the compressed pattern as written, and
// segment 1's code is its top SEG_IN_W[0] bits.
//
// decoded is the concatenation of all decoder outputs, segment 1 at the most
// significant end, SPL = sum(SEG_OUT_W) bits, ready to be transferred into the
// normal scan chain in parallel. csc_so is the serial output of the far end,
// which lets the chain itself be tested by shifting through it.
//
// ROM is the concatenation of the segments' decoder tables, segment 1 at the
// least significant end (see spc_pkg). SPL, CSC_LEN and ROM_BITS must agree
// with the segment widths; elaboration stops if they do not.
// The chain order, Decoder N nearest the scan-in and Decoder 1 at the far
// end, follows the scheme's architecture; csc_so, the parameter checks and
// the bit order are this design's additions and choices.
// Defaults: the VIFO example of spc_pkg.
// Ports: clk, rst_n (async, active low), shift_en, csi, csc_so, csc_q, decoded.
module compressed_scan_chain
  import spc_pkg::*;
#(
  parameter int unsigned NUM_SEG  = VIFO_NUM_SEG,
  parameter int unsigned SEG_IN_W  [NUM_SEG] = VIFO_SEG_IN_W,
  parameter int unsigned SEG_OUT_W [NUM_SEG] = VIFO_SEG_OUT_W,
  parameter int unsigned SPL      = VIFO_SPL,
  parameter int unsigned CSC_LEN  = VIFO_CSC_LEN,
  parameter int unsigned ROM_BITS = VIFO_ROM_BITS,
  parameter logic [ROM_BITS-1:0] ROM = VIFO_ROM
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               shift_en,
  input  logic               csi,
  output logic               csc_so,
  output logic [CSC_LEN-1:0] csc_q,
  output logic [SPL-1:0]     decoded
);

  // Sum of code widths of segments 0 .. s-1.
  function automatic int unsigned in_before(int unsigned s);
    int unsigned acc = 0;
    for (int unsigned j = 0; j < s; j++) acc += SEG_IN_W[j];
    return acc;
  endfunction

  // Sum of decoder output widths of segments 0 .. s-1.
  function automatic int unsigned out_before(int unsigned s);
    int unsigned acc = 0;
    for (int unsigned j = 0; j < s; j++) acc += SEG_OUT_W[j];
    return acc;
  endfunction

  // Start of segment s's table in ROM.
  function automatic int unsigned rom_before(int unsigned s);
    int unsigned acc = 0;
    for (int unsigned j = 0; j < s; j++) acc += (2**SEG_IN_W[j]) * SEG_OUT_W[j];
    return acc;
  endfunction

  if (in_before(NUM_SEG) != CSC_LEN) begin : g_len_check
    $error("compressed_scan_chain: CSC_LEN differs from the sum of SEG_IN_W");
  end
  if (out_before(NUM_SEG) != SPL) begin : g_spl_check
    $error("compressed_scan_chain: SPL differs from the sum of SEG_OUT_W");
  end
  if (rom_before(NUM_SEG) != ROM_BITS) begin : g_rom_check
    $error("compressed_scan_chain: ROM_BITS does not match the segment widths");
  end

  // ser[s] is the serial output of segment s's unit; ser[NUM_SEG] is csi.
  logic [NUM_SEG:0] ser;
  assign ser[NUM_SEG] = csi;

  for (genvar s = 0; s < NUM_SEG; s++) begin : g_seg
    localparam int unsigned IW      = SEG_IN_W[s];
    localparam int unsigned OW      = SEG_OUT_W[s];
    localparam int unsigned CODE_LO = CSC_LEN - in_before(s + 1);
    localparam int unsigned DEC_LO  = SPL - out_before(s + 1);
    localparam int unsigned ROM_LO  = rom_before(s);

    compressed_scan_unit #(
      .IN_W (IW),
      .OUT_W(OW),
      .ROM  (ROM[ROM_LO +: (2**IW)*OW])
    ) u_csu (
      .clk     (clk),
      .rst_n   (rst_n),
      .shift_en(shift_en),
      .si      (ser[s+1]),
      .so      (ser[s]),
      .code    (csc_q[CODE_LO +: IW]),
      .dout    (decoded[DEC_LO +: OW])
    );
  end

  assign csc_so = ser[0];

endmodule
