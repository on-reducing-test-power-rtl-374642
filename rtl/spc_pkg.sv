// spc_pkg - shared types and constants of the selective pattern compression
// scan architecture.
//
// The scan architecture splits a test set into two groups. Patterns with few
// don't-care bits are shifted, uncompressed, into the normal scan chain (NSC).
// Patterns with many don't-care bits are shifted, in compressed form, into a
// much shorter compressed scan chain (CSC); its decoders then write the
// decompressed pattern into the NSC in one parallel transfer, so the long NSC
// does not toggle while the pattern is shifted in.
//
// This package holds
//   * scan_op_e, the one-per-cycle scan operation shared by all blocks
//     (the encoding and the operation set are this design's own choice);
//   * MAX_FANOUT, the limit of 256 outputs per decoder that the FIVO scheme
//     sets;
//   * the default configuration: the 21-bit scan chain of the worked
//     example, encoded once with the VIFO scheme (fixed 4-bit decoder output,
//     variable code width) and once with the FIVO scheme (fixed 3-bit code,
//     variable decoder output).
//
// Decoder contents. Each segment's decoder is a read-only table from code to
// segment pattern. Segment 1 is the first part of the pattern to be shifted in
// and lies at the far end of the chains. A segment's table holds 2**IN_W
// entries of OUT_W bits, entry c at bits [c*OUT_W +: OUT_W]; the tables are
// concatenated with segment 1 at the least significant end. In every literal
// below the leftmost entry is the one for the highest code. Within a code and
// within a pattern the leftmost (most significant) bit is the one shifted in
// first. Codes that the encoding leaves unused decode to all zeros, as the
// don't-care bits of a compressed pattern are filled with 0.
//
// The tables are the outcome of the encoding flow for the example test set:
// the merged segment patterns by index, and the code that the power
// optimisation assigned to each index, combined into code -> pattern.
package spc_pkg;

  // Scan operation applied in one clock cycle.
  typedef enum logic [2:0] {
    SCAN_HOLD      = 3'd0,  // all scan cells keep their value
    SCAN_SHIFT_NSC = 3'd1,  // normal scan chain shifts one bit from the normal scan-in
    SCAN_SHIFT_CSC = 3'd2,  // compressed scan chain shifts one bit; NSC holds
    SCAN_TRANSFER  = 3'd3,  // NSC loads the decoder outputs in parallel
    SCAN_CAPTURE   = 3'd4   // NSC captures the circuit's functional next state
  } scan_op_e;

  // Largest number of scan cells one decoder may drive.
  localparam int unsigned MAX_FANOUT = 256;

  // ---------------------------------------------------------------------
  // VIFO example: 21-bit chain, six segments of 4,4,4,4,4,1 cells.
  // Codes of 2,2,3,2,1,1 bits: 11 compressed bits per pattern.
  // ---------------------------------------------------------------------
  localparam int unsigned VIFO_NUM_SEG = 6;
  localparam int unsigned VIFO_SEG_IN_W  [VIFO_NUM_SEG] = '{2, 2, 3, 2, 1, 1};
  localparam int unsigned VIFO_SEG_OUT_W [VIFO_NUM_SEG] = '{4, 4, 4, 4, 4, 1};
  localparam int unsigned VIFO_SPL      = 21;
  localparam int unsigned VIFO_CSC_LEN  = 11;
  localparam int unsigned VIFO_ROM_BITS = 4*4 + 4*4 + 8*4 + 4*4 + 2*4 + 2*1;  // 90

  //                                    code 11   code 10   code 01   code 00
  localparam logic [15:0] VIFO_SEG1 = {4'b0001, 4'b0000, 4'b0000, 4'b0111};
  localparam logic [15:0] VIFO_SEG2 = {4'b1110, 4'b0000, 4'b1011, 4'b1010};
  //                                    111 .. 000
  localparam logic [31:0] VIFO_SEG3 = {4'b1110, 4'b1010, 4'b0001, 4'b0100,
                                       4'b0110, 4'b0000, 4'b0111, 4'b0101};
  localparam logic [15:0] VIFO_SEG4 = {4'b1000, 4'b1100, 4'b0000, 4'b0100};
  localparam logic [7:0]  VIFO_SEG5 = {4'b0101, 4'b1000};
  localparam logic [1:0]  VIFO_SEG6 = {1'b1, 1'b0};

  localparam logic [VIFO_ROM_BITS-1:0] VIFO_ROM =
    {VIFO_SEG6, VIFO_SEG5, VIFO_SEG4, VIFO_SEG3, VIFO_SEG2, VIFO_SEG1};

  // ---------------------------------------------------------------------
  // FIVO example: 21-bit chain, two 3-bit codes decoding to 11 and 10
  // cells: 6 compressed bits per pattern.
  // ---------------------------------------------------------------------
  localparam int unsigned FIVO_NUM_SEG = 2;
  localparam int unsigned FIVO_SEG_IN_W  [FIVO_NUM_SEG] = '{3, 3};
  localparam int unsigned FIVO_SEG_OUT_W [FIVO_NUM_SEG] = '{11, 10};
  localparam int unsigned FIVO_SPL      = 21;
  localparam int unsigned FIVO_CSC_LEN  = 6;
  localparam int unsigned FIVO_ROM_BITS = 8*11 + 8*10;  // 168

  //                                    code 111 .. code 000
  localparam logic [87:0] FIVO_SEG1 = {11'b00011011000, 11'b00001000000,
                                       11'b00000000000, 11'b01110000010,
                                       11'b00101110011, 11'b00000000000,
                                       11'b00011010111, 11'b00000001101};
  localparam logic [79:0] FIVO_SEG2 = {10'b1000000000, 10'b1010000000,
                                       10'b0010010001, 10'b0000000000,
                                       10'b1000001010, 10'b0100000010,
                                       10'b0100000001, 10'b1110000000};

  localparam logic [FIVO_ROM_BITS-1:0] FIVO_ROM = {FIVO_SEG2, FIVO_SEG1};

endpackage
