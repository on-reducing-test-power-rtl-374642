// spc_scan_arch - selective pattern compression scan architecture for one
// scan chain.
//
// A compressed scan chain (CSC) with its decoders stands beside the normal
// scan chain (NSC) of the circuit under test. The test set is split offline:
// a pattern whose share of don't-care bits is below the X-bit omit ratio is
// shifted uncompressed into the NSC through nsi (SPL cycles of
// SCAN_SHIFT_NSC); any other pattern is shifted in compressed form into the
// CSC through csi (CSC_LEN cycles of SCAN_SHIFT_CSC, NSC holding) and then
// written into the NSC by one SCAN_TRANSFER cycle. Either way SCAN_CAPTURE then
// captures the circuit's response, which leaves through nso while the next
// uncompressed pattern is shifted in (or during SPL cycles of SCAN_SHIFT_NSC
// with don't-care data on nsi).
//
// The same RTL serves both decoder schemes; only the segment widths and the
// decoder tables differ:
//   VIFO - every decoder drives a fixed number of cells (4 in the examples),
//          its code width (1-3 bits) follows how many different merged
//          patterns the segment holds;
//   FIVO - every decoder has a fixed code width n (3, 4 or 5) and drives as
//          many cells as the merging step reached, at most 256.
// Defaults: the VIFO encoding of the 21-bit worked example (spc_pkg).
//
// The scan operation op is driven by the tester; the sequencing of shift,
// transfer and capture cycles, and the per-cycle operation encoding, are this
// design's own choice. Ports: clk, rst_n (async, active low), op, csi, nsi,
// nso, csc_so (far end of the CSC, for testing the CSC itself), func_d (from
// the circuit), q (scan cell contents, to the circuit).
module spc_scan_arch
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
  input  logic           clk,
  input  logic           rst_n,
  input  scan_op_e       op,
  input  logic           csi,
  input  logic           nsi,
  output logic           nso,
  output logic           csc_so,
  input  logic [SPL-1:0] func_d,
  output logic [SPL-1:0] q
);

  logic [CSC_LEN-1:0] csc_q;
  logic [SPL-1:0]     decoded;

  compressed_scan_chain #(
    .NUM_SEG  (NUM_SEG),
    .SEG_IN_W (SEG_IN_W),
    .SEG_OUT_W(SEG_OUT_W),
    .SPL      (SPL),
    .CSC_LEN  (CSC_LEN),
    .ROM_BITS (ROM_BITS),
    .ROM      (ROM)
  ) u_csc (
    .clk     (clk),
    .rst_n   (rst_n),
    .shift_en(op == SCAN_SHIFT_CSC),
    .csi     (csi),
    .csc_so  (csc_so),
    .csc_q   (csc_q),
    .decoded (decoded)
  );

  normal_scan_chain #(
    .SPL(SPL)
  ) u_nsc (
    .clk   (clk),
    .rst_n (rst_n),
    .op    (op),
    .si    (nsi),
    .so    (nso),
    .load_d(decoded),
    .func_d(func_d),
    .q     (q)
  );

  // The compressed chain keeps its code while the normal chain shifts,
  // transfers or captures.
  property p_csc_quiet;
    @(posedge clk) disable iff (!rst_n)
      (op != SCAN_SHIFT_CSC) |=> $stable(csc_q);
  endproperty
  a_csc_quiet: assert property (p_csc_quiet)
    else $error("spc_scan_arch: compressed chain changed outside SCAN_SHIFT_CSC");

  // Only the five defined scan operations may be applied.
  a_op_legal: assert property (@(posedge clk) disable iff (!rst_n)
      op inside {SCAN_HOLD, SCAN_SHIFT_NSC, SCAN_SHIFT_CSC, SCAN_TRANSFER, SCAN_CAPTURE})
    else $error("spc_scan_arch: undefined scan operation");

endmodule
