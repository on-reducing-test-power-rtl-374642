// spc_top - the two selective pattern compression schemes for the 21-bit
// worked example, side by side.
//
// Each instance is a complete single-chain architecture (spc_scan_arch) with a
// compressed scan chain, its decoders and the 21-cell normal scan chain:
//   vifo_* - VIFO scheme: six decoders of fixed 4-cell output (the last one
//            1 cell) fed by 2,2,3,2,1,1-bit codes, an 11-bit compressed chain;
//   fivo_* - FIVO scheme: two 3-bit decoders driving 11 and 10 cells, a 6-bit
//            compressed chain.
// Both are built for the same 17-pattern test set and the X-bit omit ratio
// 0.3: 3 patterns go uncompressed through the normal chain, 14 are
// compressed. The two instances share clock and reset and otherwise have
// their own ports; each normal chain's func_d/q connect to its circuit under
// test, which is outside this design.
// Operation and timing per instance are those of spc_scan_arch.
module spc_top
  import spc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // VIFO architecture
  input  scan_op_e            vifo_op,
  input  logic                vifo_csi,
  input  logic                vifo_nsi,
  output logic                vifo_nso,
  output logic                vifo_csc_so,
  input  logic [VIFO_SPL-1:0] vifo_func_d,
  output logic [VIFO_SPL-1:0] vifo_q,
  // FIVO architecture
  input  scan_op_e            fivo_op,
  input  logic                fivo_csi,
  input  logic                fivo_nsi,
  output logic                fivo_nso,
  output logic                fivo_csc_so,
  input  logic [FIVO_SPL-1:0] fivo_func_d,
  output logic [FIVO_SPL-1:0] fivo_q
);

  spc_scan_arch #(
    .NUM_SEG  (VIFO_NUM_SEG),
    .SEG_IN_W (VIFO_SEG_IN_W),
    .SEG_OUT_W(VIFO_SEG_OUT_W),
    .SPL      (VIFO_SPL),
    .CSC_LEN  (VIFO_CSC_LEN),
    .ROM_BITS (VIFO_ROM_BITS),
    .ROM      (VIFO_ROM)
  ) u_vifo (
    .clk   (clk),
    .rst_n (rst_n),
    .op    (vifo_op),
    .csi   (vifo_csi),
    .nsi   (vifo_nsi),
    .nso   (vifo_nso),
    .csc_so(vifo_csc_so),
    .func_d(vifo_func_d),
    .q     (vifo_q)
  );

  spc_scan_arch #(
    .NUM_SEG  (FIVO_NUM_SEG),
    .SEG_IN_W (FIVO_SEG_IN_W),
    .SEG_OUT_W(FIVO_SEG_OUT_W),
    .SPL      (FIVO_SPL),
    .CSC_LEN  (FIVO_CSC_LEN),
    .ROM_BITS (FIVO_ROM_BITS),
    .ROM      (FIVO_ROM)
  ) u_fivo (
    .clk   (clk),
    .rst_n (rst_n),
    .op    (fivo_op),
    .csi   (fivo_csi),
    .nsi   (fivo_nsi),
    .nso   (fivo_nso),
    .csc_so(fivo_csc_so),
    .func_d(fivo_func_d),
    .q     (fivo_q)
  );

endmodule
