// tb_spc_top - end-to-end run of both schemes at their default sizes.
//
// The 17-pattern worked example is applied to the VIFO and the FIVO
// architecture of spc_top at the same time, each by its own spc_test_driver,
// which checks every loaded pattern, every captured response and the cycle
// count of each compressed load. This testbench then requires
//   * the X-bit omit ratio 0.3 to send 3 patterns through the normal chain
//     and 14 through the compressed chain, in both schemes;
//   * a shifted-in volume of 3*21 + 14*11 = 217 bits (VIFO) and
//     3*21 + 14*6 = 147 bits (FIVO) against 357 bits uncompressed, FIVO
//     smaller than VIFO;
//   * each mechanism to occur in each scheme: uncompressed shift, compressed
//     shift with the normal chain quiet, transfer, capture, separate unload.
module tb_spc_top;
  import spc_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;

  scan_op_e    v_op, f_op;
  logic        v_csi, v_nsi, v_nso, v_csc_so;
  logic        f_csi, f_nsi, f_nso, f_csc_so;
  logic [20:0] v_func_d, v_q, f_func_d, f_q;

  bit v_done, f_done;
  int v_tog, v_tog_ser, f_tog, f_tog_ser;
  int v_checks, v_failures, v_nsc, v_csc, v_tr, v_cap, v_unl, v_quiet, v_volume;
  int f_checks, f_failures, f_nsc, f_csc, f_tr, f_cap, f_unl, f_quiet, f_volume;
  int checks = 0;
  int failures = 0;

  spc_top dut (
    .clk(clk), .rst_n(rst_n),
    .vifo_op(v_op), .vifo_csi(v_csi), .vifo_nsi(v_nsi), .vifo_nso(v_nso),
    .vifo_csc_so(v_csc_so), .vifo_func_d(v_func_d), .vifo_q(v_q),
    .fivo_op(f_op), .fivo_csi(f_csi), .fivo_nsi(f_nsi), .fivo_nso(f_nso),
    .fivo_csc_so(f_csc_so), .fivo_func_d(f_func_d), .fivo_q(f_q)
  );

  spc_test_driver #(.SCHEME(0), .SPL(VIFO_SPL), .CSC_LEN(VIFO_CSC_LEN)) drv_vifo (
    .clk(clk), .rst_n(rst_n), .op(v_op), .csi(v_csi), .nsi(v_nsi), .nso(v_nso),
    .csc_so(v_csc_so), .func_d(v_func_d), .q(v_q), .done(v_done),
    .checks(v_checks), .failures(v_failures), .n_nsc_patterns(v_nsc),
    .n_csc_patterns(v_csc), .n_transfers(v_tr), .n_captures(v_cap),
    .n_unloads(v_unl), .n_quiet_cycles(v_quiet), .volume(v_volume),
    .toggles_scheme(v_tog), .toggles_serial(v_tog_ser)
  );

  spc_test_driver #(.SCHEME(1), .SPL(FIVO_SPL), .CSC_LEN(FIVO_CSC_LEN)) drv_fivo (
    .clk(clk), .rst_n(rst_n), .op(f_op), .csi(f_csi), .nsi(f_nsi), .nso(f_nso),
    .csc_so(f_csc_so), .func_d(f_func_d), .q(f_q), .done(f_done),
    .checks(f_checks), .failures(f_failures), .n_nsc_patterns(f_nsc),
    .n_csc_patterns(f_csc), .n_transfers(f_tr), .n_captures(f_cap),
    .n_unloads(f_unl), .n_quiet_cycles(f_quiet), .volume(f_volume),
    .toggles_scheme(f_tog), .toggles_serial(f_tog_ser)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic int total_checks();
    return checks + v_checks + f_checks;
  endfunction

  function automatic int total_failures();
    return failures + v_failures + f_failures;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures() + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (v_done && f_done);
    check(v_nsc == 3 && f_nsc == 3, "3 uncompressed patterns per scheme");
    check(v_csc == 14 && f_csc == 14, "14 compressed patterns per scheme");
    check(v_volume == 217, $sformatf("VIFO volume %0d, want 217", v_volume));
    check(f_volume == 147, $sformatf("FIVO volume %0d, want 147", f_volume));
    check(f_volume < v_volume && v_volume < 17 * 21, "FIVO < VIFO < uncompressed");
    check(v_tr > 0 && f_tr > 0, "transfer occurred");
    check(v_cap > 0 && f_cap > 0, "capture occurred");
    check(v_unl > 0 && f_unl > 0, "separate unload occurred");
    check(v_quiet > 0 && f_quiet > 0, "compressed shift with quiet normal chain occurred");
    $display("mechanisms VIFO: nsc %0d csc %0d transfer %0d capture %0d unload %0d quiet %0d",
             v_nsc, v_csc, v_tr, v_cap, v_unl, v_quiet);
    $display("mechanisms FIVO: nsc %0d csc %0d transfer %0d capture %0d unload %0d quiet %0d",
             f_nsc, f_csc, f_tr, f_cap, f_unl, f_quiet);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures());
    $finish;
  end
endmodule
