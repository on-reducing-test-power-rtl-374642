// tb_spc_scan_arch - the single-chain architecture at its defaults (VIFO
// encoding of the worked example) running the whole 17-pattern test set.
//
// spc_test_driver applies and checks the patterns. On top of its checks this
// testbench requires 3 uncompressed and 14 compressed patterns and a shifted-in
// volume of 3*21 + 14*11 = 217 bits against 17*21 = 357 for the uncompressed
// set, and requires every mechanism (normal shift, compressed shift with the
// normal chain quiet, transfer, capture, separate unload) to occur.
module tb_spc_scan_arch;
  import spc_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  scan_op_e   op;
  logic       csi, nsi, nso, csc_so;
  logic [20:0] func_d, q;

  bit done;
  int tog, tog_ser;
  int d_checks, d_failures, n_nsc, n_csc, n_tr, n_cap, n_unl, n_quiet, volume;
  int checks = 0;
  int failures = 0;

  spc_scan_arch dut (
    .clk(clk), .rst_n(rst_n), .op(op), .csi(csi), .nsi(nsi), .nso(nso),
    .csc_so(csc_so), .func_d(func_d), .q(q)
  );

  spc_test_driver #(.SCHEME(0), .SPL(21), .CSC_LEN(11)) drv (
    .clk(clk), .rst_n(rst_n), .op(op), .csi(csi), .nsi(nsi), .nso(nso),
    .csc_so(csc_so), .func_d(func_d), .q(q), .done(done),
    .checks(d_checks), .failures(d_failures), .n_nsc_patterns(n_nsc),
    .n_csc_patterns(n_csc), .n_transfers(n_tr), .n_captures(n_cap),
    .n_unloads(n_unl), .n_quiet_cycles(n_quiet), .volume(volume),
    .toggles_scheme(tog), .toggles_serial(tog_ser)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + d_checks, failures + d_failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    check(n_nsc == 3, "3 uncompressed patterns");
    check(n_csc == 14, "14 compressed patterns");
    check(volume == 217, $sformatf("volume %0d, want 217", volume));
    check(n_tr > 0 && n_cap > 0 && n_unl > 0 && n_quiet > 0, "every mechanism occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks + d_checks, failures + d_failures);
    $finish;
  end
endmodule
