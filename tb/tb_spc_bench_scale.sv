// tb_spc_bench_scale - the architecture at benchmark chain lengths.
//
// Runs the scan flow with stand-in decoder tables (see spc_bench_unit) on
//   * s38584-length chains (1464 cells, 136 patterns of which 116 compressed)
//     in the FIVO scheme with 3-, 4- and 5-bit decoders and in the VIFO scheme
//     with 4-cell decoders;
//   * an s5378-length chain (214 cells, 111 patterns, 100 compressed, FIVO
//     3-bit).
// Each unit checks its own loads, captures, responses and volume; this
// testbench adds that compressed volume must shrink as the FIVO code width n
// grows.
module tb_spc_bench_scale;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NU = 5;
  bit done [NU];
  int c [NU], f [NU], vol [NU], ncsc [NU], nnsc [NU], clen [NU];

  spc_bench_unit #(.SCHEME(1), .SPL(1464), .N_IN(3), .N_PAT(136), .N_CSC(116)) u_f3 (
    .clk(clk), .rst_n(rst_n), .done(done[0]), .checks(c[0]), .failures(f[0]),
    .volume(vol[0]), .n_csc(ncsc[0]), .n_nsc(nnsc[0]), .csc_len(clen[0]));
  spc_bench_unit #(.SCHEME(1), .SPL(1464), .N_IN(4), .N_PAT(136), .N_CSC(116)) u_f4 (
    .clk(clk), .rst_n(rst_n), .done(done[1]), .checks(c[1]), .failures(f[1]),
    .volume(vol[1]), .n_csc(ncsc[1]), .n_nsc(nnsc[1]), .csc_len(clen[1]));
  spc_bench_unit #(.SCHEME(1), .SPL(1464), .N_IN(5), .N_PAT(136), .N_CSC(116)) u_f5 (
    .clk(clk), .rst_n(rst_n), .done(done[2]), .checks(c[2]), .failures(f[2]),
    .volume(vol[2]), .n_csc(ncsc[2]), .n_nsc(nnsc[2]), .csc_len(clen[2]));
  spc_bench_unit #(.SCHEME(0), .SPL(1464), .N_IN(4), .N_PAT(136), .N_CSC(116)) u_v4 (
    .clk(clk), .rst_n(rst_n), .done(done[3]), .checks(c[3]), .failures(f[3]),
    .volume(vol[3]), .n_csc(ncsc[3]), .n_nsc(nnsc[3]), .csc_len(clen[3]));
  spc_bench_unit #(.SCHEME(1), .SPL(214), .N_IN(3), .N_PAT(111), .N_CSC(100)) u_s5378 (
    .clk(clk), .rst_n(rst_n), .done(done[4]), .checks(c[4]), .failures(f[4]),
    .volume(vol[4]), .n_csc(ncsc[4]), .n_nsc(nnsc[4]), .csc_len(clen[4]));

  int checks = 0;
  int failures = 0;

  function automatic int sum(int a [NU]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + sum(c), failures + sum(f) + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    checks++;
    if (!(clen[0] > clen[1] && clen[1] > clen[2])) begin
      failures++;
      $display("FAIL: compressed chain should shrink with n: %0d %0d %0d", clen[0], clen[1], clen[2]);
    end
    checks++;
    if (!(vol[0] < 136 * 1464 && vol[3] < 136 * 1464)) begin
      failures++;
      $display("FAIL: compressed volume not below the uncompressed volume");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + sum(c), failures + sum(f));
    $finish;
  end
endmodule
