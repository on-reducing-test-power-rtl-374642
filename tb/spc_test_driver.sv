// spc_test_driver - tester model that applies the 17-pattern worked example
// to one selective scan architecture and checks it.
//
// For every pattern it decides the route by the X-bit omit ratio (0.3): a
// pattern whose share of don't-care bits is below it is shifted uncompressed
// into the normal chain, don't-cares filled with 0; any other pattern is
// shifted into the compressed chain in the encoded form of the chosen scheme
// (SCHEME 0 = VIFO, 1 = FIVO), followed by one transfer cycle. After loading,
// the scan cells must hold the expected decompressed pattern and agree with
// every care bit of the original pattern. A random functional response is then
// captured and checked as it leaves through the normal scan-out, either while
// the next uncompressed pattern is shifted in or in a separate unload that
// shifts random fill into the normal chain.
//
// Checked besides: the normal chain does not change during compressed
// shifting; the scan-cell transitions of loading the set this way (compressed
// chain shifts plus one transfer per compressed pattern) are fewer than those
// of shifting every pattern, decompressed, serially into the normal chain
// from the same starting state; a compressed pattern takes CSC_LEN shift cycles plus one transfer
// cycle; the shifted-in test data volume equals
//   NSC patterns * SPL + CSC patterns * CSC_LEN.
// Counters of every mechanism are outputs so the testbench can require each
// to occur. The stimulus changes on the falling clock edge.
module spc_test_driver
  import spc_pkg::*;
  import spc_tb_pkg::*;
#(
  parameter int SCHEME  = 0,
  parameter int SPL     = 21,
  parameter int CSC_LEN = 11
) (
  input  logic           clk,
  input  logic           rst_n,
  output scan_op_e       op,
  output logic           csi,
  output logic           nsi,
  input  logic           nso,
  input  logic           csc_so,
  output logic [SPL-1:0] func_d,
  input  logic [SPL-1:0] q,
  output bit             done,
  output int             checks,
  output int             failures,
  output int             n_nsc_patterns,
  output int             n_csc_patterns,
  output int             n_transfers,
  output int             n_captures,
  output int             n_unloads,
  output int             n_quiet_cycles,
  output int             volume,
  output int             toggles_scheme,
  output int             toggles_serial
);

  logic [SPL-1:0] resp;
  bit             resp_pending;
  logic [63:0]    csc_model;   // compressed chain contents, first bit shifted in at the top

  // Scan-cell transitions caused by shifting the string s serially into a
  // chain of n cells that holds state (bit 0 nearest the scan-in).
  function automatic int serial_toggles(logic [255:0] state, string s, int n);
    int t = 0;
    for (int i = 0; i < s.len(); i++) begin
      logic [255:0] nxt;
      nxt = (state << 1) | 256'(s[i] == "1");
      for (int k = 0; k < n; k++) if (nxt[k] != state[k]) t++;
      state = nxt;
    end
    return t;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (%s): %s", SCHEME ? "FIVO" : "VIFO", msg);
    end
  endtask

  // One normal-chain shift; checks the response bit leaving the chain.
  task automatic nsc_shift(bit din, int i);
    @(negedge clk);
    if (resp_pending) check(nso == resp[SPL-1-i], $sformatf("response bit %0d on scan-out", i));
    op  = SCAN_SHIFT_NSC;
    nsi = din;
    @(posedge clk);
  endtask

  initial begin
    op = SCAN_HOLD;
    csi = 1'b0;
    nsi = 1'b0;
    func_d = '0;
    done = 1'b0;
    checks = 0; failures = 0;
    n_nsc_patterns = 0; n_csc_patterns = 0; n_transfers = 0;
    n_captures = 0; n_unloads = 0; n_quiet_cycles = 0; volume = 0;
    toggles_scheme = 0; toggles_serial = 0;
    csc_model = '0;
    resp = '0;
    resp_pending = 1'b0;
    @(posedge rst_n);
    repeat (2) @(posedge clk);

    for (int p = 0; p < N_PAT; p++) begin
      string pat, expect_s;
      bit compressed;
      pat = EX_PATTERNS[p];
      compressed = x_ratio(pat) >= 0.3;
      check(compressed == (p >= 3), $sformatf("pattern %0d routed by the omit ratio", p));

      if (!compressed) begin
        begin
          int t;
          t = serial_toggles(256'(q), expand0(pat), SPL);
          toggles_scheme += t;
          toggles_serial += t;
        end
        for (int i = 0; i < SPL; i++) nsc_shift(pat[i] == "1", i);
        resp_pending = 1'b0;
        volume += SPL;
        n_nsc_patterns++;
        expect_s = pat;
      end else begin
        string code;
        logic [SPL-1:0] q_before;
        int cycles;
        if (resp_pending) begin
          // Unload with don't-care fill, so the chain is not all zeros.
          for (int i = 0; i < SPL; i++) nsc_shift(1'($urandom), i);
          resp_pending = 1'b0;
          n_unloads++;
        end
        code = SCHEME ? FIVO_CSC[p-3] : VIFO_CSC[p-3];
        expect_s = SCHEME ? fivo_expected(p-3) : vifo_expected(p-3);
        cycles = 0;
        @(negedge clk);
        q_before = q;
        // Shift-in switching: compressed chain shifting plus the one transfer,
        // against shifting the decompressed pattern serially from the same state.
        toggles_scheme += serial_toggles(256'(csc_model), code, CSC_LEN);
        csc_model = 64'(str2bits(code));
        toggles_scheme += $countones(q_before ^ SPL'(str2bits(expect_s)));
        toggles_serial += serial_toggles(256'(q_before), expect_s, SPL);
        for (int i = 0; i < code.len(); i++) begin
          op  = SCAN_SHIFT_CSC;
          csi = (code[i] == "1");
          nsi = 1'($urandom);
          @(posedge clk);
          @(negedge clk);
          cycles++;
          check(q == q_before, "normal chain quiet while the compressed chain shifts");
          n_quiet_cycles++;
        end
        check(csc_so == (code[0] == "1"), "first compressed bit at the far end");
        op = SCAN_TRANSFER;
        @(posedge clk);
        cycles++;
        n_transfers++;
        check(cycles == CSC_LEN + 1, $sformatf("load took %0d cycles", cycles));
        volume += code.len();
        n_csc_patterns++;
        if (p == 3) begin
          // Decompressed form of the first compressed pattern, as listed for
          // the worked example.
          check(expect_s == (SCHEME ? "000010000000100000001" : "000010100000110001010"),
                "reference expansion of the first compressed pattern");
        end
      end

      @(negedge clk);
      op = SCAN_HOLD;
      check(q == SPL'(str2bits(expect_s)),
            $sformatf("pattern %0d loaded %b want %s", p, q, expect_s));
      check(care_match(pat, 256'(q)), $sformatf("pattern %0d care bits", p));

      func_d = SPL'({$urandom, $urandom});
      op = SCAN_CAPTURE;
      @(posedge clk);
      @(negedge clk);
      op = SCAN_HOLD;
      check(q == func_d, "capture");
      resp = func_d;
      resp_pending = 1'b1;
      n_captures++;
    end

    for (int i = 0; i < SPL; i++) nsc_shift(1'b0, i);
    n_unloads++;
    @(negedge clk);
    check(toggles_scheme < toggles_serial, "fewer shift-in transitions than serial loading");
    op = SCAN_HOLD;

    check(volume == n_nsc_patterns * SPL + n_csc_patterns * CSC_LEN, "test data volume");
    $display("%s: shift-in scan-cell transitions %0d, against %0d when every pattern is shifted serially",
             SCHEME ? "FIVO" : "VIFO", toggles_scheme, toggles_serial);
    $display("%s: %0d uncompressed + %0d compressed patterns, %0d bits shifted in (uncompressed set %0d bits)",
             SCHEME ? "FIVO" : "VIFO", n_nsc_patterns, n_csc_patterns, volume, N_PAT * SPL);
    done = 1'b1;
  end

endmodule
