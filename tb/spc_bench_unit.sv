// spc_bench_unit - one selective scan architecture at benchmark scale, with
// its own tester.
//
// Builds an spc_scan_arch of SPL cells whose decoder tables are stand-ins:
// the real tables come from encoding a benchmark's test set, which is not
// available, so table bit i is a fixed hash of i. Segment layout:
//   SCHEME 1 (FIVO): N_IN-bit codes. In chains of 512 cells or more,
//     segment 1 drives 256 cells (the decoder fan-out limit). The other
//     segments get a hash-chosen width; the last one takes the remainder and
//     has a 2-bit code.
//   SCHEME 0 (VIFO): 4-cell segments (the last one the remainder) with 1-,
//     2- or 3-bit codes chosen by hash.
// The tester applies N_PAT patterns, N_CSC of them compressed: pattern p is
// uncompressed when p is a multiple of N_PAT/(N_PAT-N_CSC), until N_PAT-N_CSC
// uncompressed patterns have been applied. A compressed pattern is a random
// code per segment; the expected scan-cell contents are computed here from
// the hash, segment by segment. An uncompressed pattern is random data. Each
// load, each capture and each response on the scan-out is checked, and the
// normal chain must stay quiet during compressed shifting.
module spc_bench_unit
  import spc_pkg::*;
#(
  parameter int SCHEME = 1,
  parameter int SPL    = 1464,
  parameter int N_IN   = 3,
  parameter int N_PAT  = 136,
  parameter int N_CSC  = 116
) (
  input  logic clk,
  input  logic rst_n,
  output bit   done,
  output int   checks,
  output int   failures,
  output int   volume,
  output int   n_csc,
  output int   n_nsc,
  output int   csc_len
);

  function automatic int unsigned hash(int unsigned x);
    int unsigned h = x * 32'h9E3779B1 + 32'h7F4A7C15;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    return h ^ (h >> 12);
  endfunction

  function automatic int unsigned raw_out(int unsigned s);
    if (SCHEME == 0) return 4;
    if (s == 0 && SPL >= 2 * MAX_FANOUT) return MAX_FANOUT;
    return (4 << (N_IN - 3)) + hash(s) % (25 << (N_IN - 3));
  endfunction

  function automatic int unsigned count_seg();
    int unsigned acc = 0, s = 0;
    while (acc < SPL) begin
      acc += raw_out(s);
      s++;
    end
    return s;
  endfunction

  localparam int unsigned NSEG = count_seg();
  typedef int unsigned warr_t [NSEG];

  function automatic warr_t gen_out();
    warr_t w;
    int unsigned acc = 0;
    for (int unsigned s = 0; s < NSEG; s++) begin
      w[s] = (s == NSEG - 1) ? SPL - acc : raw_out(s);
      acc += w[s];
    end
    return w;
  endfunction

  function automatic warr_t gen_in();
    warr_t w;
    for (int unsigned s = 0; s < NSEG; s++) begin
      if (SCHEME == 0) w[s] = 1 + hash(s + 1000) % 3;
      else             w[s] = (s == NSEG - 1) ? 2 : N_IN;
    end
    return w;
  endfunction

  localparam warr_t OW = gen_out();
  localparam warr_t IW = gen_in();

  function automatic int unsigned sum_in();
    int unsigned a = 0;
    for (int unsigned s = 0; s < NSEG; s++) a += IW[s];
    return a;
  endfunction

  function automatic int unsigned sum_rom();
    int unsigned a = 0;
    for (int unsigned s = 0; s < NSEG; s++) a += (2**IW[s]) * OW[s];
    return a;
  endfunction

  localparam int unsigned CLEN  = sum_in();
  localparam int unsigned RBITS = sum_rom();

  // Table bit i is bit i%32 of hash(i/32 + 77); filled a word at a time.
  function automatic logic [RBITS-1:0] gen_rom();
    logic [RBITS+31:0] r;
    for (int unsigned w = 0; w < (RBITS + 31) / 32; w++) r[32*w +: 32] = hash(w + 77);
    return r[RBITS-1:0];
  endfunction

  function automatic bit rom_bit(int unsigned i);
    int unsigned h = hash(i / 32 + 77);
    return h[i % 32];
  endfunction

  scan_op_e       op;
  logic           csi, nsi, nso, csc_so;
  logic [SPL-1:0] func_d, q;

  spc_scan_arch #(
    .NUM_SEG(NSEG), .SEG_IN_W(IW), .SEG_OUT_W(OW), .SPL(SPL),
    .CSC_LEN(CLEN), .ROM_BITS(RBITS), .ROM(gen_rom())
  ) dut (
    .clk(clk), .rst_n(rst_n), .op(op), .csi(csi), .nsi(nsi), .nso(nso),
    .csc_so(csc_so), .func_d(func_d), .q(q)
  );

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (scheme %0d, n=%0d): %s", SCHEME, N_IN, msg);
    end
  endtask

  logic [SPL-1:0] resp;
  bit resp_pending;

  task automatic nsc_shift(bit din, int i);
    @(negedge clk);
    if (resp_pending) check(nso == resp[SPL-1-i], "response on scan-out");
    op  = SCAN_SHIFT_NSC;
    nsi = din;
    @(posedge clk);
  endtask

  initial begin
    int every;
    op = SCAN_HOLD; csi = 1'b0; nsi = 1'b0; func_d = '0;
    done = 1'b0; checks = 0; failures = 0; volume = 0; n_csc = 0; n_nsc = 0;
    csc_len = int'(CLEN);
    resp = '0; resp_pending = 1'b0;
    every = (N_PAT - N_CSC) > 0 ? N_PAT / (N_PAT - N_CSC) : N_PAT + 1;
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    for (int p = 0; p < N_PAT; p++) begin
      logic [SPL-1:0] expect_q;
      if (p % every == 0 && n_nsc < N_PAT - N_CSC) begin
        for (int i = 0; i < SPL; i++) begin
          expect_q[SPL-1-i] = 1'($urandom);
          nsc_shift(expect_q[SPL-1-i], i);
        end
        resp_pending = 1'b0;
        volume += SPL;
        n_nsc++;
      end else begin
        logic [SPL-1:0] q_before;
        int unsigned rom_at, cell_at;
        if (resp_pending) begin
          for (int i = 0; i < SPL; i++) nsc_shift(1'($urandom), i);
          resp_pending = 1'b0;
        end
        @(negedge clk);
        q_before = q;
        rom_at = 0;
        cell_at = SPL;
        for (int unsigned s = 0; s < NSEG; s++) begin
          int unsigned code;
          code = $urandom_range(2**IW[s] - 1);
          for (int unsigned j = 0; j < OW[s]; j++)
            expect_q[cell_at - OW[s] + j] = rom_bit(rom_at + code * OW[s] + j);
          cell_at -= OW[s];
          rom_at += (2**IW[s]) * OW[s];
          // shift the code, most significant bit first
          for (int k = int'(IW[s]) - 1; k >= 0; k--) begin
            op = SCAN_SHIFT_CSC;
            csi = code[k];
            nsi = 1'($urandom);
            @(posedge clk);
            @(negedge clk);
          end
        end
        check(q == q_before, "normal chain quiet during compressed shifting");
        op = SCAN_TRANSFER;
        @(posedge clk);
        volume += int'(CLEN);
        n_csc++;
      end
      @(negedge clk);
      op = SCAN_HOLD;
      check(q == expect_q, $sformatf("pattern %0d loaded", p));
      func_d = {(SPL + 31) / 32 {$urandom}};
      op = SCAN_CAPTURE;
      @(posedge clk);
      @(negedge clk);
      op = SCAN_HOLD;
      check(q == func_d, "capture");
      resp = func_d;
      resp_pending = 1'b1;
    end
    check(volume == n_nsc * SPL + n_csc * int'(CLEN), "test data volume");
    check(n_csc == N_CSC && n_nsc == N_PAT - N_CSC, "pattern split");
    $display("scheme %s n=%0d SPL %0d: %0d decoders, compressed chain %0d bits, %0d + %0d patterns, volume %0d of %0d",
             SCHEME ? "FIVO" : "VIFO", N_IN, SPL, NSEG, CLEN, n_nsc, n_csc, volume, N_PAT * SPL);
    done = 1'b1;
  end

endmodule
