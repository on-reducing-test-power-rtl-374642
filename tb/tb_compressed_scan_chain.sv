// tb_compressed_scan_chain - the VIFO compressed scan chain of the worked
// example (default parameters: six units, 11 code bits, 21 decoded bits).
//
// Each of the 14 compressed patterns is shifted in, first bit first, in
// exactly 11 shift cycles. Then the chain contents must equal the compressed
// string, the 21 decoded bits must equal the concatenation of the merged
// segment patterns selected by the pattern's segment indices, and they must
// agree with every care bit of the original test pattern. The far-end serial
// output must repeat the bit shifted in 11 shifts earlier.
module tb_compressed_scan_chain;
  import spc_pkg::*;
  import spc_tb_pkg::*;

  localparam int L = VIFO_CSC_LEN;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          shift_en = 1'b0;
  logic          csi = 1'b0;
  logic          csc_so;
  logic [L-1:0]  csc_q;
  logic [20:0]   decoded;

  int checks = 0;
  int failures = 0;
  int shifts = 0;
  bit hist [$];

  compressed_scan_chain dut (
    .clk(clk), .rst_n(rst_n), .shift_en(shift_en), .csi(csi),
    .csc_so(csc_so), .csc_q(csc_q), .decoded(decoded)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    check(csc_q == '0, "reset state");
    rst_n = 1'b1;
    for (int r = 0; r < N_CSC; r++) begin
      string c, e;
      int n0;
      c = VIFO_CSC[r];
      e = vifo_expected(r);
      n0 = shifts;
      for (int i = 0; i < c.len(); i++) begin
        @(negedge clk);
        shift_en = 1'b1;
        csi = (c[i] == "1");
        hist.push_back(csi);
        @(posedge clk); #1;
        shifts++;
        if (hist.size() > L) void'(hist.pop_front());
        if (hist.size() == L) check(csc_so == hist[0], "far-end serial output");
      end
      @(negedge clk);
      shift_en = 1'b0;
      check(shifts - n0 == L, "11 shift cycles per compressed pattern");
      check(csc_q == L'(str2bits(c)), $sformatf("row %0d chain %b want %s", r, csc_q, c));
      check(decoded == 21'(str2bits(e)), $sformatf("row %0d decoded %b want %s", r, decoded, e));
      check(care_match(EX_PATTERNS[r+3], 256'(decoded)),
            $sformatf("row %0d decoded %b breaks care bits of %s", r, decoded, EX_PATTERNS[r+3]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
