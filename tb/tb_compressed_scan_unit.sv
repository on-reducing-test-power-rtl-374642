// tb_compressed_scan_unit - shifting and decoding of one compressed scan unit.
//
// Default unit: 3 code flip-flops feeding the VIFO segment-3 decoder. Every
// compressed pattern's segment-3 code of the worked example is shifted in
// first bit first; after exactly 3 shift cycles the code and the decoded
// 4-bit segment must be correct, and the serial output must repeat the bit
// shifted in 3 shifts earlier. Idle cycles with random si must change nothing.
module tb_compressed_scan_unit;
  import spc_pkg::*;
  import spc_tb_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       shift_en = 1'b0;
  logic       si = 1'b0;
  logic       so;
  logic [2:0] code;
  logic [3:0] dout;

  int checks = 0;
  int failures = 0;
  bit hist [$];

  compressed_scan_unit dut (
    .clk(clk), .rst_n(rst_n), .shift_en(shift_en), .si(si), .so(so),
    .code(code), .dout(dout)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
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
    check(code == 3'b000 && so == 1'b0, "reset state");
    rst_n = 1'b1;
    for (int r = 0; r < N_CSC; r++) begin
      string c, e;
      logic [2:0] held;
      c = seg_code(VIFO_CSC[r], VIFO_CODE_W, 2);
      e = VIFO_SEG_PAT[2][VIFO_IDX[r][2]];
      for (int i = 0; i < 3; i++) begin
        @(negedge clk);
        shift_en = 1'b1;
        si = (c[i] == "1");
        hist.push_back(si);
        @(posedge clk); #1;
        if (hist.size() > 3) begin
          void'(hist.pop_front());
        end
        check(so == hist[0] || hist.size() < 3, $sformatf("so after shift row %0d", r));
      end
      shift_en = 1'b0;
      #1;
      check(code == 3'(str2bits(c)), $sformatf("row %0d code %b want %s", r, code, c));
      check(dout == 4'(str2bits(e)), $sformatf("row %0d dout %b want %s", r, dout, e));
      // Idle cycles: nothing moves.
      held = code;
      repeat (2) begin
        @(negedge clk);
        si = 1'($urandom);
        @(posedge clk); #1;
        check(code == held, "hold without shift_en");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
