// tb_normal_scan_chain - the 21-cell normal scan chain against a bit-level
// reference model.
//
// Random scan operations with random serial input, decoder data and
// functional data are applied for 3000 cycles; after every cycle the cell
// contents and the scan output are compared with a model that keeps the cells
// in a bit array, cell 0 at the scan-in. Each operation must occur, and the
// SCAN_SHIFT_CSC and SCAN_HOLD cycles must leave every cell untouched.
module tb_normal_scan_chain;
  import spc_pkg::*;

  localparam int SPL = 21;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  scan_op_e       op = SCAN_HOLD;
  logic           si = 1'b0;
  logic           so;
  logic [SPL-1:0] load_d = '0;
  logic [SPL-1:0] func_d = '0;
  logic [SPL-1:0] q;

  int checks = 0;
  int failures = 0;
  int op_count [5];
  bit model [SPL];

  normal_scan_chain dut (
    .clk(clk), .rst_n(rst_n), .op(op), .si(si), .so(so),
    .load_d(load_d), .func_d(func_d), .q(q)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < SPL; i++) model[i] = 1'b0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int k;
      @(negedge clk);
      k = $urandom_range(4);
      op = scan_op_e'(k);
      si = 1'($urandom);
      load_d = SPL'({$urandom, $urandom});
      func_d = SPL'({$urandom, $urandom});
      op_count[k]++;
      // reference model
      case (k)
        1: begin
          for (int i = SPL - 1; i > 0; i--) model[i] = model[i-1];
          model[0] = si;
        end
        3: for (int i = 0; i < SPL; i++) model[i] = load_d[i];
        4: for (int i = 0; i < SPL; i++) model[i] = func_d[i];
        default: ;
      endcase
      @(posedge clk); #1;
      checks++;
      for (int i = 0; i < SPL; i++) begin
        if (q[i] != model[i]) begin
          failures++;
          $display("cycle %0d op %0d: cell %0d is %b, model %b", cyc, k, i, q[i], model[i]);
          break;
        end
      end
      checks++;
      if (so != model[SPL-1]) begin
        failures++;
        $display("cycle %0d: scan out %b, model %b", cyc, so, model[SPL-1]);
      end
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (op_count[k] == 0) begin
        failures++;
        $display("operation %0d never applied", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
