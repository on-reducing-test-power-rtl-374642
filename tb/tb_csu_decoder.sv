// tb_csu_decoder - checks the decoder tables against the worked example.
//
// Two decoders are checked: the default one (segment 3 of the VIFO encoding,
// 3-bit code to 4 cells) and segment 1 of the FIVO encoding (3-bit code to 11
// cells). For each of the 14 compressed patterns the code is cut out of the
// compressed bit string and the decoder output is compared with the merged
// segment pattern that the pattern's segment index selects. Codes that no
// pattern uses must decode to all zeros.
module tb_csu_decoder;
  import spc_pkg::*;
  import spc_tb_pkg::*;

  logic [2:0]  v_code, f_code;
  logic [3:0]  v_pat;
  logic [10:0] f_pat;

  int checks = 0;
  int failures = 0;

  csu_decoder dut_v (.code(v_code), .pattern(v_pat));

  csu_decoder #(.IN_W(3), .OUT_W(11), .ROM(FIVO_SEG1)) dut_f (
    .code(f_code), .pattern(f_pat)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit v_used [8];
    bit f_used [8];
    for (int r = 0; r < N_CSC; r++) begin
      string c, e;
      c = seg_code(VIFO_CSC[r], VIFO_CODE_W, 2);
      e = VIFO_SEG_PAT[2][VIFO_IDX[r][2]];
      v_code = 3'(str2bits(c));
      v_used[v_code] = 1'b1;
      c = seg_code(FIVO_CSC[r], FIVO_CODE_W, 0);
      f_code = 3'(str2bits(c));
      f_used[f_code] = 1'b1;
      #1;
      checks++;
      if (v_pat !== 4'(str2bits(e))) begin
        failures++;
        $display("VIFO seg3 row %0d code %b: got %b want %s", r, v_code, v_pat, e);
      end
      e = FIVO_SEG_PAT[0][FIVO_IDX[r][0]];
      checks++;
      if (f_pat !== 11'(str2bits(e))) begin
        failures++;
        $display("FIVO seg1 row %0d code %b: got %b want %s", r, f_code, f_pat, e);
      end
    end
    for (int k = 0; k < 8; k++) begin
      if (!v_used[k]) begin
        v_code = 3'(k); #1; checks++;
        if (v_pat !== '0) begin failures++; $display("VIFO unused code %0d not zero", k); end
      end
      if (!f_used[k]) begin
        f_code = 3'(k); #1; checks++;
        if (f_pat !== '0) begin failures++; $display("FIVO unused code %0d not zero", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
