// spc_tb_pkg - reference data and helpers shared by the testbenches.
//
// Holds the 21-bit worked example in the form the encoding flow produces it,
// independent of the decoder tables in spc_pkg:
//   * EX_PATTERNS: the 17 original test patterns with don't-cares ('X'), the
//     first three having few enough X bits to stay uncompressed at an X-bit
//     omit ratio of 0.3;
//   * for each scheme, the merged pattern of every segment by index
//     (*_SEG_PAT), the index of each compressed pattern's segments
//     (*_IDX) and the compressed bit string shifted into the compressed chain
//     (*_CSC).
// All strings are written first-shifted bit first.
package spc_tb_pkg;

  localparam int N_PAT  = 17;
  localparam int N_CSC  = 14;
  localparam int SPL    = 21;

  string EX_PATTERNS [N_PAT] = '{
    "X0001111001010XXXXX01",
    "X0100001000000XXXXX01",
    "X0101100100010XXXXX11",
    "X0001XXXX0001XXXXXXXX",
    "X001101100X001XXXXXX1",
    "X11100XXX10010XXXXXX0",
    "XX1X11100110X1XXXXXXX",
    "XXX11010111000XXXXX00",
    "XXXXXXX0X00100XXX1X1X",
    "XXXXXXX1101010XXXXXX1",
    "XXXXXXX1X00010XXXXXXX",
    "XXXXXXXXX00100XXXXX0X",
    "XXXXXXXXX00101XXXXX0X",
    "XXXXXXXXX10111XXXXX0X",
    "XXXXXXXXX11101XXXXX0X",
    "XXXXXXXXXXX0X0XXXXX1X",
    "XXXXXXXXXXXXXXXX1XXXX"
  };

  // ---- VIFO encoding (4-bit decoder outputs) ----
  localparam int VIFO_NSEG = 6;
  string VIFO_SEG_PAT [VIFO_NSEG][8] = '{
    '{"0000", "0001", "0111", "", "", "", "", ""},
    '{"1011", "0000", "1110", "1010", "", "", "", ""},
    '{"0000", "0100", "0110", "1110", "0001", "1010", "0101", "0111"},
    '{"0100", "1000", "0000", "1100", "", "", "", ""},
    '{"1000", "0101", "", "", "", "", "", ""},
    '{"1", "0", "", "", "", "", "", ""}
  };
  int VIFO_IDX [N_CSC][VIFO_NSEG] = '{
    '{0,3,0,3,1,1}, '{1,0,0,0,1,0}, '{2,1,1,1,1,1}, '{2,2,2,3,1,1},
    '{2,3,3,2,0,1}, '{2,3,4,2,1,1}, '{2,0,5,1,1,0}, '{2,0,0,1,1,1},
    '{2,3,4,2,0,1}, '{2,3,4,0,0,1}, '{2,3,6,3,0,1}, '{2,3,7,0,0,1},
    '{2,3,5,2,1,1}, '{2,3,7,3,0,1}
  };
  int VIFO_CODE_W [VIFO_NSEG] = '{2,2,3,2,1,1};
  string VIFO_CSC [N_CSC] = '{
    "01000101010", "11010100011", "00101001110", "00110111010",
    "00001110100", "00001010110", "00011101111", "00010101110",
    "00001010100", "00001010000", "00000001000", "00000010000",
    "00001100110", "00000011000"
  };

  // ---- FIVO encoding (3-bit decoder inputs) ----
  localparam int FIVO_NSEG = 2;
  string FIVO_SEG_PAT [FIVO_NSEG][8] = '{
    '{"00001000000", "00011011000", "01110000010", "00101110011",
      "00011010111", "00000001101", "", ""},
    '{"0010010001", "0100000010", "0000000000", "1000001010",
      "0100000001", "1000000000", "1010000000", "1110000000"}
  };
  int FIVO_IDX [N_CSC][FIVO_NSEG] = '{
    '{0,4}, '{1,0}, '{2,1}, '{3,0}, '{4,2}, '{0,3}, '{5,4},
    '{1,4}, '{1,5}, '{1,6}, '{2,7}, '{4,6}, '{5,1}, '{5,0}
  };
  int FIVO_CODE_W [FIVO_NSEG] = '{3,3};
  string FIVO_CSC [N_CSC] = '{
    "110001", "111101", "100010", "011101", "001100", "110011", "000001",
    "111001", "111111", "111110", "100000", "001110", "000010", "000101"
  };

  // Binary string (first character most significant) to a right-aligned
  // vector; don't-cares ('X') become 0.
  function automatic logic [255:0] str2bits(string s);
    logic [255:0] v = '0;
    for (int i = 0; i < s.len(); i++) v = (v << 1) | 256'(s[i] == "1");
    return v;
  endfunction

  // Pattern with don't-cares replaced by 0.
  function automatic string expand0(string s);
    string e = s;
    for (int i = 0; i < e.len(); i++) if (e[i] != "1") e[i] = "0";
    return e;
  endfunction

  // Does v (right-aligned, s.len() bits) agree with every care bit of s?
  function automatic bit care_match(string s, logic [255:0] v);
    int n = s.len();
    for (int i = 0; i < n; i++) begin
      if (s[i] == "0" && v[n-1-i] != 1'b0) return 1'b0;
      if (s[i] == "1" && v[n-1-i] != 1'b1) return 1'b0;
    end
    return 1'b1;
  endfunction

  // Share of don't-care bits in a pattern.
  function automatic real x_ratio(string s);
    int nx = 0;
    for (int i = 0; i < s.len(); i++) if (s[i] == "X") nx++;
    return real'(nx) / real'(s.len());
  endfunction

  // Decompressed 21-bit pattern of compressed pattern r, from segment indices.
  function automatic string vifo_expected(int r);
    string e = "";
    for (int s = 0; s < VIFO_NSEG; s++) e = {e, VIFO_SEG_PAT[s][VIFO_IDX[r][s]]};
    return e;
  endfunction

  function automatic string fivo_expected(int r);
    string e = "";
    for (int s = 0; s < FIVO_NSEG; s++) e = {e, FIVO_SEG_PAT[s][FIVO_IDX[r][s]]};
    return e;
  endfunction

  // Substring of a compressed string holding segment seg's code.
  function automatic string seg_code(string csc, int code_w [], int seg);
    int p = 0;
    for (int s = 0; s < seg; s++) p += code_w[s];
    return csc.substr(p, p + code_w[seg] - 1);
  endfunction

endpackage
