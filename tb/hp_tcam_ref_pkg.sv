// hp_tcam_ref_pkg: reference model used by the HP-TCAM testbenches.
//
// hp_tcam_ref holds a ternary table (value and care mask per address; a
// clear care bit is "don't care") and does two independent jobs:
//  * search(): a direct TCAM search, the lowest matching address winning;
//  * build(): the host-side conversion of the ternary table into the
//    contents of every bit position table (BPT) and address position table
//    (APT) of the hybrid-partitioned design, following the table rules:
//      - a binary sub-word v is present in partition (l,p) when some entry
//        of layer l matches v on the bits of sub-word p;
//      - BPT row r holds the presence bits of v = r*2^B .. r*2^B+2^B-1 and
//        LI = (number of present sub-words below v = r*2^B) - 1;
//      - the APT row of the j-th present sub-word (j counted from 0) holds
//        bit k set when entry k of the layer matches that sub-word.
// It also classifies a key by the way the design must treat it (BPT miss,
// empty K-bit AND, several matches in one layer, matches in several layers),
// so that a testbench can count how often each case occurred.
package hp_tcam_ref_pkg;

  class hp_tcam_ref #(
    int unsigned W = 36, int unsigned ENTRIES = 512, int unsigned L = 2,
    int unsigned N = 4,  int unsigned B = 4
  );
    localparam int unsigned WS   = W / N;
    localparam int unsigned K    = ENTRIES / L;
    localparam int unsigned RB   = 1 << B;
    localparam int unsigned ROWS = 1 << (WS - B);
    localparam int unsigned SUBS = 1 << WS;

    logic [W-1:0] val  [ENTRIES];
    logic [W-1:0] care [ENTRIES];
    bit           used [ENTRIES];

    logic [RB-1:0] bpt_bits [L][N][ROWS];
    logic [WS:0]   bpt_li   [L][N][ROWS];
    logic [K-1:0]  apt      [L][N][SUBS];

    function new();
      foreach (used[a]) begin used[a] = 0; val[a] = '0; care[a] = '0; end
    endfunction

    function void set_entry(int a, logic [W-1:0] v, logic [W-1:0] c);
      used[a] = 1; val[a] = v & c; care[a] = c;
    endfunction

    function void clear_entry(int a);
      used[a] = 0;
    endfunction

    function bit sub_match(int a, int p, logic [WS-1:0] v);
      logic [WS-1:0] ev, ec;
      ev = val[a][p*WS +: WS];
      ec = care[a][p*WS +: WS];
      return used[a] && (((v ^ ev) & ec) == '0);
    endfunction

    function void build();
      for (int l = 0; l < int'(L); l++)
        for (int p = 0; p < int'(N); p++) begin
          int rank;
          rank = 0;
          for (int v = 0; v < int'(SUBS); v++) apt[l][p][v] = '0;
          for (int r = 0; r < int'(ROWS); r++) begin
            bpt_li[l][p][r] = (WS+1)'(rank - 1);
            for (int i = 0; i < int'(RB); i++) begin
              logic [K-1:0] row;
              row = '0;
              for (int k = 0; k < int'(K); k++)
                row[k] = sub_match(l * int'(K) + k, p, WS'(r * int'(RB) + i));
              bpt_bits[l][p][r][i] = |row;
              if (|row) begin
                apt[l][p][rank] = row;
                rank++;
              end
            end
          end
        end
    endfunction

    // direct ternary search
    function void search(logic [W-1:0] key, output bit found, output int addr);
      found = 0; addr = 0;
      for (int a = int'(ENTRIES) - 1; a >= 0; a--)
        if (used[a] && (((key ^ val[a]) & care[a]) == '0)) begin
          found = 1; addr = a;
        end
    endfunction

    // per layer: every sub-word present, and number of matching entries
    function void classify(logic [W-1:0] key, output bit all_present [L],
                           output int nmatch [L]);
      for (int l = 0; l < int'(L); l++) begin
        all_present[l] = 1;
        nmatch[l] = 0;
        for (int p = 0; p < int'(N); p++) begin
          bit pres;
          pres = 0;
          for (int k = 0; k < int'(K); k++)
            if (sub_match(l * int'(K) + k, p, key[p*WS +: WS])) pres = 1;
          if (!pres) all_present[l] = 0;
        end
        for (int k = 0; k < int'(K); k++) begin
          int a;
          bit m;
          a = l * int'(K) + k;
          m = 1;
          for (int p = 0; p < int'(N); p++)
            if (!sub_match(a, p, key[p*WS +: WS])) m = 0;
          if (m) nmatch[l]++;
        end
      end
    endfunction

    // a key that matches entry a: its care bits, random elsewhere
    function logic [W-1:0] key_for(int a);
      logic [W-1:0] r;
      for (int i = 0; i < int'(W); i++) r[i] = 1'($urandom);
      return (val[a] & care[a]) | (r & ~care[a]);
    endfunction
  endclass

endpackage
