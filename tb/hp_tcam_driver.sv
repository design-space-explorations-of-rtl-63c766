// hp_tcam_driver: stimulus and checker for a complete HP-TCAM.
//
// Connects to the ports of one hp_tcam instance of the same parameters. It
// fills a ternary table with random entries (random don't-care bits,
// repeated patterns so that several addresses and several layers match),
// converts it into BPT and APT rows with the reference model and loads them
// through the row-write ports. It then streams searches back to back, one
// per cycle, and checks every result against a direct ternary search and its
// arrival exactly LATENCY cycles after the search was applied. A second
// round rewrites the table (entries deleted and added) and searches again.
// It counts how often each mechanism of the design was exercised and counts
// a failure for any that never happened. done rises when it has finished.
module hp_tcam_driver
  import hp_tcam_ref_pkg::*;
#(
  parameter int unsigned ENTRIES = hp_tcam_pkg::ENTRIES_DEF,
  parameter int unsigned W       = hp_tcam_pkg::W_DEF,
  parameter int unsigned L       = hp_tcam_pkg::L_DEF,
  parameter int unsigned N       = hp_tcam_pkg::N_DEF,
  parameter int unsigned B       = hp_tcam_pkg::B_DEF,
  parameter int unsigned SEARCHES = 300,   // searches per round
  localparam int unsigned WS = W / N,
  localparam int unsigned K  = ENTRIES / L
) (
  input  logic                       clk,
  output logic                       rst_n,
  output logic                       search_valid,
  output logic [W-1:0]               search_key,
  output logic                       bpt_we,
  output logic [$clog2(L)-1:0]       bpt_layer,
  output logic [$clog2(N)-1:0]       bpt_part,
  output logic [WS-B-1:0]            bpt_addr,
  output logic [(1<<B)-1:0]          bpt_wbits,
  output logic [WS:0]                bpt_wli,
  output logic                       apt_we,
  output logic [$clog2(L)-1:0]       apt_layer,
  output logic [$clog2(N)-1:0]       apt_part,
  output logic [WS-1:0]              apt_addr,
  output logic [K-1:0]               apt_wdata,
  input  logic                       result_valid,
  input  logic                       match,
  input  logic [$clog2(ENTRIES)-1:0] match_addr,
  output logic                       done,
  output int                         checks,
  output int                         failures
);
  localparam int unsigned ROWS = 1 << (WS - B);
  localparam int unsigned SUBS = 1 << WS;
  localparam int unsigned LAT  = hp_tcam_pkg::LATENCY;

  typedef hp_tcam_ref #(.W(W), .ENTRIES(ENTRIES), .L(L), .N(N), .B(B)) ref_t;
  ref_t m;

  typedef struct {
    longint issued;
    bit     found;
    int     addr;
  } exp_t;
  exp_t expq [$];

  // mechanism counters
  int n_match, n_mismatch, n_bpt_miss, n_kand_empty, n_multi_in_layer,
      n_multi_layer, n_upper_layer, n_back_to_back, n_updates;

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(input string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  // result monitor
  always @(posedge clk) begin
    if (rst_n && result_valid) begin
      checks++;
      if (expq.size() == 0) fail("result without a search");
      else begin
        exp_t e;
        e = expq.pop_front();
        if (cyc - e.issued != longint'(LAT))
          fail($sformatf("latency %0d", cyc - e.issued));
        if (match !== e.found || (e.found && int'(match_addr) != e.addr))
          fail($sformatf("match=%b addr=%0d expected %b/%0d", match, match_addr, e.found, e.addr));
      end
    end
  end

  function automatic logic [W-1:0] rnd_word();
    logic [W-1:0] r;
    for (int i = 0; i < int'(W); i++) r[i] = 1'($urandom);
    return r;
  endfunction

  function automatic logic [W-1:0] rnd_care();
    logic [W-1:0] c;
    for (int i = 0; i < int'(W); i++) c[i] = ($urandom % 6) != 0;  // ~1/6 don't care
    return c;
  endfunction

  task automatic fill_table(input int pct_used);
    for (int a = 0; a < int'(ENTRIES); a++) begin
      if (int'($urandom % 100) < pct_used) begin
        if (a >= 8 && ($urandom % 6) == 0) begin
          // repeat an earlier entry with more don't cares: multiple matches
          int s;
          s = int'($urandom % a);
          if (m.used[s]) m.set_entry(a, m.val[s], m.care[s] & rnd_care());
          else m.set_entry(a, rnd_word(), rnd_care());
        end else
          m.set_entry(a, rnd_word(), rnd_care());
      end else
        m.clear_entry(a);
    end
  endtask

  task automatic load_tables();
    m.build();
    for (int l = 0; l < int'(L); l++)
      for (int p = 0; p < int'(N); p++)
        for (int v = 0; v < int'(SUBS); v++) begin
          apt_we    <= 1;
          apt_layer <= ($clog2(L))'(l);
          apt_part  <= ($clog2(N))'(p);
          apt_addr  <= WS'(v);
          apt_wdata <= m.apt[l][p][v];
          bpt_we    <= v < int'(ROWS);
          bpt_layer <= ($clog2(L))'(l);
          bpt_part  <= ($clog2(N))'(p);
          bpt_addr  <= (WS-B)'(v);
          if (v < int'(ROWS)) begin
            bpt_wbits <= m.bpt_bits[l][p][v];
            bpt_wli   <= m.bpt_li[l][p][v];
          end
          @(posedge clk);
        end
    apt_we <= 0;
    bpt_we <= 0;
    @(posedge clk);
  endtask

  function automatic int used_in_layer(int l);
    int a;
    for (int t = 0; t < 64; t++) begin
      a = l * int'(K) + int'($urandom % K);
      if (m.used[a]) return a;
    end
    return -1;
  endfunction

  function automatic logic [W-1:0] pick_key();
    int kind, a, l;
    logic [W-1:0] key;
    kind = int'($urandom % 10);
    key = rnd_word();
    if (kind < 5) begin
      // key of a stored entry, from any layer
      l = int'($urandom % L);
      a = used_in_layer(l);
      if (a >= 0) key = m.key_for(a);
    end else if (kind < 8) begin
      // sub-words taken from different entries of one layer
      l = int'($urandom % L);
      for (int p = 0; p < int'(N); p++) begin
        a = used_in_layer(l);
        if (a >= 0) begin
          logic [W-1:0] k2;
          k2 = m.key_for(a);
          key[p*WS +: WS] = k2[p*WS +: WS];
        end
      end
    end
    return key;
  endfunction

  task automatic search_round(input int count);
    for (int i = 0; i < count; i++) begin
      logic [W-1:0] key;
      bit found, ap [L], any_present;
      int addr, nm [L], layers_matching;
      exp_t e;
      key = pick_key();
      m.search(key, found, addr);
      m.classify(key, ap, nm);
      layers_matching = 0;
      any_present = 0;
      for (int l = 0; l < int'(L); l++) begin
        if (!ap[l]) n_bpt_miss++;
        if (ap[l] && nm[l] == 0) n_kand_empty++;
        if (nm[l] > 1) n_multi_in_layer++;
        if (nm[l] > 0) layers_matching++;
      end
      if (layers_matching > 1) n_multi_layer++;
      if (found && nm[0] == 0) n_upper_layer++;
      if (found) n_match++; else n_mismatch++;
      if (i > 0) n_back_to_back++;
      search_valid <= 1;
      search_key   <= key;
      e.issued = cyc + 1;   // sampled at the coming edge
      e.found  = found;
      e.addr   = addr;
      expq.push_back(e);
      @(posedge clk);
    end
    search_valid <= 0;
    repeat (LAT + 2) @(posedge clk);
  endtask

  task automatic need(input int n, input string what);
    $display("  %-38s %0d", what, n);
    if (n == 0) fail($sformatf("mechanism never exercised: %s", what));
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    rst_n = 0; search_valid = 0; search_key = '0;
    bpt_we = 0; bpt_layer = '0; bpt_part = '0; bpt_addr = '0; bpt_wbits = '0; bpt_wli = '0;
    apt_we = 0; apt_layer = '0; apt_part = '0; apt_addr = '0; apt_wdata = '0;
    n_match = 0; n_mismatch = 0; n_bpt_miss = 0; n_kand_empty = 0;
    n_multi_in_layer = 0; n_multi_layer = 0; n_upper_layer = 0;
    n_back_to_back = 0; n_updates = 0;
    m = new();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    fill_table(60);
    load_tables();
    search_round(int'(SEARCHES));
    // table update: delete and add entries, reload, search again
    for (int i = 0; i < int'(ENTRIES) / 8; i++) begin
      int a;
      a = int'($urandom % ENTRIES);
      if (m.used[a]) m.clear_entry(a);
      else m.set_entry(a, rnd_word(), rnd_care());
      n_updates++;
    end
    load_tables();
    search_round(int'(SEARCHES));
    if (expq.size() != 0) fail($sformatf("%0d results missing", expq.size()));
    checks++;
    $display("HP-TCAM %0dx%0d L=%0d N=%0d: mechanisms exercised", ENTRIES, W, L, N);
    need(n_match, "searches that matched");
    need(n_mismatch, "searches that mismatched");
    need(n_bpt_miss, "layer stopped by 1-bit AND (BPT miss)");
    need(n_kand_empty, "layer stopped by empty K-bit AND");
    need(n_multi_in_layer, "several matches in a layer (LPE)");
    need(n_multi_layer, "matches in several layers (GPE)");
    need(n_upper_layer, "match only above layer 0");
    need(n_back_to_back, "back-to-back searches");
    need(n_updates, "table entries updated");
    done = 1;
  end
endmodule
