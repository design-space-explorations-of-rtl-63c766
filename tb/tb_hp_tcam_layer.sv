// tb_hp_tcam_layer: self-checking test of one HP-TCAM layer
// (K = 256 addresses, N = 4 sub-words of 9 bits). Loads the BPTs and APTs
// from a random ternary table converted by the reference model, streams
// searches one per cycle and checks found/PMA against a direct ternary
// search four cycles after each search (the layer's share of the pipeline).
module tb_hp_tcam_layer;
  import hp_tcam_ref_pkg::*;
  localparam int unsigned WS = 9, N = 4, K = 256, B = 4;
  localparam int unsigned W = WS * N, ROWS = 1 << (WS - B), SUBS = 1 << WS;
  localparam int unsigned LAT = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  logic [W-1:0] key = '0;
  logic bpt_we = 0, apt_we = 0;
  logic [$clog2(N)-1:0] bpt_part = '0, apt_part = '0;
  logic [WS-B-1:0] bpt_addr = '0;
  logic [(1<<B)-1:0] bpt_wbits = '0;
  logic [WS:0] bpt_wli = '0;
  logic [WS-1:0] apt_addr = '0;
  logic [K-1:0] apt_wdata = '0;
  logic out_valid, found;
  logic [$clog2(K)-1:0] pma;

  hp_tcam_layer #(.WS(WS), .N(N), .K(K), .B(B)) dut (.*);

  typedef hp_tcam_ref #(.W(W), .ENTRIES(K), .L(1), .N(N), .B(B)) ref_t;
  ref_t m;

  int checks = 0, failures = 0, n_found = 0, n_miss = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { longint issued; bit f; int a; } exp_t;
  exp_t expq [$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL extra result"); end
      else begin
        e = expq.pop_front();
        if (cyc - e.issued != longint'(LAT) || found !== e.f || (e.f && int'(pma) != e.a)) begin
          failures++;
          $display("FAIL found=%b pma=%0d exp %b/%0d lat=%0d", found, pma, e.f, e.a, cyc - e.issued);
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = new();
    for (int a = 0; a < int'(K); a++) begin
      logic [W-1:0] v, c;
      for (int i = 0; i < int'(W); i++) begin
        v[i] = 1'($urandom); c[i] = ($urandom % 5) != 0;
      end
      if (($urandom % 3) != 0) m.set_entry(a, v, c);
    end
    m.build();
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int p = 0; p < int'(N); p++)
      for (int v = 0; v < int'(SUBS); v++) begin
        apt_we <= 1; apt_part <= ($clog2(N))'(p); apt_addr <= WS'(v);
        apt_wdata <= m.apt[0][p][v];
        bpt_we <= v < int'(ROWS); bpt_part <= ($clog2(N))'(p); bpt_addr <= (WS-B)'(v);
        if (v < int'(ROWS)) begin
          bpt_wbits <= m.bpt_bits[0][p][v]; bpt_wli <= m.bpt_li[0][p][v];
        end
        @(posedge clk);
      end
    apt_we <= 0; bpt_we <= 0;
    @(posedge clk);
    for (int i = 0; i < 1000; i++) begin
      logic [W-1:0] k;
      exp_t e;
      int a;
      for (int b = 0; b < int'(W); b++) k[b] = 1'($urandom);
      if (i % 2 == 0) begin
        a = int'($urandom % K);
        if (m.used[a]) k = m.key_for(a);
      end
      m.search(k, e.f, e.a);
      if (e.f) n_found++; else n_miss++;
      e.issued = cyc + 1;
      expq.push_back(e);
      in_valid <= 1; key <= k;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (expq.size() != 0 || n_found == 0 || n_miss == 0) begin
      failures++; $display("FAIL pending=%0d found=%0d miss=%0d", expq.size(), n_found, n_miss);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
