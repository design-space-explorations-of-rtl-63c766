// tb_hp_tcam_aptag: self-checking test of the APT address generator.
// Drives random BPT rows, last indices and bit position indicators every
// cycle and checks, right after the next clock edge (stage 1 is registered,
// the adder of stage 2 is combinational and feeds the APT's read register),
// that apta = LI + number of ones in bits [BPI:0],
// modulo 2^WS, and that hit and valid are delayed alongside.
module tb_hp_tcam_aptag;
  localparam int unsigned WS = 9, B = 4, RB = 1 << B;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_hit = 0;
  logic [RB-1:0] in_bits = '0;
  logic [WS:0] in_li = '0;
  logic [B-1:0] in_bpi = '0;
  logic out_valid, out_hit;
  logic [WS-1:0] apta;

  hp_tcam_aptag #(.WS(WS), .B(B)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, queued per cycle
  logic [WS-1:0] exp_a [$];
  logic          exp_h [$], exp_v [$];

  initial begin
    int cnt;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 1000; i++) begin
      logic [RB-1:0] bits; logic [WS:0] li; logic [B-1:0] bpi; logic h, v;
      bits = RB'($urandom); li = (WS+1)'($urandom); bpi = B'($urandom);
      h = 1'($urandom); v = (i % 7) != 3;
      if (i == 5) begin bits = '1; bpi = '1; li = '1; end      // -1 + 16
      if (i == 6) begin bits = 16'h0001; bpi = '0; li = '1; end // first sub-word -> 0
      cnt = 0;
      for (int k = 0; k <= int'(bpi); k++) cnt += int'(bits[k]);
      in_valid <= v; in_hit <= h; in_bits <= bits; in_li <= li; in_bpi <= bpi;
      exp_a.push_back(WS'(int'(li) + cnt)); exp_h.push_back(h); exp_v.push_back(v);
      @(posedge clk);
      begin
        #1;
        checks++;
        if (out_valid !== exp_v[0] || (exp_v[0] && (apta !== exp_a[0] || out_hit !== exp_h[0]))) begin
          failures++;
          $display("FAIL i=%0d apta=%0d exp=%0d", i, apta, exp_a[0]);
        end
        void'(exp_a.pop_front()); void'(exp_h.pop_front()); void'(exp_v.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
