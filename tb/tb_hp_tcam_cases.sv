// tb_hp_tcam_cases: the four partitionings of the 512 x 36 HP-TCAM that
// were evaluated: Case 1 (L = 2, N = 4, the default), Case 2 (L = 4, N = 4),
// Case 3 (L = 2, N = 3) and Case 4 (L = 4, N = 3). Each instance is loaded
// with its own random ternary table and checked end to end, including the
// five-cycle latency and one search per cycle.
module tb_hp_tcam_cases;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [3:0] done;
  int chk [4], fl [4];

  hp_tcam_case #(.L(2), .N(4)) c1 (.clk, .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  hp_tcam_case #(.L(4), .N(4)) c2 (.clk, .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  hp_tcam_case #(.L(2), .N(3)) c3 (.clk, .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  hp_tcam_case #(.L(4), .N(3)) c4 (.clk, .done(done[3]), .checks(chk[3]), .failures(fl[3]));

  function automatic int sum(input int v [4]);
    int s;
    s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sum(chk), sum(fl) + 1);
    $finish;
  end

  initial begin
    wait (&done);
    #1;
    for (int i = 0; i < 4; i++)
      $display("Case %0d: checks=%0d failures=%0d", i + 1, chk[i], fl[i]);
    $display("TB_RESULT checks=%0d failures=%0d", sum(chk), sum(fl));
    $finish;
  end
endmodule
