// tb_hp_tcam_lpe: self-checking test of the local priority encoder.
// Applies an empty vector, every one-hot vector and random sparse vectors and
// checks that the lowest set bit is reported.
module tb_hp_tcam_lpe;
  localparam int unsigned K = 256;
  logic [K-1:0] req;
  logic found;
  logic [$clog2(K)-1:0] pma;

  hp_tcam_lpe #(.K(K)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check_one(input logic [K-1:0] r);
    int lo;
    lo = -1;
    for (int i = int'(K) - 1; i >= 0; i--) if (r[i]) lo = i;
    req = r; #1;
    checks++;
    if (found !== (lo >= 0) || (lo >= 0 && int'(pma) != lo)) begin
      failures++; $display("FAIL lo=%0d pma=%0d found=%b", lo, pma, found);
    end
  endtask

  initial begin
    #100000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0] r;
    check_one('0);
    for (int i = 0; i < int'(K); i++) check_one(K'(1) << i);
    for (int n = 0; n < 500; n++) begin
      r = '0;
      for (int i = 0; i < int'(K); i++) r[i] = ($urandom % 40) == 0;
      check_one(r);
    end
    check_one('1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
