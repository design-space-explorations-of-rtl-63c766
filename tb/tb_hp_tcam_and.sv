// tb_hp_tcam_and: self-checking test of the 1-bit and K-bit AND.
// Drives random hit bits (biased towards all-ones) and random APT rows and
// checks one cycle later that the result is the bitwise AND of the rows when
// every hit bit is set and zero otherwise.
module tb_hp_tcam_and;
  localparam int unsigned N = 4, K = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  logic [N-1:0] hits = '0;
  logic [K-1:0] rows [N];
  logic out_valid;
  logic [K-1:0] match_vec;

  hp_tcam_and #(.N(N), .K(K)) dut (.*);

  int checks = 0, failures = 0, gated = 0;

  function automatic logic [K-1:0] rnd_dense();
    // mostly ones so that the AND of four rows is not always empty
    for (int i = 0; i < int'(K); i++) rnd_dense[i] = ($urandom % 8) != 0;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0] exp;
    for (int p = 0; p < int'(N); p++) rows[p] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 500; i++) begin
      logic [N-1:0] h;
      h = ($urandom % 2) ? '1 : N'($urandom);
      exp = '1;
      for (int p = 0; p < int'(N); p++) begin
        rows[p] = rnd_dense();
        exp &= rows[p];
      end
      if (h != '1) begin exp = '0; gated++; end
      in_valid <= 1; hits <= h;
      @(posedge clk);
      #1; checks++;
      if (!out_valid || match_vec !== exp) begin
        failures++; $display("FAIL i=%0d hits=%b", i, h);
      end
    end
    in_valid <= 0;
    @(posedge clk); #1; checks++;
    if (out_valid) begin failures++; $display("FAIL valid stuck"); end
    if (gated == 0) begin failures++; $display("FAIL no gated case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
