// tb_hp_tcam_gpe: self-checking test of the global priority encoder.
// Drives random found flags and PMAs of four layers and checks, one cycle
// later, that the lowest-numbered layer with a match gives MA = l*K + PMA.
module tb_hp_tcam_gpe;
  localparam int unsigned L = 4, K = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  logic [L-1:0] found = '0;
  logic [$clog2(K)-1:0] pma [L];
  logic out_valid, match;
  logic [$clog2(L*K)-1:0] match_addr;

  hp_tcam_gpe #(.L(L), .K(K)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < int'(L); l++) pma[l] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 500; i++) begin
      logic [L-1:0] f; int exp_l;
      f = L'($urandom);
      exp_l = -1;
      for (int l = int'(L) - 1; l >= 0; l--) begin
        pma[l] = ($clog2(K))'($urandom);
        if (f[l]) exp_l = l;
      end
      in_valid <= 1; found <= f;
      @(posedge clk);
      #1; checks++;
      if (!out_valid || match !== (exp_l >= 0) ||
          (exp_l >= 0 && int'(match_addr) != exp_l * int'(K) + int'(pma[exp_l]))) begin
        failures++; $display("FAIL f=%b ma=%0d", f, match_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
