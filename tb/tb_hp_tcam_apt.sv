// tb_hp_tcam_apt: self-checking test of the address position table.
// Writes random K-bit rows to every address, reads random addresses back
// and checks the data one cycle later; also checks that a read in the cycle
// of a write to the same row returns the old row and that rd_en low holds
// the output.
module tb_hp_tcam_apt;
  localparam int unsigned WS = 9, K = 256, ROWS = 1 << WS;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rd_en = 0, we = 0;
  logic [WS-1:0] raddr = '0, waddr = '0;
  logic [K-1:0] rd_data, wdata = '0;

  hp_tcam_apt #(.WS(WS), .K(K)) dut (.*);

  int checks = 0, failures = 0;
  logic [K-1:0] model [ROWS];

  function automatic logic [K-1:0] rnd();
    for (int i = 0; i < int'(K) / 32; i++) rnd[i*32 +: 32] = $urandom;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WS-1:0] a;
    logic [K-1:0] held;
    for (int r = 0; r < int'(ROWS); r++) begin
      model[r] = rnd();
      we <= 1; waddr <= WS'(r); wdata <= model[r];
      @(posedge clk);
    end
    we <= 0;
    for (int i = 0; i < 500; i++) begin
      a = WS'($urandom);
      rd_en <= 1; raddr <= a;
      @(posedge clk);
      rd_en <= 0;
      #1; checks++;
      if (rd_data !== model[a]) begin failures++; $display("FAIL read %0d", a); end
    end
    // read-during-write to the same row returns the old data
    a = WS'(17);
    rd_en <= 1; raddr <= a; we <= 1; waddr <= a; wdata <= ~model[a];
    @(posedge clk);
    rd_en <= 0; we <= 0;
    #1; checks++;
    if (rd_data !== model[a]) begin failures++; $display("FAIL read-during-write"); end
    model[a] = ~model[a];
    held = rd_data;
    @(posedge clk); #1; checks++;
    if (rd_data !== held) begin failures++; $display("FAIL hold"); end
    rd_en <= 1; raddr <= a;
    @(posedge clk); rd_en <= 0; #1; checks++;
    if (rd_data !== model[a]) begin failures++; $display("FAIL new data"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
