// tb_hp_tcam_bpt: self-checking test of the bit position table.
// Fills every row with random presence bits and last indices, then issues
// random lookups and compares the row, LI, BPI and the selected hit bit,
// one cycle after each lookup, with a copy of the table kept here.
module tb_hp_tcam_bpt;
  localparam int unsigned WS = 9, B = 4, RB = 1 << B, ROWS = 1 << (WS - B);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rd_en = 0, we = 0;
  logic [WS-1:0] sub_word = '0;
  logic rd_valid, rd_hit;
  logic [RB-1:0] rd_bits, wbits = '0;
  logic [WS:0] rd_li, wli = '0;
  logic [B-1:0] rd_bpi;
  logic [WS-B-1:0] waddr = '0;

  hp_tcam_bpt #(.WS(WS), .B(B)) dut (.*);

  int checks = 0, failures = 0;
  logic [RB-1:0] mbits [ROWS];
  logic [WS:0]   mli   [ROWS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WS-1:0] sw;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < int'(ROWS); r++) begin
      mbits[r] = RB'($urandom); mli[r] = (WS+1)'($urandom);
      we <= 1; waddr <= (WS-B)'(r); wbits <= mbits[r]; wli <= mli[r];
      @(posedge clk);
    end
    we <= 0;
    @(posedge clk);
    check(!rd_valid, "valid low without lookup");
    for (int i = 0; i < 300; i++) begin
      sw = WS'($urandom);
      rd_en <= 1; sub_word <= sw;
      @(posedge clk);
      rd_en <= 0;
      #1;
      check(rd_valid, "rd_valid");
      check(rd_bits == mbits[sw[WS-1:B]], $sformatf("bits sw=%0d", sw));
      check(rd_li == mli[sw[WS-1:B]], "li");
      check(rd_bpi == sw[B-1:0], "bpi");
      check(rd_hit == mbits[sw[WS-1:B]][sw[B-1:0]], "hit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
