// tb_hp_tcam: end-to-end test of the HP-TCAM at its default size
// (512 x 36, L = 2 layers, N = 4 partitions). The DUT is instantiated
// without parameter overrides; hp_tcam_driver loads the tables, streams
// searches one per cycle, checks every match address and the five-cycle
// latency against a direct ternary search, rewrites the table and repeats.
module tb_hp_tcam;
  localparam int unsigned ENTRIES = hp_tcam_pkg::ENTRIES_DEF;
  localparam int unsigned W  = hp_tcam_pkg::W_DEF;
  localparam int unsigned L  = hp_tcam_pkg::L_DEF;
  localparam int unsigned N  = hp_tcam_pkg::N_DEF;
  localparam int unsigned B  = hp_tcam_pkg::B_DEF;
  localparam int unsigned WS = W / N;
  localparam int unsigned K  = ENTRIES / L;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, search_valid, bpt_we, apt_we, result_valid, match, done;
  logic [W-1:0] search_key;
  logic [$clog2(L)-1:0] bpt_layer, apt_layer;
  logic [$clog2(N)-1:0] bpt_part, apt_part;
  logic [WS-B-1:0] bpt_addr;
  logic [(1<<B)-1:0] bpt_wbits;
  logic [WS:0] bpt_wli;
  logic [WS-1:0] apt_addr;
  logic [K-1:0] apt_wdata;
  logic [$clog2(ENTRIES)-1:0] match_addr;
  int checks, failures;

  hp_tcam dut (.*);
  hp_tcam_driver drv (.*);

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
