// hp_tcam_case: one HP-TCAM of a chosen partitioning (L layers, N
// sub-words) together with its driver/checker; used to run several
// configurations of the 512 x 36 table side by side.
module hp_tcam_case #(
  parameter int unsigned L = 2,
  parameter int unsigned N = 4,
  parameter int unsigned SEARCHES = 300
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned ENTRIES = hp_tcam_pkg::ENTRIES_DEF;
  localparam int unsigned W  = hp_tcam_pkg::W_DEF;
  localparam int unsigned B  = hp_tcam_pkg::B_DEF;
  localparam int unsigned WS = W / N;
  localparam int unsigned K  = ENTRIES / L;

  logic rst_n, search_valid, bpt_we, apt_we, result_valid, match;
  logic [W-1:0] search_key;
  logic [$clog2(L)-1:0] bpt_layer, apt_layer;
  logic [$clog2(N)-1:0] bpt_part, apt_part;
  logic [WS-B-1:0] bpt_addr;
  logic [(1<<B)-1:0] bpt_wbits;
  logic [WS:0] bpt_wli;
  logic [WS-1:0] apt_addr;
  logic [K-1:0] apt_wdata;
  logic [$clog2(ENTRIES)-1:0] match_addr;

  hp_tcam #(.L(L), .N(N)) dut (.*);
  hp_tcam_driver #(.L(L), .N(N), .SEARCHES(SEARCHES)) drv (.*);
endmodule
