// hp_tcam: hybrid-partitioned, SRAM-based ternary CAM (HP-TCAM).
//
// Emulates a TCAM of ENTRIES words of W bits, whose bits may be 0, 1 or
// "don't care", with plain synchronous RAM. The search key is cut into N
// sub-words of W/N bits; the address range is cut into L layers of
// K = ENTRIES/L addresses. All layers search the key in parallel (see
// hp_tcam_layer) and the global priority encoder returns the lowest matching
// address, as a TCAM with lowest-address priority would.
//
// Interface: a search is started by search_valid with search_key; five
// cycles later result_valid is high with match and match_addr. One search
// can start every cycle. The tables are loaded through two row-write ports,
// one for bit position tables (BPT) and one for address position tables
// (APT), each selecting a layer and a vertical partition. Converting ternary
// entries into table rows is left to the host (see README). A write takes
// effect for searches started at least one cycle after it; searches in flight
// may see old or new rows. rst_n (synchronous, active low) clears only the
// pipeline valid bits.
//
// Defaults: 512 x 36 with L = 2 layers and N = 4 partitions of 9 bits, the
// configuration with the lowest energy per bit per search in the original
// evaluation; B = 4 (16 presence bits per BPT row) is this design's choice.
// The partitioning, tables and search flow follow the HP-TCAM architecture;
// lowest-address priority, the key bit order, the row-write ports and the
// five-stage split are this design's choices.
module hp_tcam #(
  parameter int unsigned ENTRIES = hp_tcam_pkg::ENTRIES_DEF,
  parameter int unsigned W       = hp_tcam_pkg::W_DEF,
  parameter int unsigned L       = hp_tcam_pkg::L_DEF,
  parameter int unsigned N       = hp_tcam_pkg::N_DEF,
  parameter int unsigned B       = hp_tcam_pkg::B_DEF,
  localparam int unsigned WS     = W / N,
  localparam int unsigned K      = ENTRIES / L
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // search
  input  logic                       search_valid,
  input  logic [W-1:0]               search_key,
  // BPT row write
  input  logic                       bpt_we,
  input  logic [$clog2(L)-1:0]       bpt_layer,
  input  logic [$clog2(N)-1:0]       bpt_part,
  input  logic [WS-B-1:0]            bpt_addr,
  input  logic [(1<<B)-1:0]          bpt_wbits,
  input  logic [WS:0]                bpt_wli,
  // APT row write
  input  logic                       apt_we,
  input  logic [$clog2(L)-1:0]       apt_layer,
  input  logic [$clog2(N)-1:0]       apt_part,
  input  logic [WS-1:0]              apt_addr,
  input  logic [K-1:0]               apt_wdata,
  // result
  output logic                       result_valid,
  output logic                       match,
  output logic [$clog2(ENTRIES)-1:0] match_addr
);

  // sizes the partitioning needs
  if (W % N != 0) begin : g_chk_w
    $error("W must be a multiple of N");
  end
  if (ENTRIES % L != 0) begin : g_chk_entries
    $error("ENTRIES must be a multiple of L");
  end
  if (B < 1 || B >= WS) begin : g_chk_b
    $error("B must lie between 1 and W/N - 1");
  end

  logic [L-1:0]         lay_valid, lay_found;
  logic [$clog2(K)-1:0] lay_pma [L];

  for (genvar l = 0; l < L; l++) begin : g_layer
    hp_tcam_layer #(.WS(WS), .N(N), .K(K), .B(B)) u_layer (
      .clk, .rst_n,
      .in_valid  (search_valid),
      .key       (search_key[N*WS-1:0]),
      .bpt_we    (bpt_we && bpt_layer == ($clog2(L))'(l)),
      .bpt_part, .bpt_addr, .bpt_wbits, .bpt_wli,
      .apt_we    (apt_we && apt_layer == ($clog2(L))'(l)),
      .apt_part, .apt_addr, .apt_wdata,
      .out_valid (lay_valid[l]),
      .found     (lay_found[l]),
      .pma       (lay_pma[l])
    );
  end

  hp_tcam_gpe #(.L(L), .K(K)) u_gpe (
    .clk, .rst_n,
    .in_valid   (&lay_valid),
    .found      (lay_found),
    .pma        (lay_pma),
    .out_valid  (result_valid),
    .match      (match),
    .match_addr (match_addr)
  );

  // Fixed latency, one search per cycle: every accepted search produces a
  // result exactly LATENCY cycles later.
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
    search_valid |-> ##(hp_tcam_pkg::LATENCY) result_valid);

endmodule
