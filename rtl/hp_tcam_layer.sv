// hp_tcam_layer: one layer of the HP-TCAM.
//
// A layer covers K consecutive original addresses of the TCAM and holds N
// hybrid partitions, one per sub-word of the key. Each partition has a bit
// position table (BPT), an APT address generator (APTAG) and an address
// position table (APT). A search applies the N sub-words to the N BPTs in
// parallel; each BPT tells whether its sub-word occurs in the partition and,
// through the APTAG, which APT row lists the addresses that hold it. The 1-bit
// AND requires every sub-word to be present, the K-bit AND keeps the
// addresses common to all N APT rows, and the local priority encoder (LPE)
// returns the lowest of them as the potential match address (PMA).
//
// Timing (cycle 0 = sub-words applied with in_valid):
//   end of cycle 1  BPT rows registered
//   end of cycle 2  1's counts registered (APTAG stage 1)
//   end of cycle 3  adder output captured as APT read address, APT rows read
//   end of cycle 4  K-bit AND registered
//   cycle 4         LPE output (combinational) feeds the global encoder
// A new search can start every cycle. out_valid marks the LPE outputs.
//
// Table writes: bpt_we/apt_we write one row of the BPT/APT of partition
// bpt_part/apt_part. The contents are prepared by the host.
//
// The components and data flow follow the HP-TCAM layer architecture; the
// exact stage boundaries and the write ports are this design's choices.
module hp_tcam_layer #(
  parameter int unsigned WS = 9,
  parameter int unsigned N  = 4,
  parameter int unsigned K  = 256,
  parameter int unsigned B  = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [N*WS-1:0]       key,
  // table writes
  input  logic                  bpt_we,
  input  logic [$clog2(N)-1:0]  bpt_part,
  input  logic [WS-B-1:0]       bpt_addr,
  input  logic [(1<<B)-1:0]     bpt_wbits,
  input  logic [WS:0]           bpt_wli,
  input  logic                  apt_we,
  input  logic [$clog2(N)-1:0]  apt_part,
  input  logic [WS-1:0]         apt_addr,
  input  logic [K-1:0]          apt_wdata,
  // result
  output logic                  out_valid,
  output logic                  found,
  output logic [$clog2(K)-1:0]  pma
);

  logic [N-1:0]      bpt_valid, bpt_hit, ag_valid, ag_hit;
  logic [(1<<B)-1:0] bpt_bits [N];
  logic [WS:0]       bpt_li   [N];
  logic [B-1:0]      bpt_bpi  [N];
  logic [WS-1:0]     apta     [N];
  logic [K-1:0]      apt_row  [N];

  // stage 3 register: hit bits and valid alongside the APT read
  logic [N-1:0] hit_q3;
  logic         valid_q3;

  for (genvar p = 0; p < N; p++) begin : g_part
    hp_tcam_bpt #(.WS(WS), .B(B)) u_bpt (
      .clk, .rst_n,
      .rd_en    (in_valid),
      .sub_word (key[p*WS +: WS]),
      .rd_valid (bpt_valid[p]),
      .rd_hit   (bpt_hit[p]),
      .rd_bits  (bpt_bits[p]),
      .rd_li    (bpt_li[p]),
      .rd_bpi   (bpt_bpi[p]),
      .we       (bpt_we && bpt_part == ($clog2(N))'(p)),
      .waddr    (bpt_addr),
      .wbits    (bpt_wbits),
      .wli      (bpt_wli)
    );

    hp_tcam_aptag #(.WS(WS), .B(B)) u_aptag (
      .clk, .rst_n,
      .in_valid  (bpt_valid[p]),
      .in_hit    (bpt_hit[p]),
      .in_bits   (bpt_bits[p]),
      .in_li     (bpt_li[p]),
      .in_bpi    (bpt_bpi[p]),
      .out_valid (ag_valid[p]),
      .out_hit   (ag_hit[p]),
      .apta      (apta[p])
    );

    hp_tcam_apt #(.WS(WS), .K(K)) u_apt (
      .clk,
      .rd_en   (ag_valid[p]),
      .raddr   (apta[p]),
      .rd_data (apt_row[p]),
      .we      (apt_we && apt_part == ($clog2(N))'(p)),
      .waddr   (apt_addr),
      .wdata   (apt_wdata)
    );
  end

  always_ff @(posedge clk) begin
    hit_q3 <= ag_hit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) valid_q3 <= 1'b0;
    else        valid_q3 <= ag_valid[0];
  end

  logic [K-1:0] match_vec;

  hp_tcam_and #(.N(N), .K(K)) u_and (
    .clk, .rst_n,
    .in_valid  (valid_q3),
    .hits      (hit_q3),
    .rows      (apt_row),
    .out_valid (out_valid),
    .match_vec (match_vec)
  );

  hp_tcam_lpe #(.K(K)) u_lpe (
    .req   (match_vec),
    .found (found),
    .pma   (pma)
  );

endmodule
