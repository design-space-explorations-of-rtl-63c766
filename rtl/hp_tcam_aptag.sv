// hp_tcam_aptag: APT address generator (APTAG) of one hybrid partition.
//
// Sub-words present in a partition are numbered densely in increasing order;
// that number is the row of the address position table (APT) that holds the
// sub-word's original addresses. The APTAG computes it from the BPT row just
// read: a 1's counter counts the set bits of the row from bit 0 up to and
// including the bit position indicator, and an adder adds that count to the
// row's last index LI (which is the count of set bits in all earlier rows
// minus one). The sum is the APT address APTA; it is meaningful only when the
// indicated bit is set (hit), otherwise the layer mismatches anyway.
//
// Timing: two stages. The 1's count, LI and hit are registered at the end of
// the first cycle; in the second cycle the adder drives apta combinationally,
// so that the APT's synchronous read port captures it at the end of that
// cycle. out_valid and out_hit accompany apta. Only the valid bit is reset.
//
// The 1's counter + adder structure and its two-cycle duration follow the
// architecture; where the register sits between them is this design's choice.
module hp_tcam_aptag #(
  parameter int unsigned WS = 9,
  parameter int unsigned B  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_hit,
  input  logic [(1<<B)-1:0] in_bits,
  input  logic [WS:0]       in_li,     // bit WS (sign) is not needed
  input  logic [B-1:0]      in_bpi,
  output logic              out_valid,
  output logic              out_hit,
  output logic [WS-1:0]     apta
);

  localparam int unsigned RB = 1 << B;

  // 1's counter over bits [in_bpi:0] of the row
  logic [RB-1:0] mask;
  logic [B:0]    ones;
  always_comb begin
    mask = '0;
    for (int i = 0; i < RB; i++) mask[i] = (i <= int'(in_bpi));
    ones = '0;
    for (int i = 0; i < RB; i++) ones += (B+1)'(in_bits[i] & mask[i]);
  end

  // Only the low WS bits of LI take part: the sum is needed modulo 2^WS,
  // and the sign bit of LI (set only for row 0, LI = -1) drops out.
  logic [B:0]    ones_q;
  logic [WS-1:0] li_q;
  always_ff @(posedge clk) begin
    ones_q  <= ones;
    li_q    <= in_li[WS-1:0];
    out_hit <= in_hit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  // adder: LI + count, modulo 2^WS, is the APTA
  assign apta = li_q + WS'(ones_q);

endmodule
