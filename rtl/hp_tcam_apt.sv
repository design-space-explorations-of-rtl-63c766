// hp_tcam_apt: address position table (APT) of one hybrid partition.
//
// 2^WS rows of K bits. Row r belongs to the r-th present sub-word of the
// partition (numbered by the APTAG); bit k of the row is set when original
// address k of the layer stores a ternary sub-word that matches this binary
// sub-word. A synchronous-read RAM with one write port: rd_data is the row
// addressed in the previous cycle when rd_en was high. Reading and writing
// the same row in one cycle returns the old row. Storage is not reset.
// The 2^w x K organisation follows the architecture; the write port is this
// design's choice.
module hp_tcam_apt #(
  parameter int unsigned WS = 9,
  parameter int unsigned K  = 256
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [WS-1:0] raddr,
  output logic [K-1:0]  rd_data,
  input  logic          we,
  input  logic [WS-1:0] waddr,
  input  logic [K-1:0]  wdata
);

  logic [K-1:0] mem [1 << WS];

  always_ff @(posedge clk) begin
    if (we)    mem[waddr] <= wdata;
    if (rd_en) rd_data <= mem[raddr];
  end

endmodule
