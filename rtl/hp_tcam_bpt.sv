// hp_tcam_bpt: bit position table (BPT) of one hybrid partition.
//
// The BPT records which of the 2^WS possible binary sub-words occur in its
// partition. Its 2^WS presence bits are stored as 2^(WS-B) rows of 2^B bits;
// each row also holds a last index LI (WS+1 bits, two's complement), the
// number of presence bits set in all earlier rows minus one, so row 0 holds
// -1. A sub-word is split into its WS-B upper bits, the row address BPTA, and
// its B lower bits, the bit position indicator BPI.
//
// Interface and timing: a lookup presented with rd_en is read synchronously;
// one cycle later rd_valid, rd_hit (the bit selected by BPI), the whole row
// rd_bits, its rd_li and the delayed rd_bpi are available. The write port
// stores a full row (bits and LI) in one cycle; the table contents are
// computed by the host that loads the TCAM. Reading and writing the same row
// in one cycle returns the old row. Only rd_valid is reset; the storage is
// not, as in a block RAM.
//
// The row layout, the BPTA/BPI split and the LI rule are those of the HP-TCAM
// architecture; the row width 2^B (B = 4 by default) and the write port are
// this design's choices.
module hp_tcam_bpt #(
  parameter int unsigned WS = 9,   // sub-word width w
  parameter int unsigned B  = 4    // log2 of presence bits per row
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // lookup
  input  logic                 rd_en,
  input  logic [WS-1:0]        sub_word,
  output logic                 rd_valid,
  output logic                 rd_hit,
  output logic [(1<<B)-1:0]    rd_bits,
  output logic [WS:0]          rd_li,
  output logic [B-1:0]         rd_bpi,
  // row write
  input  logic                 we,
  input  logic [WS-B-1:0]      waddr,
  input  logic [(1<<B)-1:0]    wbits,
  input  logic [WS:0]          wli
);

  localparam int unsigned ROWS = 1 << (WS - B);

  typedef struct packed {
    logic [WS:0]       li;
    logic [(1<<B)-1:0] bits;
  } bpt_row_t;

  bpt_row_t mem [ROWS];
  bpt_row_t row_q;

  logic [WS-B-1:0] bpta;
  logic [B-1:0]    bpi;
  assign bpta = sub_word[WS-1:B];
  assign bpi  = sub_word[B-1:0];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= '{li: wli, bits: wbits};
    if (rd_en) begin
      row_q  <= mem[bpta];
      rd_bpi <= bpi;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= rd_en;
  end

  assign rd_bits = row_q.bits;
  assign rd_li   = row_q.li;
  assign rd_hit  = row_q.bits[rd_bpi];

endmodule
