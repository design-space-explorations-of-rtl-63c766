// hp_tcam_and: 1-bit AND and K-bit AND of one layer.
//
// The 1-bit AND combines the N BPT hit bits: the layer can match only if
// every sub-word of the key is present in its partition. The K-bit AND
// combines bitwise the N rows read from the APTs; a set bit k means that
// original address k matches every sub-word. The 1-bit AND gates the result,
// so that rows read at meaningless APT addresses (after a BPT miss) cannot
// produce a false match.
//
// Timing: one registered stage; match_vec and out_valid appear one cycle
// after the inputs. Only out_valid is reset.
//
// The architecture stops a layer's search when the 1-bit AND is low; forcing
// the K-bit result to zero instead gives the same answer at a fixed latency
// and is this design's choice.
module hp_tcam_and #(
  parameter int unsigned N = 4,
  parameter int unsigned K = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] hits,
  input  logic [K-1:0] rows [N],
  output logic         out_valid,
  output logic [K-1:0] match_vec
);

  logic         all_hit;
  logic [K-1:0] anded;
  always_comb begin
    all_hit = &hits;
    anded   = '1;
    for (int p = 0; p < int'(N); p++) anded &= rows[p];
  end

  always_ff @(posedge clk) begin
    match_vec <= all_hit ? anded : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
