// hp_tcam_gpe: global priority encoder.
//
// Receives the potential match address of each of the L layers and selects
// the match address (MA): the lowest-numbered layer that found a match wins,
// since layer l holds original addresses l*K .. l*K+K-1 and lower addresses
// have priority. MA = l*K + PMA_l. When no layer matched, match is low and
// match_addr is 0.
//
// Timing: combinational selection followed by the output register, so the
// result appears one cycle after the layer outputs. Only out_valid is reset.
// The encoder's role follows the architecture; the priority order and the
// address arithmetic are this design's choices.
module hp_tcam_gpe #(
  parameter int unsigned L = 2,
  parameter int unsigned K = 256
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [L-1:0]           found,
  input  logic [$clog2(K)-1:0]   pma [L],
  output logic                   out_valid,
  output logic                   match,
  output logic [$clog2(L*K)-1:0] match_addr
);

  localparam int unsigned AW = $clog2(L*K);

  logic          any;
  logic [AW-1:0] ma;
  always_comb begin
    any = 1'b0;
    ma  = '0;
    for (int l = int'(L) - 1; l >= 0; l--) begin
      if (found[l]) begin
        any = 1'b1;
        ma  = AW'(l) * AW'(K) + AW'(pma[l]);
      end
    end
  end

  always_ff @(posedge clk) begin
    match      <= any;
    match_addr <= ma;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
