// hp_tcam_lpe: local priority encoder of one layer.
//
// Several original addresses of a layer may match at once. The encoder
// returns the lowest set bit of req as the potential match address (PMA) and
// raises found when any bit is set; lower addresses have higher priority, as
// in a conventional TCAM. Purely combinational; its cycle is shared with the
// global priority encoder, whose output register closes the stage.
// The architecture names the encoder and its role; lowest-address priority
// and the plain linear form are this design's choices.
module hp_tcam_lpe #(
  parameter int unsigned K = 256
) (
  input  logic [K-1:0]         req,
  output logic                 found,
  output logic [$clog2(K)-1:0] pma
);

  always_comb begin
    found = 1'b0;
    pma   = '0;
    for (int i = int'(K) - 1; i >= 0; i--) begin
      if (req[i]) begin
        found = 1'b1;
        pma   = ($clog2(K))'(i);
      end
    end
  end

endmodule
