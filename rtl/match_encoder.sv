// match_encoder: match vector to address.
//
// Reduces the per-entry match lines of the CAM to the result a search
// returns: hit_o when any entry matched, addr_o the lowest matching address
// (0 when nothing matched) and multi_o when two or more entries matched.
// Combinational; written as a scan over the entries, which a synthesis tool
// is free to restructure into a priority tree. A CAM sends one matching
// address to its output; the lowest-address priority and the multiple-match
// flag are this design's choices.
module match_encoder #(
  parameter int unsigned DEPTH = pbcam_pkg::DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic [DEPTH-1:0] match_i,
  output logic             hit_o,
  output logic [AW-1:0]    addr_o,
  output logic             multi_o
);

  always_comb begin
    hit_o   = 1'b0;
    multi_o = 1'b0;
    addr_o  = '0;
    // Scan from the top so the last assignment is the lowest address.
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (match_i[i]) begin
        multi_o = hit_o;
        hit_o   = 1'b1;
        addr_o  = AW'(i);
      end
    end
  end

endmodule
