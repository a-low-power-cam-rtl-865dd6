// param_memory: parameter memory with its first-part comparators.
//
// Holds one PARAM_W-bit parameter per CAM entry and compares the parameter
// of the search word against all of them in parallel. phit_o[i] is set when
// entry i holds the same parameter; only those entries have their data
// compared in the second part of the search. The all-ones code marks an
// empty entry: reset writes it everywhere, and since the extractor never
// produces it a search parameter never matches an empty entry.
//
// Interface: one write per clock (we_i, waddr_i, wparam_i), taking effect at
// the rising edge; writing the all-ones code empties the entry. The compare
// is combinational on the stored contents (sparam_i -> phit_o).
// The split into a parameter store with parallel comparators follows the
// PB-CAM organisation; the reset-to-empty and the write port are this
// design's choices.
module param_memory #(
  parameter int unsigned PARAM_W = pbcam_pkg::PARAM_W,
  parameter int unsigned DEPTH   = pbcam_pkg::DEPTH,
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  input  logic               we_i,
  input  logic [AW-1:0]      waddr_i,
  input  logic [PARAM_W-1:0] wparam_i,
  input  logic [PARAM_W-1:0] sparam_i,
  output logic [DEPTH-1:0]   phit_o
);

  logic [PARAM_W-1:0] mem_q [DEPTH];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= '1;
    end else if (we_i) begin
      mem_q[waddr_i] <= wparam_i;
    end
  end

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      phit_o[i] = (mem_q[i] == sparam_i) && (mem_q[i] != '1);
    end
  end

endmodule
