// data_memory: CAM word store with enable-gated second-part comparators.
//
// Holds the DEPTH data words. Word i is compared with the search word only
// when cmp_en_i[i] is set, i.e. when its parameter matched in the first part;
// a disabled comparator reports no match (in silicon it would not switch).
// cmp_count_o counts the enabled comparators, which is the number of
// second-part comparisons the search costs, the figure the power of the
// design is judged by.
//
// Interface: one write per clock (we_i, waddr_i, wdata_i) at the rising edge.
// Compare and count are combinational (sdata_i, cmp_en_i -> match_o,
// cmp_count_o). The words are not reset: a word is never compared before
// its parameter has been written, and the parameter memory starts empty.
// The gating of the word comparators follows the PB-CAM organisation;
// the count output and the write port are this design's additions.
module data_memory #(
  parameter int unsigned DATA_W = pbcam_pkg::DATA_W,
  parameter int unsigned DEPTH  = pbcam_pkg::DEPTH,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk_i,
  input  logic              we_i,
  input  logic [AW-1:0]     waddr_i,
  input  logic [DATA_W-1:0] wdata_i,
  input  logic [DATA_W-1:0] sdata_i,
  input  logic [DEPTH-1:0]  cmp_en_i,
  output logic [DEPTH-1:0]  match_o,
  output logic [AW:0]       cmp_count_o
);

  logic [DATA_W-1:0] mem_q [DEPTH];

  always_ff @(posedge clk_i) begin
    if (we_i) mem_q[waddr_i] <= wdata_i;
  end

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      match_o[i] = cmp_en_i[i] && (mem_q[i] == sdata_i);
    end
  end

  always_comb begin
    cmp_count_o = '0;
    for (int i = 0; i < DEPTH; i++) begin
      cmp_count_o = cmp_count_o + (AW+1)'(cmp_en_i[i]);
    end
  end

endmodule
