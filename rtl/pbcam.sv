// pbcam: precomputation-based CAM with a Block-XOR parameter extractor.
//
// A conventional CAM compares the search word with every stored word. This
// CAM stores, beside each word, a short parameter derived from it, and
// searches in two parts:
//   1. the Block-XOR extractor computes the parameter of the search word and
//      the parameter memory compares it with all stored parameters;
//   2. only the words whose parameter matched are compared in full by the
//      data memory, and the match encoder returns the lowest matching address.
// Because the Block-XOR parameter spreads random words evenly over its 15
// usable codes, the second part compares at most 1152 of the 2^14 words for
// 14-bit data, instead of up to 3432 with a ones-count parameter.
//
// Interface and timing:
//   write  : wr_en_i with wr_addr_i/wr_data_i stores the word and its
//            parameter at the rising edge; wr_valid_i = 0 instead empties the
//            entry (its parameter becomes the reserved all-ones code).
//   search : srch_en_i with srch_data_i. Both parts run in the same clock and
//            the result is registered: rslt_valid_o rises one clock later with
//            rslt_hit_o, rslt_addr_o, rslt_multi_o, the search parameter
//            rslt_param_o and rslt_cmp_count_o, the number of words the
//            second part compared. One search can start every clock.
//   A search issued in the same clock as a write sees the contents from
//   before the write. Reset (rst_ni low, asynchronous) empties every entry.
// The two-part search and the extractor follow the published PB-CAM with the
// Block-XOR method; the single-clock search, the write/empty port, the
// lowest-address priority and the comparison count are this design's choices.
module pbcam #(
  parameter int unsigned DATA_W  = pbcam_pkg::DATA_W,
  parameter int unsigned PARAM_W = pbcam_pkg::PARAM_W,
  parameter int unsigned DEPTH   = pbcam_pkg::DEPTH,
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  // write port
  input  logic               wr_en_i,
  input  logic               wr_valid_i,
  input  logic [AW-1:0]      wr_addr_i,
  input  logic [DATA_W-1:0]  wr_data_i,
  // search port
  input  logic               srch_en_i,
  input  logic [DATA_W-1:0]  srch_data_i,
  // search result, one clock after srch_en_i
  output logic               rslt_valid_o,
  output logic               rslt_hit_o,
  output logic [AW-1:0]      rslt_addr_o,
  output logic               rslt_multi_o,
  output logic [PARAM_W-1:0] rslt_param_o,
  output logic [AW:0]        rslt_cmp_count_o
);

  logic [PARAM_W-1:0] wr_param, wr_param_stored, srch_param;
  logic [DEPTH-1:0]   phit, match;
  logic [AW:0]        cmp_count;
  logic               hit, multi;
  logic [AW-1:0]      addr;

  // Extractors for the written word and for the search word.
  block_xor_extractor #(.DATA_W(DATA_W), .PARAM_W(PARAM_W)) u_wr_extract (
    .data_i (wr_data_i),
    .param_o(wr_param)
  );

  block_xor_extractor #(.DATA_W(DATA_W), .PARAM_W(PARAM_W)) u_srch_extract (
    .data_i (srch_data_i),
    .param_o(srch_param)
  );

  assign wr_param_stored = wr_valid_i ? wr_param : '1;

  // First part: parameter compare.
  param_memory #(.PARAM_W(PARAM_W), .DEPTH(DEPTH)) u_param_mem (
    .clk_i   (clk_i),
    .rst_ni  (rst_ni),
    .we_i    (wr_en_i),
    .waddr_i (wr_addr_i),
    .wparam_i(wr_param_stored),
    .sparam_i(srch_param),
    .phit_o  (phit)
  );

  // Second part: data compare, gated by the parameter hits.
  data_memory #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_data_mem (
    .clk_i      (clk_i),
    .we_i       (wr_en_i && wr_valid_i),
    .waddr_i    (wr_addr_i),
    .wdata_i    (wr_data_i),
    .sdata_i    (srch_data_i),
    .cmp_en_i   (phit),
    .match_o    (match),
    .cmp_count_o(cmp_count)
  );

  match_encoder #(.DEPTH(DEPTH)) u_encoder (
    .match_i(match),
    .hit_o  (hit),
    .addr_o (addr),
    .multi_o(multi)
  );

  // Result register.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rslt_valid_o     <= 1'b0;
      rslt_hit_o       <= 1'b0;
      rslt_addr_o      <= '0;
      rslt_multi_o     <= 1'b0;
      rslt_param_o     <= '0;
      rslt_cmp_count_o <= '0;
    end else begin
      rslt_valid_o <= srch_en_i;
      if (srch_en_i) begin
        rslt_hit_o       <= hit;
        rslt_addr_o      <= addr;
        rslt_multi_o     <= multi;
        rslt_param_o     <= srch_param;
        rslt_cmp_count_o <= cmp_count;
      end
    end
  end

  // The extractor must never hand the empty code to the parameter compare.
  always_comb begin
    assert (srch_param != '1)
      else $error("pbcam: extractor produced the reserved empty code");
  end

endmodule
