// block_xor_extractor: the modified Block-XOR parameter extractor.
//
// The DATA_W-bit word is cut into PARAM_W blocks of PARAM_W bits each, the
// last block taking whatever bits are left (for 14 bits: 4, 4, 4 and 2).
// Block i is data_i[PARAM_W*i +: PARAM_W] and its XOR (parity) is parameter
// bit A_i. Because every block value splits evenly between parity 0 and 1,
// all 2^PARAM_W raw parameters are equally likely for random words.
//
// The code with all bits set is reserved to mark an empty CAM entry. When the
// raw parameter is all ones (select S = A3&A2&A1&A0 for four bits) a
// multiplexer outputs the first block, data_i[PARAM_W-1:0], instead. That
// block then has odd parity, so it can never be all ones itself; the codes
// with an odd number of ones receive 1024 + 128 = 1152 of the 2^14 words and
// the others 1024.
//
// Purely combinational, no clock. The block/XOR structure, the block sizes
// and the multiplexer follow the published Block-XOR method. Which data bits
// form which block, and that the first block is the least significant one,
// is this design's choice.
//
// Interface: data_i (DATA_W) in, param_o (PARAM_W) out, never all ones.
module block_xor_extractor #(
  parameter int unsigned DATA_W  = pbcam_pkg::DATA_W,
  parameter int unsigned PARAM_W = pbcam_pkg::PARAM_W
) (
  input  logic [DATA_W-1:0]  data_i,
  output logic [PARAM_W-1:0] param_o
);

  // Number of blocks is ceil(DATA_W/PARAM_W); it has to equal PARAM_W so
  // that each block gives one parameter bit and the first block is exactly
  // as wide as the parameter it replaces.
  localparam int unsigned NBLK = (DATA_W + PARAM_W - 1) / PARAM_W;

  if (NBLK != PARAM_W) begin : g_bad_width
    $error("block_xor_extractor: ceil(DATA_W/PARAM_W) must equal PARAM_W");
  end

  logic [PARAM_W-1:0] raw_param;
  logic               sel_first;

  // One XOR tree per block.
  for (genvar i = 0; i < PARAM_W; i++) begin : g_block
    localparam int unsigned LO = PARAM_W * i;
    localparam int unsigned HI = (LO + PARAM_W - 1 < DATA_W) ? LO + PARAM_W - 1 : DATA_W - 1;
    assign raw_param[i] = ^data_i[HI:LO];
  end

  // Multiplexer of the modified extractor.
  assign sel_first = &raw_param;
  assign param_o   = sel_first ? data_i[PARAM_W-1:0] : raw_param;

endmodule
