// tb_block_xor_extractor: exhaustive test of the Block-XOR parameter extractor.
//
// Applies every 14-bit word, compares the parameter with the reference model
// and checks that the all-ones code never appears. It then checks the
// distribution of the words over the 16 codes: 1152 words for each code with
// an odd number of ones, 1024 for the other codes and none for all ones.
module tb_block_xor_extractor;
  import pbcam_ref_pkg::*;

  localparam int unsigned DATA_W  = 14;
  localparam int unsigned PARAM_W = 4;

  logic [DATA_W-1:0]  data;
  logic [PARAM_W-1:0] param;
  int checks = 0, failures = 0;
  int hist [16];

  block_xor_extractor #(.DATA_W(DATA_W), .PARAM_W(PARAM_W)) dut (
    .data_i(data), .param_o(param)
  );

  initial begin
    #1ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[i]) hist[i] = 0;
    for (int d = 0; d < (1 << DATA_W); d++) begin
      data = DATA_W'(d);
      #1;
      checks++;
      if (int'(param) != ref_param(d, DATA_W, PARAM_W)) begin
        failures++;
        if (failures < 10)
          $display("FAIL data=%h param=%h expected=%h", d, param, ref_param(d, DATA_W, PARAM_W));
      end
      hist[param]++;
    end
    for (int p = 0; p < 16; p++) begin
      int exp_n;
      exp_n = (p == 15) ? 0 : ((popcount(p) % 2 == 1) ? 1152 : 1024);
      checks++;
      if (hist[p] != exp_n) begin
        failures++;
        $display("FAIL code %0d holds %0d words, expected %0d", p, hist[p], exp_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
