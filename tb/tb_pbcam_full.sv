// tb_pbcam_full: the PB-CAM at its default size, 2^14 words of 14 bits.
//
// Fills every entry i with the word i, so the CAM holds each 14-bit value
// exactly once, and then searches for every value. Each search must hit at
// the address equal to the value, without a multiple match, and compare in
// the second part exactly the words that share its parameter: 1152 for the
// eight parameters with an odd number of ones and 1024 for the seven
// others, never more than 1152 (against up to 3432 for a ones-count
// parameter). Afterwards an entry is removed and a duplicate written to
// check a miss and a multiple match at full size. Each result must appear
// exactly one clock after its request.
module tb_pbcam_full;
  import pbcam_ref_pkg::*;

  localparam int unsigned DATA_W  = pbcam_pkg::DATA_W;
  localparam int unsigned PARAM_W = pbcam_pkg::PARAM_W;
  localparam int unsigned DEPTH   = pbcam_pkg::DEPTH;
  localparam int unsigned AW      = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_valid = 0, srch_en = 0;
  logic [AW-1:0] wr_addr = '0;
  logic [DATA_W-1:0] wr_data = '0, srch_data = '0;
  logic rv, rhit, rmulti;
  logic [AW-1:0] raddr;
  logic [PARAM_W-1:0] rparam;
  logic [AW:0] rcnt;

  pbcam dut (
    .clk_i(clk), .rst_ni(rst_n),
    .wr_en_i(wr_en), .wr_valid_i(wr_valid), .wr_addr_i(wr_addr), .wr_data_i(wr_data),
    .srch_en_i(srch_en), .srch_data_i(srch_data),
    .rslt_valid_o(rv), .rslt_hit_o(rhit), .rslt_addr_o(raddr), .rslt_multi_o(rmulti),
    .rslt_param_o(rparam), .rslt_cmp_count_o(rcnt)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int max_cnt = 0;
  longint sum_cnt = 0;
  int n_1152 = 0, n_1024 = 0;

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_result(input bit hit, input int addr, input bit multi,
                               input int param, input int cnt);
    checks++;
    if (rv !== 1'b1 || rhit !== hit || (hit && int'(raddr) != addr) || rmulti !== multi ||
        int'(rparam) != param || int'(rcnt) != cnt) begin
      failures++;
      if (failures < 10)
        $display("FAIL v=%b hit=%b addr=%0d multi=%b param=%0d cnt=%0d exp %b %0d %b %0d %0d",
                 rv, rhit, raddr, rmulti, rparam, rcnt, hit, addr, multi, param, cnt);
    end
  endtask

  task automatic search(input int d);
    @(negedge clk);
    srch_en = 1; srch_data = DATA_W'(d);
    @(posedge clk);
    #1 srch_en = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; wr_valid = 1; wr_addr = AW'(i); wr_data = DATA_W'(i);
    end
    @(negedge clk) wr_en = 0;
    // search every value; the result must be there one clock later
    for (int d = 0; d < DEPTH; d++) begin
      int p, exp_cnt;
      p = ref_param(d, DATA_W, PARAM_W);
      exp_cnt = (popcount(p) % 2 == 1) ? 1152 : 1024;
      search(d);
      expect_result(1, d, 0, p, exp_cnt);
      if (int'(rcnt) > max_cnt) max_cnt = int'(rcnt);
      sum_cnt += rcnt;
      if (rcnt == 1152) n_1152++;
      if (rcnt == 1024) n_1024++;
    end
    checks++;
    if (max_cnt != 1152 || n_1152 != 8 * 1152 || n_1024 != 7 * 1024) begin
      failures++;
      $display("FAIL distribution max=%0d n1152=%0d n1024=%0d", max_cnt, n_1152, n_1024);
    end
    $display("second-part comparisons: max %0d, mean %0.1f over %0d searches",
             max_cnt, real'(sum_cnt) / DEPTH, DEPTH);
    // remove entry 5: searching 5 misses and compares one word less
    @(negedge clk);
    wr_en = 1; wr_valid = 0; wr_addr = AW'(5);
    @(posedge clk);
    #1 wr_en = 0;
    begin
      int p5;
      p5 = ref_param(5, DATA_W, PARAM_W);
      search(5);
      expect_result(0, 0, 0, p5, ((popcount(p5) % 2 == 1) ? 1152 : 1024) - 1);
    end
    // duplicate of value 9 at address 100: two matches, lowest address 9
    @(negedge clk);
    wr_en = 1; wr_valid = 1; wr_addr = AW'(100); wr_data = DATA_W'(9);
    @(posedge clk);
    #1 wr_en = 0;
    begin
      int p9, p100;
      p9 = ref_param(9, DATA_W, PARAM_W);
      p100 = ref_param(100, DATA_W, PARAM_W);
      search(9);
      // entry 100 joins the class of 9; entry 5, removed above, leaves its own
      expect_result(1, 9, 1, p9, ((popcount(p9) % 2 == 1) ? 1152 : 1024) + ((p100 == p9) ? 0 : 1)
                    - ((ref_param(5, DATA_W, PARAM_W) == p9) ? 1 : 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
