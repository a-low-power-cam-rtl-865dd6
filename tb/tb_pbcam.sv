// tb_pbcam: end-to-end random test of the PB-CAM at 64 entries.
//
// Drives random writes, entry removals and searches (often in the same
// clock) and checks every search result one clock later against a model that
// holds the words and recomputes the Block-XOR parameter independently: hit,
// lowest matching address, multiple-match flag, parameter and the number of
// second-part comparisons. The words come from a small pool so duplicates and
// parameter collisions are common. Each mechanism of the design is counted
// and must occur at least once: a hit, a search filtered out entirely by the
// parameter compare, a parameter hit whose data mismatched, a multiple match,
// the extractor's substitution of the reserved code, removing an entry, a
// write and search in the same clock, and a reset emptying the CAM.
module tb_pbcam;
  import pbcam_ref_pkg::*;

  localparam int unsigned DATA_W  = 14;
  localparam int unsigned PARAM_W = 4;
  localparam int unsigned DEPTH   = 64;
  localparam int unsigned AW      = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_valid = 0, srch_en = 0;
  logic [AW-1:0] wr_addr = '0;
  logic [DATA_W-1:0] wr_data = '0, srch_data = '0;
  logic rv, rhit, rmulti;
  logic [AW-1:0] raddr;
  logic [PARAM_W-1:0] rparam;
  logic [AW:0] rcnt;

  pbcam #(.DATA_W(DATA_W), .PARAM_W(PARAM_W), .DEPTH(DEPTH)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .wr_en_i(wr_en), .wr_valid_i(wr_valid), .wr_addr_i(wr_addr), .wr_data_i(wr_data),
    .srch_en_i(srch_en), .srch_data_i(srch_data),
    .rslt_valid_o(rv), .rslt_hit_o(rhit), .rslt_addr_o(raddr), .rslt_multi_o(rmulti),
    .rslt_param_o(rparam), .rslt_cmp_count_o(rcnt)
  );

  always #5 clk = ~clk;

  bit                valid_m [DEPTH];
  logic [DATA_W-1:0] data_m  [DEPTH];
  logic [DATA_W-1:0] pool    [20];
  int checks = 0, failures = 0;
  int n_hit = 0, n_pmiss = 0, n_dmiss = 0, n_multi = 0, n_subst = 0;
  int n_remove = 0, n_same_clk = 0, n_reset = 0;

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit raw_all_ones(input int unsigned d);
    // all four block parities set: the extractor must substitute
    for (int b = 0; b < 4; b++) begin
      int ones = 0;
      for (int k = 0; k < 4; k++) if (b * 4 + k < DATA_W) ones += (d >> (b * 4 + k)) & 1;
      if (ones % 2 == 0) return 0;
    end
    return 1;
  endfunction

  task automatic check(input bit exp_v, input bit exp_hit, input int exp_addr,
                       input bit exp_multi, input int exp_param, input int exp_cnt);
    checks++;
    if (rv !== exp_v || (exp_v && (rhit !== exp_hit || (exp_hit && int'(raddr) != exp_addr) ||
        rmulti !== exp_multi || int'(rparam) != exp_param || int'(rcnt) != exp_cnt))) begin
      failures++;
      if (failures < 10)
        $display("FAIL v=%b hit=%b addr=%0d multi=%b param=%0d cnt=%0d exp %b %b %0d %b %0d %0d",
                 rv, rhit, raddr, rmulti, rparam, rcnt,
                 exp_v, exp_hit, exp_addr, exp_multi, exp_param, exp_cnt);
    end
  endtask

  initial begin
    foreach (pool[i]) pool[i] = DATA_W'($urandom);
    // guarantee words that take the substitution path
    pool[0] = 14'h3fff ^ 14'h0001 ^ 14'h0010 ^ 14'h0100 ^ 14'h1000; // every block has odd parity
    pool[1] = 14'h1111;
    foreach (valid_m[i]) valid_m[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      bit exp_v, exp_hit, exp_multi;
      int exp_addr, exp_param, exp_cnt, nm;
      @(negedge clk);
      if (n == 3000) begin
        // reset in the middle: afterwards nothing may be found
        rst_n = 0;
        #1 rst_n = 1;
        foreach (valid_m[i]) valid_m[i] = 0;
        n_reset++;
      end
      wr_en    = ($urandom_range(0, 2) == 0);
      wr_valid = ($urandom_range(0, 5) != 0);
      wr_addr  = AW'($urandom);
      wr_data  = pool[$urandom_range(0, 19)];
      srch_en  = ($urandom_range(0, 3) != 0);
      srch_data = ($urandom_range(0, 3) != 0) ? pool[$urandom_range(0, 19)] : DATA_W'($urandom);
      // expected result from the contents before this clock's write
      exp_v = srch_en;
      exp_param = ref_param(srch_data, DATA_W, PARAM_W);
      exp_cnt = 0; nm = 0; exp_addr = 0;
      for (int i = DEPTH - 1; i >= 0; i--) begin
        if (valid_m[i] && ref_param(data_m[i], DATA_W, PARAM_W) == exp_param) begin
          exp_cnt++;
          if (data_m[i] == srch_data) begin nm++; exp_addr = i; end
        end
      end
      exp_hit = nm > 0;
      exp_multi = nm > 1;
      if (srch_en) begin
        if (exp_hit) n_hit++;
        if (exp_cnt == 0) n_pmiss++;
        if (exp_cnt > 0 && !exp_hit) n_dmiss++;
        if (exp_multi) n_multi++;
        if (raw_all_ones(srch_data)) n_subst++;
        if (wr_en) n_same_clk++;
      end
      if (wr_en && !wr_valid && valid_m[wr_addr]) n_remove++;
      @(posedge clk);
      if (wr_en) begin
        valid_m[wr_addr] = wr_valid;
        if (wr_valid) data_m[wr_addr] = wr_data;
      end
      #1;
      check(exp_v, exp_hit, exp_addr, exp_multi, exp_param, exp_cnt);
    end
    $display("hits=%0d param_filtered=%0d data_miss=%0d multi=%0d substituted=%0d removed=%0d same_clock=%0d resets=%0d",
             n_hit, n_pmiss, n_dmiss, n_multi, n_subst, n_remove, n_same_clk, n_reset);
    if (n_hit == 0 || n_pmiss == 0 || n_dmiss == 0 || n_multi == 0 || n_subst == 0 ||
        n_remove == 0 || n_same_clk == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
