// tb_data_memory: data memory with enable-gated comparators.
//
// Uses 64 entries. Fills them with random words drawn from a small range so
// that searches find duplicates, then applies random enable vectors and
// search words (half of them taken from the stored words) and compares the
// match vector and the count of enabled comparators with a model.
module tb_data_memory;
  localparam int unsigned DATA_W = 14;
  localparam int unsigned DEPTH  = 64;
  localparam int unsigned AW     = $clog2(DEPTH);

  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0;
  logic [DATA_W-1:0] wdata = '0, sdata = '0;
  logic [DEPTH-1:0] en = '0, match;
  logic [AW:0] cnt;
  logic [DATA_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  data_memory #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (
    .clk_i(clk), .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
    .sdata_i(sdata), .cmp_en_i(en), .match_o(match), .cmp_count_o(cnt)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = DATA_W'($urandom_range(0, 15));
      model[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [DEPTH-1:0] exp_m;
      int exp_c;
      en = {$urandom, $urandom};
      if (n % 5 == 0) en = '1;
      if (n % 5 == 1) en = '0;
      sdata = (n % 2) ? model[$urandom_range(0, DEPTH-1)] : DATA_W'($urandom);
      #1;
      exp_c = 0;
      for (int i = 0; i < DEPTH; i++) begin
        exp_m[i] = en[i] && (model[i] == sdata);
        exp_c += int'(en[i]);
      end
      checks++;
      if (match !== exp_m || int'(cnt) != exp_c) begin
        failures++;
        if (failures < 10) $display("FAIL match=%h exp=%h count=%0d exp=%0d", match, exp_m, cnt, exp_c);
      end
      // occasionally rewrite one word
      if (n % 50 == 0) begin
        @(negedge clk);
        we = 1; waddr = AW'($urandom); wdata = DATA_W'($urandom_range(0, 15));
        @(posedge clk);
        model[waddr] = wdata;
        #1 we = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
