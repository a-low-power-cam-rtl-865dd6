// tb_param_memory: parameter memory and first-part comparators.
//
// Uses 64 entries. After reset every entry must be empty and match nothing.
// Random writes (including writes of the empty code) follow, and after each
// one the hit vector for every one of the 16 search parameters is compared
// with a model of the stored parameters.
module tb_param_memory;
  localparam int unsigned PARAM_W = 4;
  localparam int unsigned DEPTH   = 64;
  localparam int unsigned AW      = $clog2(DEPTH);

  logic clk = 0, rst_n = 0, we = 0;
  logic [AW-1:0] waddr = '0;
  logic [PARAM_W-1:0] wparam = '0, sparam = '0;
  logic [DEPTH-1:0] phit;
  logic [PARAM_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  param_memory #(.PARAM_W(PARAM_W), .DEPTH(DEPTH)) dut (
    .clk_i(clk), .rst_ni(rst_n), .we_i(we), .waddr_i(waddr),
    .wparam_i(wparam), .sparam_i(sparam), .phit_o(phit)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    logic [DEPTH-1:0] exp_hit;
    for (int p = 0; p < 16; p++) begin
      sparam = PARAM_W'(p);
      #1;
      for (int i = 0; i < DEPTH; i++) exp_hit[i] = (p != 15) && (int'(model[i]) == p);
      checks++;
      if (phit !== exp_hit) begin
        failures++;
        if (failures < 10) $display("FAIL sparam=%0d phit=%h expected=%h", p, phit, exp_hit);
      end
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check_all();
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = 1;
      waddr = AW'($urandom);
      wparam = (n % 7 == 6) ? '1 : PARAM_W'($urandom);
      @(posedge clk);
      model[waddr] = wparam;
      #1 we = 0;
      check_all();
    end
    // reset empties everything again
    @(negedge clk);
    rst_n = 0;
    #1 rst_n = 1;
    foreach (model[i]) model[i] = '1;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
