// tb_match_encoder: priority encoding of the match lines.
//
// Uses 64 entries. Applies empty, single-bit, sparse and dense random match
// vectors and checks hit, lowest matching address and the multiple-match flag
// against a model that counts the set bits.
module tb_match_encoder;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic [DEPTH-1:0] m;
  logic hit, multi;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;

  match_encoder #(.DEPTH(DEPTH)) dut (.match_i(m), .hit_o(hit), .addr_o(addr), .multi_o(multi));

  initial begin
    #1ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int ones, low;
      case (n % 4)
        0: m = '0;
        1: m = DEPTH'(1) << $urandom_range(0, DEPTH-1);
        2: m = (DEPTH'(1) << $urandom_range(0, DEPTH-1)) | (DEPTH'(1) << $urandom_range(0, DEPTH-1));
        default: m = {$urandom, $urandom};
      endcase
      #1;
      ones = 0; low = 0;
      for (int i = DEPTH - 1; i >= 0; i--) if (m[i]) begin ones++; low = i; end
      checks++;
      if (hit != (ones > 0) || multi != (ones > 1) || (ones > 0 && int'(addr) != low)) begin
        failures++;
        if (failures < 10) $display("FAIL m=%h hit=%b addr=%0d multi=%b", m, hit, addr, multi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
