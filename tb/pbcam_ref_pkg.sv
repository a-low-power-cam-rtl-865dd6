// pbcam_ref_pkg: reference model of the Block-XOR parameter for testbenches.
//
// Written independently of the RTL: it counts the ones of each block bit by
// bit and keeps the count modulo two, then applies the rule that the
// all-ones parameter is replaced by the lowest block of the word.
package pbcam_ref_pkg;

  function automatic int unsigned ref_param(input int unsigned data,
                                            input int unsigned data_w,
                                            input int unsigned param_w);
    int unsigned p;
    int unsigned ones;
    p = 0;
    for (int unsigned b = 0; b < param_w; b++) begin
      ones = 0;
      for (int unsigned k = 0; k < param_w; k++) begin
        if (b * param_w + k < data_w) ones += (data >> (b * param_w + k)) & 1;
      end
      p |= (ones % 2) << b;
    end
    if (p == (1 << param_w) - 1) p = data % (1 << param_w);
    return p;
  endfunction

  function automatic int unsigned popcount(input int unsigned v);
    int unsigned n = 0;
    for (int i = 0; i < 32; i++) n += (v >> i) & 1;
    return n;
  endfunction

endpackage
