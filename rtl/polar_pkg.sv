// polar_pkg: helper functions shared by the folded polar encoder.
//
// bitrev() reverses the low `bits` bits of an index. The encoder uses it in
// two places: the line order after the fully parallel stages (line l carries
// lane bitrev(l)), and in describing the codeword order at the output, which
// is bit-reversed with respect to the natural codeword index.
// fold_delay() gives the number of registers in each delay line of folded
// stage f (f = 0 for the first folded stage): 1, 2, 4, ... cycles.
package polar_pkg;

  function automatic int unsigned bitrev(input int unsigned value, input int unsigned bits);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < bits; i++) begin
      r = (r << 1) | ((value >> i) & 1);
    end
    return r;
  endfunction

  function automatic int unsigned fold_delay(input int unsigned f);
    return 1 << f;
  endfunction

endpackage
