// tb_dil_pkg: reference data for the testbenches.
//
// The hit pattern of every Dilogic chip is a pure function of an event seed,
// the chip number and the hit index, so a testbench can compute the words it
// expects without looking at the design. Channel k of a chip with n hits is
// (7*k + chip) mod 48 (distinct for k < 48 because 7 and 48 are coprime), and
// its amplitude is a 12-bit hash of seed, chip and k.
package tb_dil_pkg;
  import cpv_pkg::*;

  function automatic logic [11:0] amp_of(input int unsigned seed,
                                         input int unsigned chip,
                                         input int unsigned k);
    int unsigned h;
    h = seed * 32'h9E3779B1 + chip * 32'h85EBCA6B + k * 32'hC2B2AE35;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 13);
    return h[11:0];
  endfunction

  function automatic logic [DIL_W-1:0] hit_word(input int unsigned seed,
                                                input int unsigned chip,
                                                input int unsigned k);
    logic [5:0] ch;
    ch = 6'((7 * k + chip) % 48);
    return {ch, amp_of(seed, chip, k)};
  endfunction

  // number of hits of a chip for an event: a spread around `mean`, 0..48
  function automatic int unsigned nhits_of(input int unsigned seed,
                                           input int unsigned chip,
                                           input int unsigned mean);
    int unsigned h, n;
    h = (seed + 17) * 32'h27D4EB2F ^ (chip + 3) * 32'h165667B1;
    h = h ^ (h >> 16);
    if (mean == 0) return 0;
    n = mean - (mean / 2) + (h % (mean + 1));   // mean/2 .. mean*3/2
    return (n > 48) ? 48 : n;
  endfunction
endpackage
