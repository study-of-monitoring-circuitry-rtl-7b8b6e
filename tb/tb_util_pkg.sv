`timescale 1ns / 1ps
// tb_util_pkg: helpers shared by the testbenches.
// rns_decode finds, by plain search, the number M in [0, 29*31*32) whose
// residues modulo 29, 31 and 32 are r29, r31 and r32 (the counters hold
// M = counted edges - 1). It returns -1 if no such number exists.
package tb_util_pkg;

  function automatic int rns_decode(int r29, int r31, int r32);
    for (int n = 0; n < 31 * 32; n++) begin
      int m;
      m = 29 * n + r29;
      if ((m % 31) == r31 && (m % 32) == r32) return m;
    end
    return -1;
  endfunction

endpackage
