// tb_ddfs_ref_pkg - reference model used by the testbenches.
//
// Recomputes, with plain integer arithmetic and a separately typed copy of
// the 16-segment coefficient table, what the synthesizer must output:
//   quarter-wave amplitude  y = ((m_i - (x >> k_i)) * x + c_i * 512) >> 9
//   sign/magnitude sample   from the 14 phase MSBs via quarter-wave symmetry.
// Also gives the ideal sine for accuracy checks.
package tb_ddfs_ref_pkg;

  localparam int REF_M [16] = '{805, 803, 788, 773, 743, 706, 678, 628,
                                572, 511, 445, 376, 303, 227, 150, 103};
  localparam int REF_C [16] = '{1, 403, 800, 1190, 1568, 1932, 2276, 2599,
                                2897, 3167, 3407, 3613, 3785, 3921, 4018, 4074};
  localparam int REF_K [16] = '{7, 5, 5, 4, 4, 4, 3, 3, 3, 3, 3, 3, 3, 3, 3, 2};

  localparam real PI = 3.14159265358979323846;

  // Quarter-wave amplitude for a 12-bit address.
  function automatic int amp_ref(input int addr);
    int seg = (addr >> 8) & 15;
    int x   = addr & 255;
    int acc = (REF_M[seg] - (x >> REF_K[seg])) * x + REF_C[seg] * 512;
    return (acc >> 9) & 4095;
  endfunction

  // Quarter-wave address for 14 phase MSBs (mirror in quadrants 1 and 3).
  function automatic int addr_ref(input int phase14);
    int a = phase14 & 4095;
    return ((phase14 >> 12) & 1) ? (4095 - a) : a;
  endfunction

  function automatic int sign_ref(input int phase14);
    return (phase14 >> 13) & 1;
  endfunction

  function automatic int mag_ref(input int phase14);
    return amp_ref(addr_ref(phase14));
  endfunction

  // Ideal quarter-wave amplitude at address a, full scale 4095.
  function automatic real ideal_amp(input int addr);
    return 4095.0 * $sin(PI / 2.0 * real'(addr) / 4096.0);
  endfunction

  // Ideal signed sample for 14 phase MSBs.
  function automatic real ideal_sample(input int phase14);
    return 4095.0 * $sin(2.0 * PI * real'(phase14) / 16384.0);
  endfunction

endpackage
