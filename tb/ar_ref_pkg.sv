// ar_ref_pkg: reference model of the AR filter DFG for the testbenches.
//
// Computes the two outputs (operations 27 and 28) of one input set directly
// from the graph equations, independently of the schedule, the operand coding
// and the register sets of the hardware. All arithmetic wraps modulo
// 2**WIDTH, as in the functional units.
package ar_ref_pkg;
  typedef longint unsigned u64_t;

  function automatic void ar_ref(input int unsigned width, input u64_t x[8], input u64_t c[16],
                                 output u64_t y27, output u64_t y28);
    u64_t m, v[29];
    m = (width >= 64) ? '1 : ((64'd1 << width) - 1);
    v[1]  = (x[0] * c[0]) & m;
    v[2]  = (x[1] * c[1]) & m;
    v[3]  = (x[2] * c[2]) & m;
    v[4]  = (x[3] * c[3]) & m;
    v[5]  = (v[1] + v[2]) & m;
    v[6]  = (v[3] + v[4]) & m;
    v[7]  = (v[5] + x[4]) & m;
    v[8]  = (v[6] + x[5]) & m;
    v[9]  = (v[7] * c[4]) & m;
    v[10] = (v[7] * c[5]) & m;
    v[11] = (v[8] * c[6]) & m;
    v[12] = (v[8] * c[7]) & m;
    v[13] = (v[9] + v[12]) & m;
    v[14] = (v[10] + v[11]) & m;
    v[15] = (x[6] * c[8]) & m;
    v[16] = (x[7] * c[9]) & m;
    v[17] = (x[6] * c[10]) & m;
    v[18] = (x[7] * c[11]) & m;
    v[19] = (v[13] * c[12]) & m;
    v[20] = (v[13] * c[13]) & m;
    v[21] = (v[14] * c[14]) & m;
    v[22] = (v[14] * c[15]) & m;
    v[23] = (v[15] + v[16]) & m;
    v[24] = (v[17] + v[18]) & m;
    v[25] = (v[19] + v[22]) & m;
    v[26] = (v[20] + v[21]) & m;
    v[27] = (v[25] + v[23]) & m;
    v[28] = (v[26] + v[24]) & m;
    y27 = v[27];
    y28 = v[28];
  endfunction
endpackage
