// Testbench helpers: conversion between IEEE-754 single-precision bit
// patterns and SystemVerilog real (double precision), written from the
// format definition so that reference values do not depend on the design.
// to_fp32 rounds to nearest even and flushes results below the smallest
// normal number to signed zero, matching the flush-to-zero arithmetic.
package tb_fp_pkg;

  function automatic real fp32_to_real(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = 64'(0);
    d[63] = f[31];
    d[62:52] = 11'(int'(f[30:23]) - 127 + 1023);
    d[51:29] = f[22:0];
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] real_to_fp32(input real r);
    logic [63:0] d;
    logic [23:0] m;
    logic        g, st, inc;
    int          e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b0, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    inc = g & (st | m[0]);
    m  = m + 24'(inc);
    if (m[23]) begin
      m = 24'd0;
      e = e + 1;
    end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

endpackage
