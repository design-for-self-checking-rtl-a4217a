// tb_pkg: helpers shared by the test benches: conversion between plain
// bit vectors and dual-rail words, and an integer reference model of one
// radix-2 SRT division step that does not use the dual-rail logic.
package tb_pkg;
  import dcvsl_pkg::*;

  localparam int unsigned MAXP = 128;  // widest dual-rail word handled

  // Encode the low n bits of v as valid pairs (unused pairs are spacers).
  function automatic logic [2*MAXP-1:0] enc(input logic [MAXP-1:0] v, input int unsigned n);
    logic [2*MAXP-1:0] r;
    r = '0;
    for (int unsigned i = 0; i < n; i++) r[2*i +: 2] = {v[i], ~v[i]};
    return r;
  endfunction

  // True rails of the low n pairs.
  function automatic logic [MAXP-1:0] dec(input logic [2*MAXP-1:0] p, input int unsigned n);
    logic [MAXP-1:0] r;
    r = '0;
    for (int unsigned i = 0; i < n; i++) r[i] = p[2*i+1];
    return r;
  endfunction

  // 1 when each of the low n pairs is 01 or 10.
  function automatic logic all_valid(input logic [2*MAXP-1:0] p, input int unsigned n);
    for (int unsigned i = 0; i < n; i++)
      if (p[2*i+1] == p[2*i]) return 1'b0;
    return 1'b1;
  endfunction

  // 1 when each of the low n pairs is 00.
  function automatic logic all_spacer(input logic [2*MAXP-1:0] p, input int unsigned n);
    for (int unsigned i = 0; i < n; i++)
      if (p[2*i+1] || p[2*i]) return 1'b0;
    return 1'b1;
  endfunction

  // Quotient digit from the shifted residual, w bits wide, given as carry
  // and sum words: estimate from the top four bits of each, one fraction
  // bit kept.
  function automatic int ref_digit(input longint unsigned wc2, input longint unsigned ws2,
                                   input int unsigned w);
    int y;
    y = int'(((wc2 >> (w - 4)) + (ws2 >> (w - 4))) & 15);
    if (y >= 8) y -= 16;
    if (y >= 0) return 1;
    if (y == -1) return 0;
    return -1;
  endfunction

  // Dual-rail data word of the divider (layout in dcvsl_pkg) for n-bit
  // operands, built from plain values.
  function automatic logic [2*MAXP-1:0] div_word(input int unsigned n,
      input longint unsigned wc, input longint unsigned ws, input int unsigned d,
      input int unsigned q, input int unsigned qm);
    int unsigned w;
    w = n + DIV_IBITS;
    return enc(wc, w) | (enc(ws, w) << (2 * w)) | (enc(d, n) << (4 * w))
         | (enc(q, n) << (4 * w + 2 * n)) | (enc(qm, n) << (4 * w + 4 * n));
  endfunction

  // Signed value of a w-bit two's complement word.
  function automatic longint sval(input longint unsigned v, input int unsigned w);
    longint unsigned m;
    m = (64'd1 << w) - 1;
    v = v & m;
    if (v >> (w - 1)) return longint'(v) - longint'(64'd1 << w);
    return longint'(v);
  endfunction
endpackage
