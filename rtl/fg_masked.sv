// fg_masked: first-order masked evaluation of F* or G*, the 8-to-1 functions
// that give coordinate 0 of x^26 (F*) and of x^49 (G*) in the normal basis
// with beta = 205.
//
// Both cubic functions are split into two parts, F* = F^A ^ F^B and
// G* = G^A ^ G^B, chosen so that each part fits one (3,1) sharing matrix. Part
// A and part B are each a fg_part: a non-complete 8-share expansion of the
// 2-share input, refreshed with 3 fresh random bits, stored in 8 flip-flops.
// The compression stage XORs the 4+4 registered shares of each part with those
// of the other part into the two output shares y0 and y1. `sel` picks F or G
// inside the first stage, so both functions share one set of registers.
//
// Interface: 2-share 8-bit input, sel, 6 random bits (rA for part A, rB for
// part B), 2-share 1-bit output. Timing: one register stage, the output in
// cycle n+1 belongs to the input in cycle n. 16 flip-flops. The split, the
// variable mappings and the compression follow the document; sel = 1 meaning G
// is this design's own choice.
module fg_masked
  import rs_pkg::*;
(
  input  logic       clk,
  input  logic       sel,   // 0: F* (x^26), 1: G* (x^49)
  input  byte_t      x0,    // input share 0 (normal basis)
  input  byte_t      x1,    // input share 1
  input  logic [2:0] rA,    // fresh randomness for part A
  input  logic [2:0] rB,    // fresh randomness for part B
  output logic       y0,    // output share 0
  output logic       y1     // output share 1
);
  logic a0, a1, b0, b1;

  // Part A: F^A / G^A, variables x0..x7 on columns (a,a,b,c,c,a,d,d).
  fg_part #(
    .F_MONS({8'h05, 8'h06, 8'h0a, 8'h0d, 8'h0e, 8'h11, 8'h14, 8'h15, 8'h16,
              8'h24, 8'h30, 8'h41, 8'h46, 8'h51, 8'h70, 8'h82, 8'h88, 8'h89,
              8'h8a, 8'h8c, 8'h92, 8'h94, 8'ha0, 8'ha4, 8'hb0}),
    .G_MONS({8'h05, 8'h06, 8'h0a, 8'h0e, 8'h11, 8'h14, 8'h15, 8'h16, 8'h28,
              8'h34, 8'h45, 8'h46, 8'h4c, 8'h50, 8'h51, 8'h68, 8'h70, 8'h82,
              8'h85, 8'h89, 8'h90, 8'h91, 8'h92, 8'h94, 8'ha8}),
    .RHO({2'd3, 2'd3, 2'd0, 2'd2, 2'd2, 2'd1, 2'd0, 2'd0})
  ) u_part_a (
    .clk, .sel, .x0, .x1, .r(rA), .z0(a0), .z1(a1)
  );

  // Part B: F^B / G^B, variables x0..x7 on columns (a,b,c,d,c,d,a,b).
  fg_part #(
    .F_MONS({8'h07, 8'h10, 8'h1a, 8'h21, 8'h23, 8'h32, 8'h40, 8'h62, 8'hc4,
              8'hd0, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
              8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00}),
    .G_MONS({8'h01, 8'h03, 8'h07, 8'h0b, 8'h13, 8'h18, 8'h23, 8'h26, 8'h31,
              8'h40, 8'h58, 8'h62, 8'hc4, 8'hd0, 8'h00, 8'h00, 8'h00, 8'h00,
              8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00}),
    .RHO({2'd1, 2'd0, 2'd3, 2'd2, 2'd3, 2'd2, 2'd1, 2'd0})
  ) u_part_b (
    .clk, .sel, .x0, .x1, .r(rB), .z0(b0), .z1(b1)
  );

  // Compression: each output share collects one half of both parts.
  assign y0 = a0 ^ b0;
  assign y1 = a1 ^ b1;

endmodule
