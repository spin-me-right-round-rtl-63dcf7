// fg_part: one half (A or B) of the masked F*/G* block, first stage plus the
// refresh/register stage.
//
// The half computes either the cubic Boolean function F_MONS (sel = 0) or
// G_MONS (sel = 1), given as lists of monomials over the 8 normal-basis input
// bits, on a 2-share input (x0, x1). Each input variable i is given a column
// RHO[i] of the (3,1) sharing matrix with rows j = {a,b,c} and column
// d = a^b^c. Output share j takes share M[j][RHO[i]] of every variable, so it
// sees exactly one share of each input bit (non-completeness). A cubic
// monomial then appears once in every row; a quadratic one only in the rows
// where a third, unused column is 0; a linear one only where two unused
// columns are 0. This places each cross product of the shares exactly once.
// The 8 shares are refreshed with 3 random bits in the pattern
// (-, r0, r1, r2, r2, r1, r0, -), so that only cross-domain terms are remasked,
// and stored in 8 flip-flops. z0 = XOR of rows 0-3 and z1 = XOR of rows 4-7
// are the two compressed output shares, combinational from the flip-flops.
//
// Timing: one register stage; z0/z1 in cycle n+1 belong to x in cycle n.
// The monomial lists, the mappings and the refresh pattern follow the
// document; the rule for placing lower-degree monomials is this design's own.
// Entries equal to 8'h00 are unused (no list has a constant term); the
// order of the entries does not matter.
module fg_part
  import rs_pkg::*;
#(
  parameter logic [24:0][7:0]  F_MONS = {8'h05, 8'h06, 8'h0a, 8'h0d, 8'h0e, 8'h11, 8'h14, 8'h15, 8'h16,
                                            8'h24, 8'h30, 8'h41, 8'h46, 8'h51, 8'h70, 8'h82, 8'h88, 8'h89,
                                            8'h8a, 8'h8c, 8'h92, 8'h94, 8'ha0, 8'ha4, 8'hb0},
  parameter logic [24:0][7:0]  G_MONS = {8'h05, 8'h06, 8'h0a, 8'h0e, 8'h11, 8'h14, 8'h15, 8'h16, 8'h28,
                                            8'h34, 8'h45, 8'h46, 8'h4c, 8'h50, 8'h51, 8'h68, 8'h70, 8'h82,
                                            8'h85, 8'h89, 8'h90, 8'h91, 8'h92, 8'h94, 8'ha8},
  parameter logic [7:0][1:0]  RHO = {2'd3, 2'd3, 2'd0, 2'd2, 2'd2, 2'd1, 2'd0, 2'd0}
) (
  input  logic       clk,
  input  logic       sel,   // 0: F (x^26 part), 1: G (x^49 part)
  input  byte_t      x0,    // input share 0 (normal basis)
  input  byte_t      x1,    // input share 1
  input  logic [2:0] r,     // fresh randomness
  output logic       z0,    // compressed output share 0
  output logic       z1     // compressed output share 1
);
  // Column (a,b,c,d) value of the sharing matrix in row j.
  function automatic logic mcol(logic [2:0] j, logic [1:0] col);
    logic [3:0] row = {j[2] ^ j[1] ^ j[0], j[0], j[1], j[2]};  // {d,c,b,a}
    return row[col];
  endfunction

  // Does monomial m (variables mapped by RHO) appear in output share j?
  function automatic logic in_row(byte_t m, int unsigned j);
    logic [3:0] used = '0;
    int unsigned deg = 0;
    int unsigned need;
    logic ok = 1'b1;
    for (int i = 0; i < 8; i++)
      if (m[i]) begin
        used[RHO[i]] = 1'b1;
        deg++;
      end
    need = (deg >= 3) ? 0 : 3 - deg;     // free columns that must be 0
    for (int c = 0; c < 4; c++)
      if (!used[c] && need > 0) begin
        if (mcol(3'(j), 2'(c))) ok = 1'b0;
        need--;
      end
    return ok;
  endfunction

  // Elaboration-time tables: for each row j, which list entries appear in it
  // (USE) and, per variable, which share that row takes (the row's share
  // pattern SHR[j], bit i = share index of variable i).
  typedef logic [7:0][24:0] use_t;

  function automatic use_t use_table(logic [24:0][7:0] mons);
    use_t u;
    for (int j = 0; j < 8; j++)
      for (int k = 0; k < 25; k++)
        u[j][k] = (mons[k] != 8'h00) && in_row(mons[k], j);
    return u;
  endfunction

  function automatic mat8_t share_table();
    mat8_t t;
    for (int j = 0; j < 8; j++)
      for (int i = 0; i < 8; i++) t[j][i] = mcol(3'(j), RHO[i]);
    return t;
  endfunction

  localparam use_t F_USE = use_table(F_MONS);
  localparam use_t G_USE = use_table(G_MONS);
  localparam mat8_t SHR   = share_table();

  // Share j: XOR of the products of the selected shares of each monomial.
  function automatic logic share_eval(logic [24:0][7:0] mons, logic [24:0] use_j, byte_t v);
    logic acc = 1'b0;
    for (int k = 0; k < 25; k++)
      if (use_j[k]) acc ^= &(v | ~mons[k]);
    return acc;
  endfunction

  logic [7:0] z, zr, q;
  logic [7:0] rmask;

  assign rmask = {1'b0, r[0], r[1], r[2], r[2], r[1], r[0], 1'b0};

  always_comb begin
    for (int j = 0; j < 8; j++) begin
      automatic byte_t v = (x1 & SHR[j]) | (x0 & ~SHR[j]);   // the shares row j sees
      z[j] = sel ? share_eval(G_MONS, G_USE[j], v) : share_eval(F_MONS, F_USE[j], v);
    end
  end

  assign zr = z ^ rmask;

  always_ff @(posedge clk) q <= zr;

  assign z0 = ^q[3:0];
  assign z1 = ^q[7:4];

endmodule
