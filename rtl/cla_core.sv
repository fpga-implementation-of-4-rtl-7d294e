// cla_core: combinational carry look-ahead adder, s = a + b + cin.
//
// The word is cut into 4-bit groups. Inside a group every carry is formed
// in two logic levels from the group's generate (a&b) and propagate (a^b)
// bits and the group carry-in; each group also forms a group generate and
// group propagate, from which the carry into the next group is computed
// directly (block carry look-ahead, rippling only from group to group).
// A width that is not a multiple of four is padded with zero bits, which
// neither generate nor propagate.
//
// Interface: a, b and cin in, s and cout (carry out of bit W-1) out.
// Purely combinational; the registered adder and subtractor modules of the
// transform are built on it. The adder style (carry look-ahead) is the one
// the transform's adder modules are said to use; the 4-bit grouping is a
// choice of this design.
module cla_core #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned NG = (W + 3) / 4;  // number of 4-bit groups
  localparam int unsigned WP = NG * 4;       // padded width

  logic [WP-1:0] ap, bp, g, p, c;
  logic [NG:0]   gc;                         // carry into each group

  assign ap = WP'(a);
  assign bp = WP'(b);
  assign g  = ap & bp;                       // bit generate
  assign p  = ap ^ bp;                       // bit propagate
  assign gc[0] = cin;

  for (genvar k = 0; k < NG; k++) begin : g_group
    logic [3:0] gg, pp;
    logic       ci;
    assign gg = g[4*k +: 4];
    assign pp = p[4*k +: 4];
    assign ci = gc[k];
    // carries inside the group, two logic levels from the group carry-in
    assign c[4*k]     = ci;
    assign c[4*k + 1] = gg[0] | (pp[0] & ci);
    assign c[4*k + 2] = gg[1] | (pp[1] & gg[0]) | (pp[1] & pp[0] & ci);
    assign c[4*k + 3] = gg[2] | (pp[2] & gg[1]) | (pp[2] & pp[1] & gg[0])
                      | (pp[2] & pp[1] & pp[0] & ci);
    // group generate / propagate give the carry into the next group
    assign gc[k + 1]  = gg[3] | (pp[3] & gg[2]) | (pp[3] & pp[2] & gg[1])
                      | (pp[3] & pp[2] & pp[1] & gg[0])
                      | (pp[3] & pp[2] & pp[1] & pp[0] & ci);
  end

  logic [WP:0] cx;                           // carries incl. the final one
  assign cx = {gc[NG], c};

  assign s    = p[W-1:0] ^ c[W-1:0];
  assign cout = cx[W];

endmodule
