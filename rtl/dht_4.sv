// dht_4: 4-point discrete Hadamard transform, two pipelined stages.
//
//   y0 = x0 + x1 + x2 + x3        y1 = x0 - x1 + x2 - x3
//   y2 = x0 + x1 - x2 - x3        y3 = x0 - x1 - x2 + x3
//
// i.e. y = H4 x with the Sylvester-ordered Hadamard matrix
// H4 = [H2 H2; H2 -H2], H2 = [1 1; 1 -1]. Instead of 12 additions the
// transform is factored into two butterfly layers of four modules each:
//
//   stage 1: tmp0 = x0 + x1   tmp1 = x2 + x3   tmp2 = x0 - x1   tmp3 = x2 - x3
//   stage 2: y0 = tmp0 + tmp1 y1 = tmp2 + tmp3 y2 = tmp0 - tmp1 y3 = tmp2 - tmp3
//
// so N log2 N = 8 adder/subtractor modules. Each module registers its
// result, so a new input vector can be applied every clock and its
// transform appears LATENCY = 2 clocks later. All values are W-bit
// two's-complement and wrap on overflow (the full-precision results need
// W + 2 bits; the source design keeps 16 bits throughout).
//
// Interface: clk, x0..x3 in, y0..y3 out, as in the published top-level
// schematic. There is no reset and no valid flag; a user tracks validity
// by the fixed latency. The modules' carry_in pins are tied to 0 and their
// carry_out pins are left open on purpose (wrap-around arithmetic), which
// lint reports as empty pin connections.
//
// From the source design: the equations, the two-stage split, which
// module computes which term, the ports and the 16-bit width. Own choice:
// the output ordering follows the matrix and the stage table; a published
// simulation and internal schematic instead give y1 and y2 exchanged
// (x0+x1-x2-x3 on y1).
module dht_4 #(
  parameter int unsigned W = dht_pkg::DATA_W
) (
  input  logic                clk,
  input  logic signed [W-1:0] x0,
  input  logic signed [W-1:0] x1,
  input  logic signed [W-1:0] x2,
  input  logic signed [W-1:0] x3,
  output logic signed [W-1:0] y0,
  output logic signed [W-1:0] y1,
  output logic signed [W-1:0] y2,
  output logic signed [W-1:0] y3
);

  logic [W-1:0] tmp0, tmp1, tmp2, tmp3;

  // ---- stage 1: sums and differences of neighbouring inputs ----
  c_l_addr #(.W(W)) Inst_c_l_addr1 (.clk, .a_in(x0), .b_in(x1), .carry_in(1'b0), .sum(tmp0), .carry_out());
  c_l_addr #(.W(W)) Inst_c_l_addr2 (.clk, .a_in(x2), .b_in(x3), .carry_in(1'b0), .sum(tmp1), .carry_out());
  cla_sub  #(.W(W)) Inst_c_l_addr3 (.clk, .a_in(x0), .b_in(x1), .carry_in(1'b0), .sum(tmp2), .carry_out());
  cla_sub  #(.W(W)) Inst_c_l_addr4 (.clk, .a_in(x2), .b_in(x3), .carry_in(1'b0), .sum(tmp3), .carry_out());

  // ---- stage 2: combine the two halves ----
  c_l_addr #(.W(W)) Inst_c_l_addr5 (.clk, .a_in(tmp0), .b_in(tmp1), .carry_in(1'b0), .sum(y0), .carry_out());
  c_l_addr #(.W(W)) Inst_c_l_addr6 (.clk, .a_in(tmp2), .b_in(tmp3), .carry_in(1'b0), .sum(y1), .carry_out());
  cla_sub  #(.W(W)) Inst_c_l_addr7 (.clk, .a_in(tmp0), .b_in(tmp1), .carry_in(1'b0), .sum(y2), .carry_out());
  cla_sub  #(.W(W)) Inst_c_l_addr8 (.clk, .a_in(tmp2), .b_in(tmp3), .carry_in(1'b0), .sum(y3), .carry_out());

endmodule
