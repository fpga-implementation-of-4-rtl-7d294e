// dht_8: 8-point discrete Hadamard transform built from two 4-point ones.
//
// With the recursion H8 = [H4 H4; H4 -H4], the transform of x0..x7 is
//
//   (y0..y3) = H4 (x0+x4, x1+x5, x2+x6, x3+x7)
//   (y4..y7) = H4 (x0-x4, x1-x5, x2-x6, x3-x7)
//
// A first layer of four adder modules and four subtractor modules forms
// the sums and differences of inputs four apart; each half then goes
// through a dht_4. That is three layers of butterflies and
// 8 + 2 * 8 = 24 = N log2 N adder/subtractor modules. Every module
// registers its output, so the core accepts a vector per clock and
// delivers its transform LATENCY = 3 clocks later. All values are W-bit
// two's complement and wrap (full precision would need W + 3 bits).
//
// Interface: clk, x80..x87 in, y80..y87 out, named as in the published
// top-level schematic; y8k is row k of the Sylvester-ordered H8 applied to
// the inputs. No reset and no valid flag. carry_in pins are tied to 0 and
// carry_out pins left open on purpose, as in dht_4.
//
// From the source design: the structure (first layer, then two 4-point
// blocks), the ports and the 16-bit width. Own choice: the row order of
// the 4-point blocks (see dht_4).
module dht_8 #(
  parameter int unsigned W = dht_pkg::DATA_W
) (
  input  logic                clk,
  input  logic signed [W-1:0] x80,
  input  logic signed [W-1:0] x81,
  input  logic signed [W-1:0] x82,
  input  logic signed [W-1:0] x83,
  input  logic signed [W-1:0] x84,
  input  logic signed [W-1:0] x85,
  input  logic signed [W-1:0] x86,
  input  logic signed [W-1:0] x87,
  output logic signed [W-1:0] y80,
  output logic signed [W-1:0] y81,
  output logic signed [W-1:0] y82,
  output logic signed [W-1:0] y83,
  output logic signed [W-1:0] y84,
  output logic signed [W-1:0] y85,
  output logic signed [W-1:0] y86,
  output logic signed [W-1:0] y87
);

  logic [W-1:0] s0, s1, s2, s3;   // x(i) + x(i+4)
  logic [W-1:0] d0, d1, d2, d3;   // x(i) - x(i+4)

  // ---- stage 1: butterflies between the two halves ----
  c_l_addr #(.W(W)) Inst_c_l_addr1 (.clk, .a_in(x80), .b_in(x84), .carry_in(1'b0), .sum(s0), .carry_out());
  c_l_addr #(.W(W)) Inst_c_l_addr2 (.clk, .a_in(x81), .b_in(x85), .carry_in(1'b0), .sum(s1), .carry_out());
  c_l_addr #(.W(W)) Inst_c_l_addr3 (.clk, .a_in(x82), .b_in(x86), .carry_in(1'b0), .sum(s2), .carry_out());
  c_l_addr #(.W(W)) Inst_c_l_addr4 (.clk, .a_in(x83), .b_in(x87), .carry_in(1'b0), .sum(s3), .carry_out());
  cla_sub  #(.W(W)) Inst_c_l_addr5 (.clk, .a_in(x80), .b_in(x84), .carry_in(1'b0), .sum(d0), .carry_out());
  cla_sub  #(.W(W)) Inst_c_l_addr6 (.clk, .a_in(x81), .b_in(x85), .carry_in(1'b0), .sum(d1), .carry_out());
  cla_sub  #(.W(W)) Inst_c_l_addr7 (.clk, .a_in(x82), .b_in(x86), .carry_in(1'b0), .sum(d2), .carry_out());
  cla_sub  #(.W(W)) Inst_c_l_addr8 (.clk, .a_in(x83), .b_in(x87), .carry_in(1'b0), .sum(d3), .carry_out());

  // ---- stages 2 and 3: a 4-point transform on each half ----
  dht_4 #(.W(W)) Inst_dht_4_1 (
    .clk,
    .x0(s0), .x1(s1), .x2(s2), .x3(s3),
    .y0(y80), .y1(y81), .y2(y82), .y3(y83)
  );

  dht_4 #(.W(W)) Inst_dht_4_2 (
    .clk,
    .x0(d0), .x1(d1), .x2(d2), .x3(d3),
    .y0(y84), .y1(y85), .y2(y86), .y3(y87)
  );

endmodule
