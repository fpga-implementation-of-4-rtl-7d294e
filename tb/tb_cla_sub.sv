// tb_cla_sub: self-checking testbench of the registered carry look-ahead
// adder module. Random and corner-case operands and carry-ins are applied
// one per clock; one clock later sum and carry_out must equal the
// reference a + b + cin computed with plain integer arithmetic. Also
// checks that the output does not change before the clock edge (one cycle
// of latency). A second instance at W = 7 exercises the padded last group.
module tb_cla_sub;

  localparam int unsigned W  = 16;
  localparam int unsigned W2 = 7;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]  a, b, s;
  logic          ci, co;
  logic [W2-1:0] a2, b2, s2;
  logic          ci2, co2;

  int checks = 0, failures = 0;

  cla_sub #(.W(W)) dut (
    .clk, .a_in(a), .b_in(b), .carry_in(ci), .sum(s), .carry_out(co)
  );
  cla_sub #(.W(W2)) dut7 (
    .clk, .a_in(a2), .b_in(b2), .carry_in(ci2), .sum(s2), .carry_out(co2)
  );

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp, exp2;
    a = '0; b = '0; ci = 1'b0; a2 = '0; b2 = '0; ci2 = 1'b0;
    @(posedge clk);
    for (int n = 0; n < 1200; n++) begin
      @(negedge clk);
      case (n)
        0: begin a = 16'h0000; b = 16'h0001; ci = 1'b0; end  // borrow through all groups
        1: begin a = 16'h0000; b = 16'h0000; ci = 1'b1; end  // borrow-in through all groups
        2: begin a = 16'h8000; b = 16'h0001; ci = 1'b0; end  // signed wrap
        3: begin a = 16'h0001; b = 16'h0004; ci = 1'b0; end  // small negative result
        default: begin a = W'($urandom); b = W'($urandom); ci = 1'($urandom); end
      endcase
      a2 = W2'($urandom); b2 = W2'($urandom); ci2 = 1'($urandom);
      exp  = longint'(a) - longint'(b) - longint'(ci);
      exp2 = longint'(a2) - longint'(b2) - longint'(ci2);
      @(posedge clk); #1;
      check("sum", longint'(s), longint'(exp & 64'hFFFF));
      check("borrow_out", longint'(co), longint'((exp < 0) ? 1 : 0));
      check("sum7", longint'(s2), longint'(exp2 & 64'h7F));
      check("borrow_out7", longint'(co2), longint'((exp2 < 0) ? 1 : 0));
    end
    // latency: hold a new operand pair over a falling edge and confirm the
    // output still shows the previous result until the next rising edge
    @(negedge clk);
    a = 16'h3456; b = 16'h1111; ci = 1'b0;
    #2;
    check("no change before edge", longint'((s == 16'h2345) ? 1 : 0), longint'(0));
    @(posedge clk); #1;
    check("result after one edge", longint'(s), longint'(16'h2345));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
