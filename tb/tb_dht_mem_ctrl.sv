// tb_dht_mem_ctrl: self-checking testbench of the memory sequencer.
//
// The sequencer runs over a 64-word memory model with a stand-in core:
// a LATENCY-deep register pipeline computing y[i] = x[P-1-i] ^ 16'h5A5A
// + i, so that every word's destination and the waiting time are both
// visible in the results (a sequencer that writes before the pipeline has
// delivered stores stale values). Checks: every memory word after the
// pass, the cycle count from start to done (1 + groups * (2P + LATENCY)),
// a single done pulse, busy during the pass, that a start pulse while busy
// is ignored, and that a second pass over the results works too.
module tb_dht_mem_ctrl;

  localparam int unsigned P     = 8;
  localparam int unsigned W     = 16;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned AW    = 6;
  localparam int unsigned LAT   = 3;
  localparam int NGROUPS         = int'(DEPTH / P);
  localparam int PASS_CYCLES     = 1 + NGROUPS * int'(2*P + LAT);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n, start, busy, done, we;
  logic [AW-1:0] a;
  logic [W-1:0]  d, spo;
  logic [W-1:0]  x [P];
  logic [W-1:0]  y [P];
  logic [W-1:0]  pipe [LAT][P];

  dht_mem_ctrl #(.POINTS(P), .W(W), .DEPTH(DEPTH), .AW(AW), .LATENCY(LAT)) dut (
    .clk, .rst_n, .start, .busy, .done,
    .mem_a(a), .mem_d(d), .mem_we(we), .mem_spo(spo),
    .dht_x(x), .dht_y(y)
  );

  dist_mem_model #(.DEPTH(DEPTH), .AW(AW), .W(W)) u_mem (
    .clk, .a, .d, .we, .spo
  );

  // stand-in transform core with the same latency as dht_8
  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(P); i++) pipe[0][i] <= (x[P-1-i] ^ 16'h5A5A) + W'(i);
    for (int s = 1; s < int'(LAT); s++) pipe[s] <= pipe[s-1];
  end
  assign y = pipe[LAT-1];

  int checks = 0, failures = 0;
  logic [W-1:0] expect_mem [DEPTH];

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_pass(input bit poke_start);
    int cycles = 0, dones = 0;
    bit busy_ok = 1'b1;
    for (int g = 0; g < int'(DEPTH / P); g++)
      for (int i = 0; i < int'(P); i++)
        expect_mem[g*P + i] = (u_mem.mem[g*P + P-1-i] ^ 16'h5A5A) + W'(i);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    while (!done && cycles < 1000) begin
      if (!busy) busy_ok = 1'b0;
      if (poke_start && cycles == 40) start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles++;
    end
    check("cycles start to done", longint'(cycles), longint'(PASS_CYCLES));
    dones = int'(done);
    @(negedge clk);
    check("busy during pass", longint'(busy_ok), longint'(1));
    check("idle after done", longint'(busy), longint'(0));
    repeat (30) begin
      dones += int'(done);
      @(negedge clk);
    end
    check("single done pulse", longint'(dones), longint'(1));
    for (int k = 0; k < int'(DEPTH); k++) check($sformatf("mem[%0d]", k), longint'(u_mem.mem[k]), longint'(expect_mem[k]));
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0;
    rst_n = 1'b0;
    for (int k = 0; k < int'(DEPTH); k++) u_mem.mem[k] = W'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check("idle after reset", longint'(busy), longint'(0));
    run_pass(1'b1);
    run_pass(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
