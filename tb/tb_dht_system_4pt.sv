// tb_dht_system_4pt: end-to-end testbench of the Hadamard-transform
// prototype built around the 4-point core (POINTS = 4), 64-word x 16-bit
// memory.
//
// Same procedure as the 8-point system test: the memory holds the example
// vector (1, 2, 3, 4) in its first group and random samples elsewhere.
// One pass must leave in every group the 4-point transform of the original
// group, y(k) = sum_n (-1)^popcount(k & n) x(n) mod 2^16, the first group
// reading (10, -2, -4, 0); a second pass must give 4 times the original
// words (H4 * H4 = 4 I). A pass must take 1 + 16 * (2*4 + 2) = 161 cycles.
// Counted and required: group reads, pipeline waits, write-backs, done
// pulses, wrapped results and the back-to-back second pass.
module tb_dht_system_4pt;

  localparam int unsigned P     = 4;
  localparam int unsigned W     = 16;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned AW    = 6;
  localparam int unsigned LAT   = 2;
  localparam int NGROUPS         = int'(DEPTH / P);
  localparam int PASS_CYCLES     = 1 + NGROUPS * int'(2*P + LAT);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n, start, busy, done, we;
  logic [AW-1:0] a;
  logic [W-1:0]  d, spo;

  dht_system #(.POINTS(P)) dut (
    .clk, .rst_n, .start, .busy, .done,
    .mem_a(a), .mem_d(d), .mem_we(we), .mem_spo(spo)
  );

  dist_mem_model #(.DEPTH(DEPTH), .AW(AW), .W(W)) u_mem (
    .clk, .a, .d, .we, .spo
  );

  int checks = 0, failures = 0;
  int n_reads = 0, n_waits = 0, n_writes = 0, n_dones = 0, n_wraps = 0, n_passes = 0;
  logic [W-1:0] orig [DEPTH];
  logic [W-1:0] expect_mem [DEPTH];

  // event counters, seen only on the memory port: a read-and-wait phase
  // is a run of busy cycles without a write, a write-back a run of writes
  int  idle_run = 0;
  logic we_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (busy && !we) idle_run++;
    if (we && !we_q) begin
      n_writes++;
      if (idle_run >= int'(P))       n_reads++;
      if (idle_run == int'(P + LAT)) n_waits++;
      idle_run = 0;
    end
    if (done) n_dones++;
    we_q <= we;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic logic [W-1:0] ref_y(input int g, input int k, output bit wrapped);
    int acc = 0;
    for (int n = 0; n < int'(P); n++)
      acc += ($countones(k & n) % 2 == 1) ? -int'($signed(orig[g*P + n])) : int'($signed(orig[g*P + n]));
    wrapped = (acc > 32767 || acc < -32768);
    return W'(acc);
  endfunction

  task automatic run_pass();
    int cycles = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    while (!done && cycles < 1000) begin
      @(negedge clk);
      cycles++;
    end
    check("cycles start to done", longint'(cycles), longint'(PASS_CYCLES));
    n_passes++;
    @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit wr;
    start = 1'b0;
    rst_n = 1'b0;
    for (int k = 0; k < int'(DEPTH); k++) begin
      orig[k] = (k < int'(P)) ? W'(k + 1) : W'($urandom);
      if (k >= 8 && k < 12) orig[k] = 16'h7000;  // a group that overflows
      u_mem.mem[k] = orig[k];
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // first pass: forward transform
    run_pass();
    for (int g = 0; g < int'(DEPTH / P); g++)
      for (int k = 0; k < int'(P); k++) begin
        expect_mem[g*P + k] = ref_y(g, k, wr);
        if (wr) n_wraps++;
        check($sformatf("pass1 mem[%0d]", g*P + k), longint'(u_mem.mem[g*P + k]), longint'(expect_mem[g*P + k]));
      end
    check("example y0", longint'($signed(u_mem.mem[0])), longint'(10));
    check("example y1", longint'($signed(u_mem.mem[1])), longint'(-2));
    check("example y2", longint'($signed(u_mem.mem[2])), longint'(-4));
    check("example y3", longint'($signed(u_mem.mem[3])), longint'(0));

    // second pass: H4 (H4 x) = 4 x
    run_pass();
    for (int k = 0; k < int'(DEPTH); k++)
      check($sformatf("pass2 mem[%0d]", k), longint'(u_mem.mem[k]), longint'(W'(orig[k] * 4)));

    // every mechanism seen
    check("group reads", longint'(n_reads), longint'(2 * NGROUPS));
    check("pipeline waits", longint'(n_waits), longint'(2 * NGROUPS));
    check("group write-backs", longint'(n_writes), longint'(2 * NGROUPS));
    check("done pulses", longint'(n_dones), longint'(2));
    check("wrapped results seen", longint'((n_wraps > 0) ? 1 : 0), longint'(1));
    check("back-to-back passes", longint'(n_passes), longint'(2));
    $display("reads=%0d waits=%0d writes=%0d dones=%0d wraps=%0d passes=%0d",
             n_reads, n_waits, n_writes, n_dones, n_wraps, n_passes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
