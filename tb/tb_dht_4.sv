// tb_dht_4: self-checking testbench of the 4-point Hadamard transform.
//
// A new input vector is applied on every clock: first the example vector
// (1, 2, 3, 4), whose transform is (10, -2, -4, 0), then overflow corner
// cases and random vectors. The output seen exactly two clocks after a
// vector was applied must equal y(k) = sum_n (-1)^popcount(k & n) x(n)
// reduced to 16 bits, computed here with integers; a wrong latency shows
// up as mismatches on every vector.
module tb_dht_4;

  localparam int unsigned W   = 16;
  localparam int unsigned N   = 4;
  localparam int unsigned LAT = 2;
  localparam int unsigned NVEC = 600;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] x [N];
  logic signed [W-1:0] y [N];

  dht_4 dut (
    .clk,
    .x0(x[0]), .x1(x[1]), .x2(x[2]), .x3(x[3]),
    .y0(y[0]), .y1(y[1]), .y2(y[2]), .y3(y[3])
  );

  int checks = 0, failures = 0;
  logic signed [W-1:0] hist_x [NVEC][N];

  function automatic logic signed [W-1:0] ref_y(input int k, input logic signed [W-1:0] v [N]);
    int acc = 0;
    for (int n = 0; n < int'(N); n++)
      acc += ($countones(k & n) % 2 == 1) ? -int'(v[n]) : int'(v[n]);
    return W'(acc);
  endfunction

  initial begin : watchdog
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] v [N];
    for (int n = 0; n < int'(N); n++) x[n] = '0;
    for (int t = 0; t < int'(NVEC + LAT); t++) begin
      @(negedge clk);
      // outputs for the vector applied LAT clocks ago
      if (t >= int'(LAT)) begin
        for (int k = 0; k < int'(N); k++) begin
          checks++;
          if (y[k] !== ref_y(k, hist_x[t - LAT])) begin
            failures++;
            $display("FAIL vec %0d y%0d: got %0d expected %0d", t - LAT, k, y[k],
                     ref_y(k, hist_x[t - LAT]));
          end
        end
      end
      if (t < int'(NVEC)) begin
        for (int n = 0; n < int'(N); n++) begin
          case (t)
            0: v[n] = W'(n + 1);                    // (1, 2, 3, 4)
            1: v[n] = 16'sh7FFF;                    // sum overflows
            2: v[n] = 16'sh8000;                    // most negative
            3: v[n] = (n % 2 == 0) ? 16'sh7FFF : 16'sh8000;
            default: v[n] = W'($urandom);
          endcase
          x[n] = v[n];
          hist_x[t][n] = v[n];
        end
      end
    end
    // the worked example, spelled out
    checks++;
    if (ref_y(0, hist_x[0]) != 10 || ref_y(1, hist_x[0]) != -2 ||
        ref_y(2, hist_x[0]) != -4 || ref_y(3, hist_x[0]) != 0) begin
      failures++;
      $display("FAIL reference model disagrees with the worked example");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
