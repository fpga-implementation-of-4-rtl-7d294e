// tb_dht_8: self-checking testbench of the 8-point Hadamard transform.
//
// A new input vector is applied on every clock: first the example vector
// (1, ..., 8), whose transform is (36, -4, -8, 0, -16, 0, 0, 0), then overflow corner
// cases and random vectors. The output seen exactly three clocks after a
// vector was applied must equal y(k) = sum_n (-1)^popcount(k & n) x(n)
// reduced to 16 bits, computed here with integers; a wrong latency shows
// up as mismatches on every vector.
module tb_dht_8;

  localparam int unsigned W   = 16;
  localparam int unsigned N   = 8;
  localparam int unsigned LAT = 3;
  localparam int unsigned NVEC = 600;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] x [N];
  logic signed [W-1:0] y [N];

  dht_8 dut (
    .clk,
    .x80(x[0]), .x81(x[1]), .x82(x[2]), .x83(x[3]),
    .x84(x[4]), .x85(x[5]), .x86(x[6]), .x87(x[7]),
    .y80(y[0]), .y81(y[1]), .y82(y[2]), .y83(y[3]),
    .y84(y[4]), .y85(y[5]), .y86(y[6]), .y87(y[7])
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
    if (ref_y(0, hist_x[0]) != 36  || ref_y(1, hist_x[0]) != -4 ||
        ref_y(2, hist_x[0]) != -8  || ref_y(3, hist_x[0]) != 0  ||
        ref_y(4, hist_x[0]) != -16 || ref_y(5, hist_x[0]) != 0  ||
        ref_y(6, hist_x[0]) != 0   || ref_y(7, hist_x[0]) != 0) begin
      failures++;
      $display("FAIL reference model disagrees with the worked example");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
