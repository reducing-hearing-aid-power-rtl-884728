// tmm_fir_tb -- self-checking testbench for one 63-tap channel filter (channel 3,
// the 500-1000 Hz band, with 15 unformed columns per multiplier).
//
// The shift amount and shifted coefficient stored in every tap are first compared with
// the published table. A stream of samples (an impulse, full-scale steps, then random
// values with random gaps between the in_valid strobes) is fed in. For every accepted
// sample the testbench rebuilds the expected output from its own copy of the 500-1000 Hz coefficients and the
// integer tap model: y = sum over taps of (truncated product with the shifted
// coefficient) >>> S. It also checks that out_valid comes exactly one cycle after
// in_valid, that the output holds between samples, and that y stays within a few LSB of
// the exact convolution sum h*x / 2^16 (at most 20 LSB; mean-squared error on the
// random part below 10 LSB^2).
module tmm_fir_tb;
  import tmm_ref_pkg::*;

  localparam int TAPS = 63;
  // round(h * 2^16) of the 500-1000 Hz Hamming-windowed band-pass filter (taps 0..31;
  // the filter is symmetric).
  localparam int H_HALF [32] = '{-12, -22, -29, -27, -10, 29, 98, 200, 333, 482, 624,
    724, 745, 647, 402, 0, -546, -1194, -1876, -2504, -2981, -3214, -3131, -2694,
    -1911, -834, 438, 1773, 3023, 4042, 4708, 4939};

  // Shift amounts S of taps 0..31 as tabulated with the published filter.
  localparam int S_HALF [32] = '{11, 10, 10, 10, 11, 10, 8, 7, 6, 6, 5, 5, 5, 5, 6, 15,
    5, 4, 4, 3, 3, 3, 3, 3, 4, 5, 6, 4, 3, 3, 2, 2};

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                rst_n, in_valid, out_valid;
  logic signed [15:0]  in_sample;
  logic signed [21:0]  y;

  tmm_fir #(.CH(3), .R(15)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sample(in_sample),
    .out_valid(out_valid), .y(y));

  longint hist [TAPS];
  real    max_dev = 0.0;
  real    sq_sum  = 0.0;
  int     n_sq    = 0;
  bit     track_mse = 1'b0;

  function automatic longint h_of(input int k);
    return (k < 32) ? H_HALF[k] : H_HALF[TAPS - 1 - k];
  endfunction

  task automatic send(input longint v, input int gap);
    longint exp_y;
    real    exact, dev;
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = v;
    exp_y = 0;
    exact = 0.0;
    for (int k = 0; k < TAPS; k++) begin
      exp_y += ref_tap(hist[k], h_of(k), 15);
      exact += real'(hist[k] * h_of(k)) / 65536.0;
    end
    in_valid  <= 1'b1;
    in_sample <= 16'(v);
    @(posedge clk);
    in_valid <= 1'b0;
    #1;
    checks++;
    if (!out_valid || longint'(y) != exp_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL sample=%0d valid=%0b y=%0d expected %0d", v, out_valid, y, exp_y);
    end
    dev = real'(y) - exact;
    if (dev < 0) dev = -dev;
    if (dev > max_dev) max_dev = dev;
    if (track_mse) begin
      sq_sum += dev * dev;
      n_sq++;
    end
    for (int g = 0; g < gap; g++) begin
      @(posedge clk);
      #1;
      checks++;
      if (out_valid || longint'(y) != exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL output did not hold between samples");
      end
    end
  endtask

  // The stored coefficients and shift amounts of the design must be the tabulated ones.
  for (genvar k = 0; k < TAPS; k++) begin : g_coef_chk
    localparam int SK = (k < 32) ? S_HALF[k] : S_HALF[TAPS - 1 - k];
    initial begin
      #1;
      checks++;
      if (int'(dut.g_tap[k].S) != SK ||
          longint'(dut.g_tap[k].HS) != h_of(k) * (longint'(1) << SK)) begin
        failures++;
        $display("FAIL tap %0d stores S=%0d h'=%0d, expected S=%0d h'=%0d", k,
                 dut.g_tap[k].S, dut.g_tap[k].HS, SK, h_of(k) * (longint'(1) << SK));
      end
    end
  end

  initial begin
    foreach (hist[k]) hist[k] = 0;
    rst_n = 1'b0; in_valid = 1'b0; in_sample = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    send(32767, 0);
    for (int i = 0; i < 70; i++) send(0, i % 3);
    for (int i = 0; i < 70; i++) send(-32768, 0);
    for (int i = 0; i < 70; i++) send(32767, 0);
    track_mse = 1'b1;
    for (int i = 0; i < 1000; i++) send(longint'($signed(16'($urandom))), $urandom_range(0, 2));
    checks++;
    if (max_dev > 20.0) begin
      failures++;
      $display("FAIL largest deviation from the exact sum %f LSB", max_dev);
    end
    checks++;
    if (sq_sum / n_sq > 10.0) begin
      failures++;
      $display("FAIL mean-squared error on random input %f", sq_sum / n_sq);
    end
    $display("largest deviation from the exact convolution: %f LSB", max_dev);
    $display("mean-squared error on random input: %f LSB^2", sq_sum / n_sq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
