// ha_workload_tb -- the two evaluation workloads of the filter bank, run on the design
// with several numbers of unformed columns.
//
// Four copies of the filter bank see the same input: R = 0 (every partial product
// formed: the full-width reference), R = 5, R = 10 and the default R = 15. Workload 1 is
// five sinusoids of equal amplitude at the channel centre frequencies 125, 375, 750, 1500
// and 3000 Hz, sampled at 16 kHz; workload 2 is uniformly distributed 16-bit noise.
// Each runs for 2000 samples after a 63-sample settling period. For each R the
// testbench reports the mean-squared difference of the five channel outputs and of the
// recombined output against the R = 0 copy, and checks that:
//  * the error grows with R and stays small: at R = 15 the channel outputs differ from
//    full width by less than 16 LSB^2 on average, and by less than 1 LSB^2 at R = 5;
//  * the two workloads give errors of the same order (within a factor of 4);
//  * the gains reach the output: with the sinusoids, the RMS of the 3 kHz channel in
//    the recombined signal is 40..90 times that of the 125 Hz channel (gain 64 vs 1).
module ha_workload_tb;
  localparam int NCH = 5;
  localparam int NR  = 4;
  localparam int RS [NR] = '{0, 5, 10, 15};
  localparam int NS  = 2000;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst_n, in_valid;
  logic signed [15:0] in_sample;
  logic               ch_valid [NR], out_valid [NR], out_sat [NR];
  logic signed [21:0] ch_y [NR][NCH];
  logic signed [24:0] out_sum [NR];
  logic signed [15:0] out_sample [NR];

  for (genvar g = 0; g < NR; g++) begin : g_dut
    if (RS[g] == 15) begin : g_default
      hearing_aid_dsp u (
        .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sample(in_sample),
        .ch_valid(ch_valid[g]), .ch_y(ch_y[g]), .out_valid(out_valid[g]),
        .out_sum(out_sum[g]), .out_sample(out_sample[g]), .out_sat(out_sat[g]));
    end else begin : g_reduced
      hearing_aid_dsp #(.R(RS[g])) u (
        .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sample(in_sample),
        .ch_valid(ch_valid[g]), .ch_y(ch_y[g]), .out_valid(out_valid[g]),
        .out_sum(out_sum[g]), .out_sample(out_sample[g]), .out_sat(out_sat[g]));
    end
  end

  real mse_ch  [2][NR];
  real mse_out [2][NR];
  real rms_lo, rms_hi;

  task automatic run(input int wl);
    real f [NCH] = '{125.0, 375.0, 750.0, 1500.0, 3000.0};
    real e_ch [NR], e_out [NR];
    int  n;
    foreach (e_ch[r]) begin e_ch[r] = 0.0; e_out[r] = 0.0; end
    rms_lo = 0.0; rms_hi = 0.0;
    n = 0;
    for (int i = 0; i < NS + 63; i++) begin
      longint v;
      if (wl == 0) begin
        real acc;
        acc = 0.0;
        foreach (f[c]) acc += $sin(2.0 * 3.14159265358979 * f[c] * i / 16000.0);
        v = longint'($rtoi(6500.0 * acc));
      end else begin
        v = longint'($signed(16'($urandom)));
      end
      in_valid  <= 1'b1;
      in_sample <= 16'(v);
      @(posedge clk);
      in_valid <= 1'b0;
      @(posedge clk);
      #1;
      if (i >= 63) begin
        n++;
        for (int r = 0; r < NR; r++) begin
          for (int c = 0; c < NCH; c++) begin
            real d;
            d = real'(ch_y[r][c]) - real'(ch_y[0][c]);
            e_ch[r] += d * d / NCH;
          end
          e_out[r] += (real'(out_sum[r]) - real'(out_sum[0])) ** 2;
        end
        rms_lo += (real'(ch_y[NR-1][0]) / 64.0) ** 2;
        rms_hi += real'(ch_y[NR-1][4]) ** 2;
      end
    end
    for (int r = 0; r < NR; r++) begin
      mse_ch[wl][r]  = e_ch[r] / n;
      mse_out[wl][r] = e_out[r] / n;
      $display("  %s R=%2d: channel MSE %8.4f  output MSE %8.4f",
               wl == 0 ? "sinusoids" : "noise    ", RS[r], mse_ch[wl][r], mse_out[wl][r]);
    end
    rms_lo = $sqrt(rms_lo / n);
    rms_hi = $sqrt(rms_hi / n);
  endtask

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_sample = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    $display("mean-squared difference against the full-width (R = 0) filter bank:");
    run(0);
    $display("  3 kHz / 125 Hz channel RMS in the output: %f", rms_hi / rms_lo);
    expect_true(rms_hi / rms_lo > 40.0 && rms_hi / rms_lo < 90.0,
                "3 kHz channel not amplified about 64 times relative to 125 Hz");
    rst_n <= 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(1);

    for (int w = 0; w < 2; w++) begin
      expect_true(mse_ch[w][0] == 0.0, "reference differs from itself");
      expect_true(mse_ch[w][1] < 1.0, "R = 5 error too large");
      expect_true(mse_ch[w][1] <= mse_ch[w][2] && mse_ch[w][2] <= mse_ch[w][3],
                  "error does not grow with R");
      expect_true(mse_ch[w][3] > 0.0 && mse_ch[w][3] < 16.0, "R = 15 error out of range");
    end
    expect_true(mse_ch[0][3] < 4.0 * mse_ch[1][3] && mse_ch[1][3] < 4.0 * mse_ch[0][3],
                "sinusoid and noise errors differ by more than a factor of 4");

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
