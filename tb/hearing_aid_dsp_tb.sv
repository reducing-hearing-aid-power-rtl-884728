// hearing_aid_dsp_tb -- end-to-end testbench of the five-channel filter bank at its
// default size (15 unformed columns, 63 taps, five channels, unity output gain).
//
// Stimulus, in order: an impulse; five equal sinusoids at the channel centres (125,
// 375, 750, 1500 and 3000 Hz at 16 kHz sampling); uniformly distributed noise; and a
// full-scale 3 kHz tone that drives the output into saturation. Samples arrive with
// gaps of one to three idle cycles. For every sample the testbench recomputes all five
// channel outputs with the integer tap model (truncated product with the shifted
// coefficient, shifted back) and the recombined, clipped output, and compares them
// bit for bit; ch_valid must come one cycle and out_valid two cycles after in_valid.
//
// Mechanisms counted, each of which must occur: a tap whose unformed columns held ones
// (truncation lost something), a tap with a shifted coefficient (rounding one above
// column 15), a zero-coefficient tap with S = 15, a channel gain shift that dropped
// bits, an idle cycle between samples, and saturation at both ends of the output range.
module hearing_aid_dsp_tb;
  import tmm_ref_pkg::*;

  localparam int TAPS = 63;
  localparam int NCH  = 5;
  localparam int GSHR [NCH] = '{6, 6, 5, 4, 0};

  int checks = 0, failures = 0;
  int n_trunc = 0, n_shifted = 0, n_zero_tap = 0, n_gain_drop = 0, n_gap = 0;
  int n_sat_hi = 0, n_sat_lo = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst_n, in_valid, ch_valid, out_valid, out_sat;
  logic signed [15:0] in_sample, out_sample;
  logic signed [21:0] ch_y [NCH];
  logic signed [24:0] out_sum;

  hearing_aid_dsp dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_sample(in_sample),
    .ch_valid(ch_valid), .ch_y(ch_y), .out_valid(out_valid), .out_sum(out_sum),
    .out_sample(out_sample), .out_sat(out_sat));

  longint hist [TAPS];
  longint coef [NCH][TAPS];

  function automatic longint fdiv_pow2(input longint v, input int sh);
    longint d, q;
    d = longint'(1) << sh;
    q = v / d;
    if (v < 0 && q * d != v) q -= 1;
    return q;
  endfunction

  task automatic send(input longint v, input int gap);
    longint exp_ch [NCH];
    longint exp_sum, exp_out;
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = v;
    exp_sum = 0;
    for (int c = 0; c < NCH; c++) begin
      exp_ch[c] = 0;
      for (int k = 0; k < TAPS; k++) begin
        longint h, hs;
        int s;
        h = coef[c][k];
        s = ref_shift(h);
        hs = h * (longint'(1) << s);
        exp_ch[c] += ref_tap(hist[k], h, 15);
        if (hist[k] != 0 && s > 0 && h != 0) n_shifted++;
        if (h == 0) n_zero_tap++;
        for (int i = 0; i < 16; i++)
          for (int j = 0; j < 16; j++)
            if (i + j < 15 && hist[k][i] && hs[j]) begin
              n_trunc++;
              i = 16;
              break;
            end
      end
      if (GSHR[c] > 0 && (exp_ch[c] & ((longint'(1) << GSHR[c]) - 1)) != 0) n_gain_drop++;
      exp_sum += fdiv_pow2(exp_ch[c], GSHR[c]);
    end
    exp_out = exp_sum > 32767 ? 32767 : (exp_sum < -32768 ? -32768 : exp_sum);

    in_valid  <= 1'b1;
    in_sample <= 16'(v);
    @(posedge clk);
    in_valid <= 1'b0;
    #1;
    checks++;
    if (!ch_valid || out_valid) begin
      failures++;
      if (failures < 10) $display("FAIL ch_valid=%0b out_valid=%0b one cycle after input",
                                  ch_valid, out_valid);
    end
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (longint'(ch_y[c]) != exp_ch[c]) begin
        failures++;
        if (failures < 10)
          $display("FAIL channel %0d y=%0d expected %0d", c + 1, ch_y[c], exp_ch[c]);
      end
    end
    @(posedge clk);
    #1;
    checks++;
    if (!out_valid || ch_valid || longint'(out_sum) != exp_sum ||
        longint'(out_sample) != exp_out || out_sat != (exp_out != exp_sum)) begin
      failures++;
      if (failures < 10)
        $display("FAIL out_valid=%0b sum=%0d (exp %0d) out=%0d (exp %0d) sat=%0b",
                 out_valid, out_sum, exp_sum, out_sample, exp_out, out_sat);
    end
    if (out_sat && out_sample > 0) n_sat_hi++;
    if (out_sat && out_sample < 0) n_sat_lo++;
    for (int g = 0; g < gap; g++) begin
      @(posedge clk);
      n_gap++;
    end
  endtask

  function automatic longint tone_mix(input int n);
    real f [NCH] = '{125.0, 375.0, 750.0, 1500.0, 3000.0};
    real acc;
    acc = 0.0;
    foreach (f[c]) acc += $sin(2.0 * 3.14159265358979 * f[c] * n / 16000.0);
    return longint'($rtoi(6500.0 * acc));
  endfunction

  task automatic require(input string what, input int count);
    checks++;
    $display("  %-36s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    foreach (hist[k]) hist[k] = 0;
    for (int c = 0; c < NCH; c++)
      for (int k = 0; k < TAPS; k++)
        coef[c][k] = longint'($signed(ha_pkg::COEF[c][k]));
    rst_n = 1'b0; in_valid = 1'b0; in_sample = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    send(32767, 1);
    for (int n = 0; n < 70; n++) send(0, 0);
    for (int n = 0; n < 400; n++) send(tone_mix(n), n % 3);
    for (int n = 0; n < 400; n++) send(longint'($signed(16'($urandom))), $urandom_range(0, 2));
    for (int n = 0; n < 100; n++)
      send(longint'($rtoi(32767.0 * $sin(2.0 * 3.14159265358979 * 3000.0 * n / 16000.0))), 0);

    $display("mechanisms:");
    require("taps with formed-away ones", n_trunc);
    require("taps with a shifted coefficient", n_shifted);
    require("zero-coefficient taps (S = 15)", n_zero_tap);
    require("gain shifts that dropped bits", n_gain_drop);
    require("idle cycles between samples", n_gap);
    require("positive saturation", n_sat_hi);
    require("negative saturation", n_sat_lo);
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
