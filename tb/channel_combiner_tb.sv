// channel_combiner_tb -- self-checking testbench for the gain and recombination stage.
//
// Random channel values (small, full-range and extreme) are applied; the expected sum is
// ch1/64 + ch2/64 + ch3/32 + ch4/16 + ch5 with each division rounding toward minus
// infinity, and the expected output is that sum clipped to 16 bits. A second instance
// with an overall gain of 2^3 is checked as well. Saturation in both directions must
// occur, and out_valid must follow in_valid by exactly one cycle.
module channel_combiner_tb;
  int checks = 0, failures = 0, n_sat_hi = 0, n_sat_lo = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst_n, in_valid;
  logic signed [21:0] ch [5];
  logic               ov0, ov3, sat0, sat3;
  logic signed [24:0] sum0, sum3;
  logic signed [15:0] o0, o3;

  channel_combiner dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .ch(ch),
    .out_valid(ov0), .sum(sum0), .out_sample(o0), .sat(sat0));
  channel_combiner #(.OUT_SHL(3)) dut3 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .ch(ch), .out_valid(ov3), .sum(sum3), .out_sample(o3), .sat(sat3));

  function automatic longint fdiv(input longint v, input int d);
    longint q;
    q = v / d;
    if (v < 0 && q * d != v) q -= 1;
    return q;
  endfunction

  function automatic longint clip(input longint v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
  endfunction

  task automatic apply(input longint c1, c2, c3, c4, c5);
    longint e;
    ch[0] = 22'(c1); ch[1] = 22'(c2); ch[2] = 22'(c3); ch[3] = 22'(c4); ch[4] = 22'(c5);
    e = fdiv(c1, 64) + fdiv(c2, 64) + fdiv(c3, 32) + fdiv(c4, 16) + c5;
    in_valid <= 1'b1;
    @(posedge clk);
    in_valid <= 1'b0;
    #1;
    checks += 4;
    if (!ov0 || !ov3) begin failures++; $display("FAIL out_valid missing"); end
    if (longint'(sum0) != e) begin
      failures++;
      if (failures < 10) $display("FAIL sum=%0d expected %0d", sum0, e);
    end
    if (longint'(o0) != clip(e) || sat0 != (clip(e) != e)) begin
      failures++;
      if (failures < 10) $display("FAIL out=%0d sat=%0b for sum %0d", o0, sat0, e);
    end
    if (longint'(o3) != clip(e * 8) || sat3 != (clip(e * 8) != e * 8)) begin
      failures++;
      if (failures < 10) $display("FAIL gain-8 out=%0d for sum %0d", o3, e);
    end
    if (sat0 && o0 > 0) n_sat_hi++;
    if (sat0 && o0 < 0) n_sat_lo++;
    @(posedge clk);
    #1;
    checks++;
    if (ov0) begin failures++; $display("FAIL out_valid longer than one cycle"); end
  endtask

  function automatic longint rnd22(input int range_bits);
    return longint'($signed(22'($urandom))) >>> (22 - range_bits);
  endfunction

  initial begin
    rst_n = 1'b0; in_valid = 1'b0;
    foreach (ch[c]) ch[c] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    apply(0, 0, 0, 0, 0);
    apply(-1, -1, -1, -1, -1);
    apply(2097151, 2097151, 2097151, 2097151, 2097151);
    apply(-2097152, -2097152, -2097152, -2097152, -2097152);
    for (int i = 0; i < 3000; i++) begin
      int bits;
      bits = 12 + (i % 11);
      apply(rnd22(bits), rnd22(bits), rnd22(bits), rnd22(bits), rnd22(bits));
    end
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++;
      $display("FAIL saturation not exercised (%0d high, %0d low)", n_sat_hi, n_sat_lo);
    end
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
