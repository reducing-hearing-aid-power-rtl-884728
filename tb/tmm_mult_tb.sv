// tmm_mult_tb -- self-checking testbench for the truncated-matrix multiplier.
//
// Three instances are checked bit for bit against the integer model of tmm_ref_pkg:
//  * the default 16x16 multiplier with 15 unformed columns, on corner operands and
//    random operands with every shift amount 0..15;
//  * the 8x8 multiplier with r = 6 and k = 2 (shift amounts 0..3), exhaustively;
//  * a 16x16 multiplier with no unformed columns, which must give the exactly rounded
//    product round(a*b / 2^16) for s = 0.
// For the default multiplier the mean error against the exact product is also checked
// to be well below one output LSB: the correction constant must remove the bias of the
// missing columns. A watchdog ends the run after a fixed number of cycles.
module tmm_mult_tb;
  import tmm_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // default instance
  logic signed [15:0] a16, b16, p16, p16_full;
  logic [3:0]         s16;
  tmm_mult dut (.a(a16), .b(b16), .s(s16), .p(p16));
  tmm_mult #(.N(16), .R(0), .SW(4)) dut_full (.a(a16), .b(b16), .s(s16), .p(p16_full));

  // 8x8 instance with r = 6, k = 2
  logic signed [7:0] a8, b8, p8;
  logic [1:0]        s8;
  tmm_mult #(.N(8), .R(6), .SW(2)) dut8 (.a(a8), .b(b8), .s(s8), .p(p8));

  task automatic check16(input longint a, input longint b, input int s);
    longint exp_p, exp_full;
    a16 = 16'(a); b16 = 16'(b); s16 = 4'(s);
    #1;
    exp_p = ref_tmm(a, b, s, 16, 15);
    checks++;
    if (longint'(p16) != exp_p) begin
      failures++;
      if (failures < 10)
        $display("FAIL r=15 a=%0d b=%0d s=%0d p=%0d expected %0d", a, b, s, p16, exp_p);
    end
    if (s == 0) begin
      exp_full = ((a * b) + (longint'(1) << 15)) >>> 16;
      checks++;
      if (longint'(p16_full) != exp_full) begin
        failures++;
        if (failures < 10)
          $display("FAIL r=0 a=%0d b=%0d p=%0d expected %0d", a, b, p16_full, exp_full);
      end
    end
  endtask

  initial begin
    longint corner [8] = '{0, 1, -1, 32767, -32768, 12345, -3214, 16384};
    real err_sum;
    int  nerr;

    // corners, every shift amount
    foreach (corner[i])
      foreach (corner[j])
        for (int s = 0; s < 16; s++) check16(corner[i], corner[j], s);

    // random operands
    err_sum = 0.0;
    nerr = 0;
    for (int n = 0; n < 20000; n++) begin
      longint a, b;
      a = longint'($signed(16'($urandom)));
      b = longint'($signed(16'($urandom)));
      check16(a, b, n % 16);
      if (n % 16 == 0) begin
        err_sum += real'(p16) - real'(a * b) / 65536.0;
        nerr++;
      end
    end
    checks++;
    if (err_sum / nerr > 0.25 || err_sum / nerr < -0.25) begin
      failures++;
      $display("FAIL mean error of r=15 product %f LSB", err_sum / nerr);
    end
    $display("mean error of the r=15 product: %f LSB over %0d samples", err_sum / nerr, nerr);

    // 8x8, r = 6, k = 2: exhaustive
    for (int a = -128; a < 128; a++)
      for (int b = -128; b < 128; b++)
        for (int s = 0; s < 4; s++) begin
          longint e;
          a8 = 8'(a); b8 = 8'(b); s8 = 2'(s);
          #1;
          e = ref_tmm(a, b, s, 8, 6);
          checks++;
          if (longint'(p8) != e) begin
            failures++;
            if (failures < 10)
              $display("FAIL 8x8 a=%0d b=%0d s=%0d p=%0d expected %0d", a, b, s, p8, e);
          end
        end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
