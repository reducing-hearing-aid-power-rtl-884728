// barrel_shifter_tb -- self-checking testbench for the four-stage arithmetic right
// shifter. Every shift amount 0..15 is applied to corner values and to random values;
// the expected result is built by repeated halving with rounding toward minus
// infinity, independently of the shift operator. A watchdog ends a stuck run.
module barrel_shifter_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [15:0] d, q;
  logic [3:0]         s;
  barrel_shifter dut (.d(d), .s(s), .q(q));

  function automatic int floor_div_pow2(input int v, input int n);
    int r;
    r = v;
    for (int i = 0; i < n; i++) r = (r < 0 && (r % 2) != 0) ? (r - 1) / 2 : r / 2;
    return r;
  endfunction

  task automatic check(input int v, input int n);
    int e;
    d = 16'(v); s = 4'(n);
    @(posedge clk);
    e = floor_div_pow2(v, n);
    checks++;
    if (int'(q) != e) begin
      failures++;
      if (failures < 10) $display("FAIL d=%0d s=%0d q=%0d expected %0d", v, n, q, e);
    end
  endtask

  initial begin
    int corner [7] = '{0, 1, -1, 32767, -32768, 21845, -21846};
    foreach (corner[i])
      for (int n = 0; n < 16; n++) check(corner[i], n);
    for (int k = 0; k < 5000; k++) check(int'($signed(16'($urandom))), k % 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
