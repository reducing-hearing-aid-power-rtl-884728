// tmm_fir -- 63-tap FIR channel filter built from truncated-matrix multipliers.
//
// Computes y[i] = sum_k h[k] x[i-k] / 2^16, the integer coefficients h[k] being the
// filter taps scaled by 2^16. Every tap holds its coefficient pre-shifted left by S_k, multiplies
// it with the delayed sample in a tmm_mult (R unformed columns, correction constant,
// rounding bit for S_k) and shifts the product back right by S_k in a barrel_shifter.
// The 63 tap results are added into an accumulator of N + 6 bits, wide enough for any
// input. The coefficient set (channel CH of ha_pkg), the shifted coefficients and the
// shift amounts are constants fixed at elaboration.
//
// Interface: a new sample is accepted when in_valid is high at a rising clock edge. The
// filter output for that sample, using it and the 62 previous samples, is registered at
// that same edge: out_valid is high for one cycle and y holds the value until the next
// sample. Synchronous active-low reset clears the delay line and the output.
//
// The direct-form structure with one multiplier and one shifter per tap, the one-cycle
// latency, the in_valid strobe and the reset behaviour are choices of this
// implementation; the tap arithmetic follows the published scheme.
module tmm_fir import ha_pkg::*; #(
  parameter int CH = 3,   // channel whose coefficient set is used, 1..NCH
  parameter int R  = 15   // unformed columns in each multiplier
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  sample_t                    in_sample,
  output logic                       out_valid,
  output logic signed [N+5:0]        y
);

  localparam int ACC_W = N + $clog2(TAPS);

  // Delay line: x_d[0] is the previous sample, x_d[TAPS-2] the oldest one still used.
  sample_t x_d [TAPS-1];
  sample_t x   [TAPS];   // x[k] = x[i-k] with x[0] the incoming sample
  sample_t t   [TAPS];   // tap results after the right shift
  logic signed [ACC_W-1:0] acc;

  always_comb begin
    x[0] = in_sample;
    for (int k = 1; k < TAPS; k++) x[k] = x_d[k-1];
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    localparam int     S_K = coef_shift(COEF[CH-1][k]);
    localparam shamt_t S   = shamt_t'(S_K);
    localparam sample_t HS = sample_t'(shifted_coef(COEF[CH-1][k]));
    sample_t p;

    tmm_mult #(.N(N), .R(R), .SW(SW)) u_mult (
      .a (x[k]),
      .b (HS),
      .s (S),
      .p (p)
    );

    barrel_shifter #(.W(N), .SW(SW)) u_shift (
      .d (p),
      .s (S),
      .q (t[k])
    );
  end

  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++) acc = acc + ACC_W'(t[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS - 1; k++) x_d[k] <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x_d[0] <= in_sample;
        for (int k = 1; k < TAPS - 1; k++) x_d[k] <= x_d[k-1];
        y <= acc;
      end
    end
  end

  initial begin
    assert (CH >= 1 && CH <= NCH) else $error("tmm_fir: CH must lie in 1..NCH");
  end

endmodule
