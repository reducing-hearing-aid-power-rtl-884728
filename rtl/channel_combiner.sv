// channel_combiner -- channel gain stage and recombination of the filter bank.
//
// The audiogram-derived gains (half-gain rule, rounded to powers of two) are 1, 1, 2, 4
// and 64 for channels 1..5. Multiplying by them would overflow, so the loudest channel
// (5) is taken as the reference and the others are divided instead: channels 1 and 2
// are shifted right by 6, channel 3 by 5, channel 4 by 4 (arithmetic shifts, truncating).
// The five scaled channels are added into `sum`. The sum is then shifted left by
// OUT_SHL for the overall gain and saturated to a 16-bit output sample; `sat` marks a
// clipped output.
//
// Interface: when in_valid is high at a rising edge the five channel values are
// combined and registered; out_valid follows one cycle later for one cycle, and the
// outputs hold until the next valid input. Synchronous active-low reset.
//
// The per-channel shifts follow the published gain plan. The overall gain shift (its
// amount is not specified, default 0), the saturation to 16 bits and the register
// stage are choices of this implementation.
module channel_combiner import ha_pkg::*; #(
  parameter int IN_W    = N + 6,  // width of a channel filter output
  parameter int OUT_SHL = 0       // overall gain, as a left shift of the sum
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic signed [IN_W-1:0]      ch [NCH],  // channel filter outputs, channel 1 first
  output logic                        out_valid,
  output logic signed [IN_W+2:0]      sum,       // recombined signal before the gain
  output sample_t                     out_sample,// gained and saturated output
  output logic                        sat        // out_sample was clipped
);

  localparam int SUM_W = IN_W + 3;
  localparam int G_W   = SUM_W + OUT_SHL;

  logic signed [SUM_W-1:0] sum_c;
  logic signed [G_W-1:0]   gained;
  sample_t                 out_c;
  logic                    sat_c;

  always_comb begin
    sum_c = '0;
    for (int c = 0; c < NCH; c++) sum_c = sum_c + SUM_W'(ch[c] >>> GAIN_SHR[c]);
    gained = G_W'(sum_c) <<< OUT_SHL;
    if (gained > G_W'(32'sd32767)) begin
      out_c = 16'sh7fff;
      sat_c = 1'b1;
    end else if (gained < -G_W'(32'sd32768)) begin
      out_c = -16'sh8000;
      sat_c = 1'b1;
    end else begin
      out_c = sample_t'(gained);
      sat_c = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      sum        <= '0;
      out_sample <= '0;
      sat        <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sum        <= sum_c;
        out_sample <= out_c;
        sat        <= sat_c;
      end
    end
  end

endmodule
