// hearing_aid_dsp -- five-channel hearing-aid filter bank on truncated-matrix
// multipliers.
//
// A 16-bit, 16 kHz sample stream (from the A/D converter) feeds five 63-tap FIR band
// filters in parallel: 0-250, 250-500, 500-1000, 1000-2000 and 2000-4000 Hz. Every
// multiplier in them is a truncated-matrix multiplier with R unformed columns, working
// on coefficients that were shifted left at design time and whose products are shifted
// back by a barrel shifter. The channel outputs go to the gain stage, which divides the
// softer channels relative to the 3 kHz reference channel and adds all five into one
// output sample.
//
// Interface: present a sample on in_sample with in_valid high for one clock (any rate
// up to one per clock; a hearing aid delivers one per 62.5 us). ch_y holds the five
// channel outputs one cycle later (ch_valid), out_sample/out_sum the recombined result
// two cycles later (out_valid). out_sat flags a clipped out_sample. Synchronous
// active-low reset clears all state.
//
// The five-band plan, the filter length, the coefficient shifting, the truncated
// multipliers and the channel gains follow the published system; the parallel
// structure, the handshake, the latencies and the output saturation are this
// implementation's choices.
module hearing_aid_dsp import ha_pkg::*; #(
  parameter int R       = 15,  // unformed columns in every multiplier
  parameter int OUT_SHL = 0    // overall output gain as a left shift
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  sample_t              in_sample,
  output logic                 ch_valid,
  output logic signed [N+5:0]  ch_y [NCH],
  output logic                 out_valid,
  output logic signed [N+8:0]  out_sum,
  output sample_t              out_sample,
  output logic                 out_sat
);

  logic [NCH-1:0] fir_valid;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    tmm_fir #(.CH(c + 1), .R(R)) u_fir (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid),
      .in_sample (in_sample),
      .out_valid (fir_valid[c]),
      .y         (ch_y[c])
    );
  end

  // All five filters see the same strobe, so their valid outputs move together.
  assign ch_valid = fir_valid[0];

  always_ff @(posedge clk) begin
    if (rst_n)
      assert (fir_valid == {NCH{fir_valid[0]}})
        else $error("hearing_aid_dsp: channel filters out of step");
  end

  channel_combiner #(.IN_W(N + 6), .OUT_SHL(OUT_SHL)) u_comb (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (ch_valid),
    .ch         (ch_y),
    .out_valid  (out_valid),
    .sum        (out_sum),
    .out_sample (out_sample),
    .sat        (out_sat)
  );

endmodule
