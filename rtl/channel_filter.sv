// channel_filter: linear-phase FIR channel filter whose coefficient
// multipliers are realised by binary subexpression elimination with
// coefficient partitioning (BSE-CPM).
//
// Structure. The filter is in transposed direct form, so every tap multiplies
// the same current sample. bcs_gen forms the shared odd multiples of that
// sample once (3x, 5x, 7x, 9x); each tap's bse_cpm_mult then needs only
// shifts and a few narrow adders. The impulse response is symmetric,
// h[k] = h[N-1-k], so only the ceil(N/2) distinct coefficients get a
// multiplier and each product feeds the two mirrored structural adders.
// A register chain of N-1 partial sums (the structural adders and delays)
// forms y[n] = sum_k h[k] x[n-k].
//
// The coefficients are designed at elaboration by fir_pkg::lowpass_coef()
// from the band edges, sample rate and stopband attenuation parameters. The
// defaults are the largest published D-AMPS channel filter of the method: 1180 taps, 16-bit
// coefficients, pass band to 30 kHz, stop band from 30.5 kHz, 96 dB of
// stopband attenuation, and an 8-bit input sample. The sample rate of
// 97.2 kHz is 34.02 MHz divided by the decimation factor of 350 from the same
// example; Kaiser's length estimate for these edges (about 1190 taps) agrees
// with the published 1180. The transposed form, the Kaiser window and the
// full-precision output are this design's choices.
//
// Interface: x_in is accepted when in_valid is high (the decimated sample
// strobe from the channelizer front end); registers move only then. y_out is
// the exact sum of COEF*x products, that is the filter output scaled by
// 2^COEF_W, ACC_W bits signed. Timing: y_out for the sample accepted in cycle
// t is valid in cycle t+1, flagged by out_valid. Active-low synchronous reset
// clears the delay line.
module channel_filter
  import fir_pkg::*;
#(
  parameter int unsigned DATA_W   = 8,
  parameter int unsigned COEF_W   = 16,
  parameter int unsigned N_TAPS   = 1180,
  parameter real         FS_HZ    = 97200.0,
  parameter real         FPASS_HZ = 30000.0,
  parameter real         FSTOP_HZ = 30500.0,
  parameter real         ATTEN_DB = 96.0,
  localparam int unsigned ACC_W   = DATA_W + COEF_W + $clog2(N_TAPS) + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_in,
  output logic                     out_valid,
  output logic signed [ACC_W-1:0]  y_out
);

  localparam int unsigned NH  = (N_TAPS + 1) / 2;   // distinct coefficients
  localparam int unsigned P_W = DATA_W + COEF_W;

  initial assert (N_TAPS >= 2) else $error("N_TAPS must be at least 2");

  logic signed [DATA_W+3:0] bcs  [NUM_BCS];
  logic signed [P_W-1:0]    prod [NH];

  bcs_gen #(.DATA_W(DATA_W)) u_bcs (
    .x   (x_in),
    .bcs (bcs)
  );

  for (genvar k = 0; k < NH; k++) begin : g_tap
    bse_cpm_mult #(
      .DATA_W (DATA_W),
      .COEF_W (COEF_W),
      .COEF   (lowpass_coef(k, N_TAPS, FS_HZ, FPASS_HZ, FSTOP_HZ, ATTEN_DB, COEF_W))
    ) u_mult (
      .bcs (bcs),
      .p   (prod[k])
    );
  end

  // Product of tap k, mirrored for the second half of the response.
  function automatic logic signed [ACC_W-1:0] tap_prod(int unsigned k);
    return ACC_W'(prod[(k < NH) ? k : N_TAPS - 1 - k]);
  endfunction

  // Transposed delay line: s[k] holds the partial sum of taps k..N-1.
  logic signed [ACC_W-1:0] s [1:N_TAPS-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 1; k < N_TAPS; k++) s[k] <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y_out <= tap_prod(0) + s[1];
        for (int k = 1; k < N_TAPS - 1; k++) s[k] <= tap_prod(k) + s[k+1];
        s[N_TAPS-1] <= tap_prod(N_TAPS - 1);
      end
    end
  end

endmodule
