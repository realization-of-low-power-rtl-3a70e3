// tb_workloads: runs every filter configuration the design is evaluated on,
// each in its own channel_filter instance, against a plain convolution:
//   D-AMPS channel filters, 16-bit coefficients: 260, 610, 940 taps
//     (1180 taps is the default configuration, tested by tb_channel_filter)
//   D-AMPS 1180 taps with 24-bit coefficients
//   PDC channel filters, 16-bit coefficients: 240, 590, 880, 1000 taps
//   PDC 1000 taps with 24-bit coefficients
//   T1, T2, T3 lowpass filters: 60, 90, 120 taps, 14-bit coefficients
// D-AMPS runs at 34.02 MHz / 350 = 97.2 kHz with edges 30 / 30.5 kHz. For
// PDC the band edges are not given; 25 / 25.5 kHz at 25.6 MHz / 320 = 80 kHz
// is assumed, scaled from the 25 kHz channel spacing. T1-T3 give their edges
// as fractions of pi; with FS = 2 the edges are those fractions. T1-T3
// attenuations are not given; 60 dB is assumed.
module tb_workloads;

  localparam int NW = 13;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done [NW];
  int   wchecks [NW];
  int   wfails [NW];
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  wl_runner #(.NAME("D-AMPS 260/16"),  .COEF_W(16), .N_TAPS(260),  .FS_HZ(97200.0), .FPASS_HZ(30000.0), .FSTOP_HZ(30500.0), .ATTEN_DB(48.0))
    w0  (.clk, .rst_n, .done(done[0]),  .checks(wchecks[0]),  .failures(wfails[0]));
  wl_runner #(.NAME("D-AMPS 610/16"),  .COEF_W(16), .N_TAPS(610),  .FS_HZ(97200.0), .FPASS_HZ(30000.0), .FSTOP_HZ(30500.0), .ATTEN_DB(65.0))
    w1  (.clk, .rst_n, .done(done[1]),  .checks(wchecks[1]),  .failures(wfails[1]));
  wl_runner #(.NAME("D-AMPS 940/16"),  .COEF_W(16), .N_TAPS(940),  .FS_HZ(97200.0), .FPASS_HZ(30000.0), .FSTOP_HZ(30500.0), .ATTEN_DB(85.0))
    w2  (.clk, .rst_n, .done(done[2]),  .checks(wchecks[2]),  .failures(wfails[2]));
  wl_runner #(.NAME("D-AMPS 1180/24"), .COEF_W(24), .N_TAPS(1180), .FS_HZ(97200.0), .FPASS_HZ(30000.0), .FSTOP_HZ(30500.0), .ATTEN_DB(96.0))
    w3  (.clk, .rst_n, .done(done[3]),  .checks(wchecks[3]),  .failures(wfails[3]));
  wl_runner #(.NAME("PDC 240/16"),     .COEF_W(16), .N_TAPS(240),  .FS_HZ(80000.0), .FPASS_HZ(25000.0), .FSTOP_HZ(25500.0), .ATTEN_DB(45.0))
    w4  (.clk, .rst_n, .done(done[4]),  .checks(wchecks[4]),  .failures(wfails[4]));
  wl_runner #(.NAME("PDC 590/16"),     .COEF_W(16), .N_TAPS(590),  .FS_HZ(80000.0), .FPASS_HZ(25000.0), .FSTOP_HZ(25500.0), .ATTEN_DB(62.0))
    w5  (.clk, .rst_n, .done(done[5]),  .checks(wchecks[5]),  .failures(wfails[5]));
  wl_runner #(.NAME("PDC 880/16"),     .COEF_W(16), .N_TAPS(880),  .FS_HZ(80000.0), .FPASS_HZ(25000.0), .FSTOP_HZ(25500.0), .ATTEN_DB(80.0))
    w6  (.clk, .rst_n, .done(done[6]),  .checks(wchecks[6]),  .failures(wfails[6]));
  wl_runner #(.NAME("PDC 1000/16"),    .COEF_W(16), .N_TAPS(1000), .FS_HZ(80000.0), .FPASS_HZ(25000.0), .FSTOP_HZ(25500.0), .ATTEN_DB(90.0))
    w7  (.clk, .rst_n, .done(done[7]),  .checks(wchecks[7]),  .failures(wfails[7]));
  wl_runner #(.NAME("PDC 1000/24"),    .COEF_W(24), .N_TAPS(1000), .FS_HZ(80000.0), .FPASS_HZ(25000.0), .FSTOP_HZ(25500.0), .ATTEN_DB(90.0))
    w8  (.clk, .rst_n, .done(done[8]),  .checks(wchecks[8]),  .failures(wfails[8]));
  wl_runner #(.NAME("T1 60/14"),       .COEF_W(14), .N_TAPS(60),   .FS_HZ(2.0), .FPASS_HZ(0.021), .FSTOP_HZ(0.07), .ATTEN_DB(60.0))
    w9  (.clk, .rst_n, .done(done[9]),  .checks(wchecks[9]),  .failures(wfails[9]));
  wl_runner #(.NAME("T2 90/14"),       .COEF_W(14), .N_TAPS(90),   .FS_HZ(2.0), .FPASS_HZ(0.15),  .FSTOP_HZ(0.25), .ATTEN_DB(60.0))
    w10 (.clk, .rst_n, .done(done[10]), .checks(wchecks[10]), .failures(wfails[10]));
  wl_runner #(.NAME("T3 120/14"),      .COEF_W(14), .N_TAPS(120),  .FS_HZ(2.0), .FPASS_HZ(0.15),  .FSTOP_HZ(0.25), .ATTEN_DB(60.0))
    w11 (.clk, .rst_n, .done(done[11]), .checks(wchecks[11]), .failures(wfails[11]));
  // Odd length: the centre coefficient has no mirror partner.
  wl_runner #(.NAME("odd 61/14"),      .COEF_W(14), .N_TAPS(61),   .FS_HZ(2.0), .FPASS_HZ(0.15),  .FSTOP_HZ(0.25), .ATTEN_DB(60.0))
    w12 (.clk, .rst_n, .done(done[12]), .checks(wchecks[12]), .failures(wfails[12]));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int i = 0; i < NW; i++) all_done &= done[i];
    end while (!all_done);
    for (int i = 0; i < NW; i++) begin
      checks   += wchecks[i];
      failures += wfails[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
