// tb_channel_filter: end-to-end test of the channel filter at its default
// parameters (1180 taps, 16-bit coefficients, 8-bit samples).
//
// The reference is a plain convolution with the same designed coefficients,
// computed here with ordinary multiplies. The test sends a full-scale impulse
// (which reads the whole impulse response back, including the mirrored
// half), then random samples including the extremes, with random idle cycles
// between accepted samples. Every output is checked, and so is the one-cycle
// latency from in_valid to out_valid. It also counts how often each feature
// of the multiplier network was exercised by the coefficient set (each of
// the five subexpression kinds, coefficients split into two halves and kept
// whole, negative and zero coefficients) and how often the input stalled;
// one that never happened counts as a failure.
module tb_channel_filter;
  import fir_pkg::*;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned COEF_W = 16;
  localparam int unsigned N      = 1180;
  localparam int unsigned ACC_W  = DATA_W + COEF_W + $clog2(N) + 1;
  localparam int          NRAND  = 1500;

  logic                     clk = 1'b0;
  logic                     rst_n = 1'b0;
  logic                     in_valid = 1'b0;
  logic signed [DATA_W-1:0] x_in = '0;
  logic                     out_valid;
  logic signed [ACC_W-1:0]  y_out;

  channel_filter dut (.*);

  always #5 clk = ~clk;

  int     checks   = 0;
  int     failures = 0;
  longint coef [N];
  longint hist [$];          // accepted samples, newest first
  longint expect_q [$];      // expected outputs in order
  int     stalls   = 0;
  int     cov_kind [NUM_BCS];
  int     cov_split = 0, cov_whole = 0, cov_neg = 0, cov_zero = 0;
  // Size of the multiplier network: adders and their summed widths (bits),
  // using the widths bse_cpm_mult gives each half and the joining adder.
  int     mult_adders = 0, mult_adder_bits = 0, nonzero_bits = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_out();
    longint acc = 0;
    for (int k = 0; k < N && k < hist.size(); k++) acc += coef[k] * hist[k];
    return acc;
  endfunction

  // Drive one sample: optional idle cycles first, then one accepted cycle.
  // in_valid is left high; the caller drops it after the last sample.
  task automatic send(longint v, int idle);
    for (int i = 0; i < idle; i++) begin
      in_valid <= 1'b0;
      x_in     <= DATA_W'($urandom);   // ignored while in_valid is low
      stalls++;
      @(posedge clk);
    end
    in_valid <= 1'b1;
    x_in     <= DATA_W'(v);
    hist.push_front(v);
    if (hist.size() > N) void'(hist.pop_back());
    expect_q.push_back(ref_out());
    @(posedge clk);
  endtask

  // Output checker and latency check.
  logic in_valid_d = 1'b0;
  always @(posedge clk) begin
    in_valid_d <= in_valid & rst_n;
    if (rst_n) begin
      checks++;
      if (out_valid !== in_valid_d) begin
        failures++;
        $display("FAIL out_valid=%0b, expected %0b", out_valid, in_valid_d);
      end
      if (out_valid) begin
        longint want;
        checks++;
        if (expect_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected output");
        end else begin
          want = expect_q.pop_front();
          if (longint'(y_out) != want) begin
            failures++;
            if (failures < 10) $display("FAIL y=%0d want=%0d", y_out, want);
          end
        end
      end
    end
  end

  initial begin
    bse_plan_t pl;
    longint    m;
    for (int s = 0; s < NUM_BCS; s++) cov_kind[s] = 0;
    for (int k = 0; k < N; k++) begin
      coef[k] = lowpass_coef((k < (N + 1) / 2) ? k : N - 1 - k, N, 97200.0, 30000.0,
                             30500.0, 96.0, COEF_W);
      if (k < (N + 1) / 2) begin
        m  = (coef[k] < 0) ? -coef[k] : coef[k];
        pl = bse_plan(32'(m), COEF_W);
        for (int i = 0; i < int'(pl.n_terms); i++) cov_kind[pl.term[i].sel]++;
        if (pl.n_terms != 0 && pl.n_hi < pl.n_terms) cov_split++;
        if (pl.n_terms != 0 && pl.n_hi == pl.n_terms) cov_whole++;
        if (coef[k] < 0) cov_neg++;
        if (coef[k] == 0) cov_zero++;
        nonzero_bits += $countones(32'(m));
        if (pl.n_terms != 0) begin
          automatic int nh = int'(pl.n_hi);
          automatic int nl = int'(pl.n_terms) - nh;
          mult_adders     += nh - 1;
          mult_adder_bits += (nh - 1) * (DATA_W + int'(pl.hi_msb) - int'(pl.hi_lsb) + 1);
          if (nl > 0) begin
            mult_adders     += nl;
            mult_adder_bits += (nl - 1) * (DATA_W + int'(pl.lo_msb) - int'(pl.lo_lsb) + 1)
                               + (DATA_W + int'(pl.hi_msb) - int'(pl.lo_lsb) + 1);
          end
        end
      end
    end

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // Full-scale impulse: reads back h[0..N-1] times -128.
    send(-128, 0);
    for (int i = 1; i < N; i++) send(0, 0);
    // Random samples, extremes included, with random stalls.
    for (int i = 0; i < NRAND; i++) begin
      longint v;
      case ($urandom_range(0, 9))
        0:       v = 127;
        1:       v = -128;
        default: v = longint'($signed(DATA_W'($urandom)));
      endcase
      send(v, ($urandom_range(0, 3) == 0) ? int'($urandom_range(1, 3)) : 0);
    end
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (expect_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", expect_q.size());
    end

    $display("coverage: x1=%0d x3=%0d x5=%0d x7=%0d x9=%0d split=%0d whole=%0d neg=%0d zero=%0d stalls=%0d",
             cov_kind[0], cov_kind[1], cov_kind[2], cov_kind[3], cov_kind[4],
             cov_split, cov_whole, cov_neg, cov_zero, stalls);
    $display("multiplier network: %0d nonzero coefficient bits, %0d adders, %0d adder bits (plus 4 shared subexpression adders)",
             nonzero_bits, mult_adders, mult_adder_bits);
    for (int s = 0; s < NUM_BCS; s++) begin
      checks++;
      if (cov_kind[s] == 0) begin failures++; $display("FAIL subexpression %0d unused", s); end
    end
    checks += 5;
    if (cov_split == 0) begin failures++; $display("FAIL no split coefficient"); end
    if (cov_whole == 0) begin failures++; $display("FAIL no unsplit coefficient"); end
    if (cov_neg   == 0) begin failures++; $display("FAIL no negative coefficient"); end
    if (cov_zero  == 0) begin failures++; $display("FAIL no zero coefficient"); end
    if (stalls    == 0) begin failures++; $display("FAIL no input stall"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
