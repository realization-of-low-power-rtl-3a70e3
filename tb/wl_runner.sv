// wl_runner: drives one channel_filter configuration through a workload and
// checks it against a plain convolution.
//
// The runner builds the same coefficients the filter designs for itself
// (fir_pkg::lowpass_coef with the same parameters), sends a full-scale
// impulse followed by zeros to read the whole response back, then NRAND
// random samples with random idle cycles. Every output, and the one-cycle
// latency from in_valid to out_valid, is checked. When it is finished it
// raises done and reports its check and failure counts.
module wl_runner
  import fir_pkg::*;
#(
  parameter string       NAME     = "workload",
  parameter int unsigned DATA_W   = 8,
  parameter int unsigned COEF_W   = 16,
  parameter int unsigned N_TAPS   = 60,
  parameter real         FS_HZ    = 2.0,
  parameter real         FPASS_HZ = 0.15,
  parameter real         FSTOP_HZ = 0.25,
  parameter real         ATTEN_DB = 60.0,
  parameter int          NRAND    = 200
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int unsigned ACC_W = DATA_W + COEF_W + $clog2(N_TAPS) + 1;

  logic                     in_valid;
  logic signed [DATA_W-1:0] x_in;
  logic                     out_valid;
  logic signed [ACC_W-1:0]  y_out;

  channel_filter #(
    .DATA_W (DATA_W), .COEF_W (COEF_W), .N_TAPS (N_TAPS), .FS_HZ (FS_HZ),
    .FPASS_HZ (FPASS_HZ), .FSTOP_HZ (FSTOP_HZ), .ATTEN_DB (ATTEN_DB)
  ) dut (.*);

  longint coef [N_TAPS];
  longint hist [$];
  longint expect_q [$];
  logic   in_valid_d;

  initial begin
    done     = 1'b0;
    checks   = 0;
    failures = 0;
    in_valid = 1'b0;
    x_in     = '0;
    in_valid_d = 1'b0;
  end

  function automatic longint ref_out();
    longint acc = 0;
    for (int k = 0; k < N_TAPS && k < hist.size(); k++) acc += coef[k] * hist[k];
    return acc;
  endfunction

  task automatic send(longint v, int idle);
    for (int i = 0; i < idle; i++) begin
      in_valid <= 1'b0;
      x_in     <= DATA_W'($urandom);
      @(posedge clk);
    end
    in_valid <= 1'b1;
    x_in     <= DATA_W'(v);
    hist.push_front(v);
    if (hist.size() > N_TAPS) void'(hist.pop_back());
    expect_q.push_back(ref_out());
    @(posedge clk);
  endtask

  always @(posedge clk) begin
    in_valid_d <= in_valid & rst_n;
    if (rst_n && !done) begin
      checks++;
      if (out_valid != in_valid_d) begin
        failures++;
        $display("FAIL %s: out_valid=%0b, expected %0b", NAME, out_valid, in_valid_d);
      end
      if (out_valid) begin
        longint want;
        checks++;
        want = (expect_q.size() != 0) ? expect_q.pop_front() : 0;
        if (longint'(y_out) != want) begin
          failures++;
          if (failures < 5) $display("FAIL %s: y=%0d want=%0d", NAME, y_out, want);
        end
      end
    end
  end

  initial begin
    for (int k = 0; k < N_TAPS; k++)
      coef[k] = lowpass_coef((k < (N_TAPS + 1) / 2) ? k : N_TAPS - 1 - k, N_TAPS, FS_HZ,
                             FPASS_HZ, FSTOP_HZ, ATTEN_DB, COEF_W);
    wait (rst_n === 1'b1);
    @(posedge clk);
    send(-(longint'(1) <<< (DATA_W - 1)), 0);
    for (int i = 1; i < N_TAPS; i++) send(0, 0);
    for (int i = 0; i < NRAND; i++)
      send(longint'($signed(DATA_W'($urandom))),
           ($urandom_range(0, 3) == 0) ? int'($urandom_range(1, 2)) : 0);
    in_valid <= 1'b0;
    repeat (2) @(posedge clk);
    checks++;
    if (expect_q.size() != 0) begin
      failures++;
      $display("FAIL %s: %0d outputs missing", NAME, expect_q.size());
    end
    $display("%s: %0d taps, %0d-bit coefficients, checks=%0d failures=%0d",
             NAME, N_TAPS, COEF_W, checks, failures);
    done = 1'b1;
  end

endmodule
