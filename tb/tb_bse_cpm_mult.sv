// tb_bse_cpm_mult: self-checking test of the partitioned shift-and-add
// coefficient multiplier. A bank of multipliers with fixed coefficients
// (the worked example 0.0000101001010101, all-ones, every pattern kind,
// negative, zero, single-bit and 24-bit values) is fed every 8-bit sample
// and random 10-bit samples; each product is compared with COEF * x worked
// out here. It also checks that the worked example splits into one MSB term
// and two LSB terms, all [101], as the method prescribes.
module tb_bse_cpm_mult;
  import fir_pkg::*;

  localparam int NC = 14;
  localparam longint COEFS16 [NC] = '{
    64'sh0A55, 64'shFFFF, 64'sh9249, 64'shB6DB, -64'sh1234, 64'sh0000,
    64'sh0001, 64'sh8000, 64'sh7001, -64'shFFFF, 64'sh4925, 64'sh0003,
    64'shDEAD, 64'sh6C31
  };
  localparam longint COEFS24 [4] = '{64'shABCDEF, -64'sh924924, 64'shFFFFFF, 64'sh100001};

  logic signed [7:0]  x8;
  logic signed [11:0] b8 [NUM_BCS];
  logic signed [9:0]  x10;
  logic signed [13:0] b10 [NUM_BCS];
  logic signed [23:0] p16 [NC];
  logic signed [33:0] p24 [4];

  int checks   = 0;
  int failures = 0;

  bcs_gen #(.DATA_W(8))  u_b8  (.x(x8),  .bcs(b8));
  bcs_gen #(.DATA_W(10)) u_b10 (.x(x10), .bcs(b10));

  for (genvar i = 0; i < NC; i++) begin : g16
    bse_cpm_mult #(.DATA_W(8), .COEF_W(16), .COEF(COEFS16[i])) dut (.bcs(b8), .p(p16[i]));
  end
  for (genvar i = 0; i < 4; i++) begin : g24
    bse_cpm_mult #(.DATA_W(10), .COEF_W(24), .COEF(COEFS24[i])) dut (.bcs(b10), .p(p24[i]));
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s got=%0d want=%0d", what, got, want);
    end
  endtask

  initial begin
    bse_plan_t ex;
    x8  = '0;
    x10 = '0;
    // Worked example: three [101] terms, MSB part holds the first one.
    ex = bse_plan(32'h0A55, 16);
    check("example terms", longint'(ex.n_terms), 3);
    check("example msb-part terms", longint'(ex.n_hi), 1);
    for (int i = 0; i < 3; i++) check("example pattern", longint'(ex.term[i].sel), longint'(BCS_X5));
    for (int v = -128; v < 128; v++) begin
      x8 = 8'(v);
      #1;
      for (int i = 0; i < NC; i++) check($sformatf("c16[%0d] x=%0d", i, v), longint'(p16[i]), COEFS16[i] * v);
    end
    for (int t = 0; t < 300; t++) begin
      automatic longint v = longint'($signed(10'($urandom)));
      x10 = 10'(v);
      #1;
      for (int i = 0; i < 4; i++) check($sformatf("c24[%0d] x=%0d", i, v), longint'(p24[i]), COEFS24[i] * v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
