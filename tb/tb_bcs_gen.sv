// tb_bcs_gen: self-checking test of the shared subexpression generator.
// Sweeps every 8-bit sample and a set of random 12-bit samples and compares
// each output with the plain product of the sample and its odd multiple.
module tb_bcs_gen;
  import fir_pkg::*;

  localparam int unsigned DW8  = 8;
  localparam int unsigned DW12 = 12;

  logic signed [DW8-1:0]   x8;
  logic signed [DW8+3:0]   b8  [NUM_BCS];
  logic signed [DW12-1:0]  x12;
  logic signed [DW12+3:0]  b12 [NUM_BCS];

  int checks   = 0;
  int failures = 0;

  bcs_gen #(.DATA_W(DW8))  dut8  (.x(x8),  .bcs(b8));
  bcs_gen #(.DATA_W(DW12)) dut12 (.x(x12), .bcs(b12));

  localparam int MULT [NUM_BCS] = '{1, 3, 5, 7, 9};

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x8  = '0;
    x12 = '0;
    for (int v = -128; v < 128; v++) begin
      x8 = DW8'(v);
      #1;
      for (int s = 0; s < NUM_BCS; s++) begin
        checks++;
        if (int'(b8[s]) != v * MULT[s]) begin
          failures++;
          $display("FAIL 8-bit x=%0d sel=%0d got=%0d want=%0d", v, s, b8[s], v * MULT[s]);
        end
      end
    end
    for (int t = 0; t < 500; t++) begin
      automatic int v = int'($signed(DW12'($urandom)));
      x12 = DW12'(v);
      #1;
      for (int s = 0; s < NUM_BCS; s++) begin
        checks++;
        if (int'(b12[s]) != v * MULT[s]) begin
          failures++;
          $display("FAIL 12-bit x=%0d sel=%0d got=%0d want=%0d", v, s, b12[s], v * MULT[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
