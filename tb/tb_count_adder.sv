// tb_count_adder: self-checking test of the count adder.
// Random and extreme per-unit counts; the expected sum is formed here with
// plain integers.
module tb_count_adder;
  localparam int unsigned UNITS = 16, PER_UNIT = 8;
  localparam int unsigned CNT_W = $clog2(PER_UNIT + 1), SUM_W = $clog2(UNITS * PER_UNIT + 1);
  logic [UNITS-1:0][CNT_W-1:0] cnt;
  logic [SUM_W-1:0] c;
  int checks = 0, failures = 0;

  count_adder #(.UNITS(UNITS), .PER_UNIT(PER_UNIT)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int exp_sum;
      exp_sum = 0;
      for (int j = 0; j < UNITS; j++) begin
        int v;
        case (n)
          0: v = 0;
          1: v = PER_UNIT;
          default: v = $urandom_range(0, PER_UNIT);
        endcase
        cnt[j] = CNT_W'(v);
        exp_sum += v;
      end
      #1;
      checks++;
      if (int'(c) != exp_sum) begin
        failures++;
        $display("sum %0d expected %0d", c, exp_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
