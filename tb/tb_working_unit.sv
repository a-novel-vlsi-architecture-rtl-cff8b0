// tb_working_unit: self-checking test of one working unit.
// A testbench model keeps the unit's data and not-yet-counted bits. Each
// cycle drives a random P (often one of the held data, so matches happen),
// random enable, shift and clear; checks the combinational K bits and the
// registered count of new matches against the model, and the held data and
// D bits after each edge.
module tb_working_unit;
  localparam int unsigned DATA_W = 16, PER_UNIT = 8;
  localparam int unsigned CNT_W = $clog2(PER_UNIT + 1);

  logic clk = 0, rst_n = 0, clr = 0, en = 0, shift = 0;
  logic [DATA_W-1:0] p = '0;
  logic [PER_UNIT*DATA_W-1:0] in_data = '0, data;
  logic [PER_UNIT-1:0] in_k = '0, d, k;
  logic [CNT_W-1:0] cnt;
  int checks = 0, failures = 0;

  logic [DATA_W-1:0] m_model [PER_UNIT];
  logic [PER_UNIT-1:0] d_model;
  int cnt_model;

  working_unit #(.DATA_W(DATA_W), .PER_UNIT(PER_UNIT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < PER_UNIT; i++) m_model[i] = '0;
    d_model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      logic [PER_UNIT-1:0] k_exp;
      int c_exp;
      @(negedge clk);
      // stimulus; data drawn from a small set so that repeats are common
      for (int i = 0; i < PER_UNIT; i++) in_data[i*DATA_W +: DATA_W] = DATA_W'($urandom_range(0, 5));
      in_k  = PER_UNIT'($urandom);
      shift = ($urandom_range(0, 3) == 0);
      clr   = ($urandom_range(0, 40) == 0);
      en    = ($urandom_range(0, 5) != 0);
      p     = ($urandom_range(0, 3) != 0) ? m_model[$urandom_range(0, PER_UNIT - 1)]
                                          : DATA_W'($urandom_range(0, 5));
      // expected this cycle
      c_exp = 0;
      for (int i = 0; i < PER_UNIT; i++) begin
        logic h;
        h = en && d_model[i] && (m_model[i] == p);
        k_exp[i] = d_model[i] && !h;
        c_exp += int'(h);
      end
      #1;
      checks++;
      if (k !== k_exp) begin failures++; $display("cycle %0d K %b exp %b", n, k, k_exp); end
      // model update
      if (clr) d_model = '0;
      else if (shift) begin
        for (int i = 0; i < PER_UNIT; i++) m_model[i] = in_data[i*DATA_W +: DATA_W];
        d_model = in_k;
      end else d_model = k_exp;
      cnt_model = c_exp;
      @(posedge clk); #1;
      checks += 2;
      if (int'(cnt) != cnt_model) begin failures++; $display("cycle %0d cnt %0d exp %0d", n, cnt, cnt_model); end
      if (d !== d_model) begin failures++; $display("cycle %0d D %b exp %b", n, d, d_model); end
      for (int i = 0; i < PER_UNIT; i++) begin
        checks++;
        if (data[i*DATA_W +: DATA_W] !== m_model[i]) begin failures++; $display("data %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
