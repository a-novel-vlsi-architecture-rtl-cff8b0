// tb_selection_unit: self-checking test of the selection unit.
// Random K bits of the last two units (sparse, often all zero) and random
// data of the last unit. Checks q (1 exactly when K[.][U] is all zero or a
// shift is forced), that P is the datum at the stored pointer, and that the
// pointer becomes the lowest set index of K[.][U-1] after a shift and of
// K[.][U] otherwise (0 when none is set).
module tb_selection_unit;
  localparam int unsigned DATA_W = 16, PER_UNIT = 8;
  localparam int unsigned SEL_W = $clog2(PER_UNIT);

  logic clk = 0, rst_n = 0, clr = 0, en = 0, force_shift = 0;
  logic [PER_UNIT-1:0] k_last = '0, k_prev = '0;
  logic [PER_UNIT*DATA_W-1:0] m_last = '0;
  logic q;
  logic [DATA_W-1:0] p;
  logic [SEL_W-1:0] sel;
  int checks = 0, failures = 0;
  int ptr = 0, n_shift = 0, n_hold = 0;

  selection_unit #(.DATA_W(DATA_W), .PER_UNIT(PER_UNIT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PER_UNIT-1:0] sparse();
    logic [PER_UNIT-1:0] v = '0;
    int r = $urandom_range(0, 3);
    if (r == 0) return '0;
    for (int i = 0; i < PER_UNIT; i++) v[i] = ($urandom_range(0, 3 * r) == 0);
    return v;
  endfunction

  function automatic int lowest(input logic [PER_UNIT-1:0] v);
    for (int i = 0; i < PER_UNIT; i++) if (v[i]) return i;
    return 0;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      logic q_exp;
      @(negedge clk);
      k_last = sparse();
      k_prev = sparse();
      for (int i = 0; i < PER_UNIT; i++) m_last[i*DATA_W +: DATA_W] = DATA_W'($urandom);
      force_shift = ($urandom_range(0, 15) == 0);
      en  = ($urandom_range(0, 9) != 0);
      clr = ($urandom_range(0, 99) == 0);
      #1;
      q_exp = force_shift || (k_last == '0);
      checks += 3;
      if (q !== q_exp) begin failures++; $display("q %b exp %b", q, q_exp); end
      if (int'(sel) != ptr) begin failures++; $display("sel %0d exp %0d", sel, ptr); end
      if (p !== m_last[ptr*DATA_W +: DATA_W]) begin failures++; $display("P wrong"); end
      if (clr) ptr = 0;
      else if (en) begin
        if (q_exp) begin ptr = lowest(k_prev); n_shift++; end
        else begin ptr = lowest(k_last); n_hold++; end
      end
    end
    checks++;
    if (n_shift == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
