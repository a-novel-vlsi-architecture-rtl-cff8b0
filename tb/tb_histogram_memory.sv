// tb_histogram_memory: self-checking test of the bin memory.
// Clears all 2**16 bins and checks a sample of them, then issues a long
// stream of updates (bin, increment), many to the same bin back to back, so
// that the forwarding of R3 is exercised; a plain integer array here holds
// the expected bins. Finally reads every touched bin through the host port.
// Also checks the length of the clear sweep and that forwarding happened.
module tb_histogram_memory;
  localparam int unsigned DATA_W = 16, COUNT_W = 17, INC_W = 8;
  localparam int unsigned BINS = 2 ** DATA_W;

  logic clk = 0, rst_n = 0, clear_start = 0, clear_busy, upd_valid = 0, fwd_used;
  logic [DATA_W-1:0] upd_addr = '0, rd_addr = '0;
  logic [INC_W-1:0] upd_inc = '0;
  logic [COUNT_W-1:0] rd_data;
  int checks = 0, failures = 0, n_fwd = 0;
  int model [BINS];

  histogram_memory #(.DATA_W(DATA_W), .COUNT_W(COUNT_W), .INC_W(INC_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (fwd_used) n_fwd++;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(input int a);
    rd_addr = DATA_W'(a);
    @(negedge clk);
    checks++;
    if (int'(rd_data) != model[a]) begin
      failures++;
      $display("bin %0d = %0d expected %0d", a, rd_data, model[a]);
    end
  endtask

  initial begin
    int clr_cycles = 0;
    int last_a = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    clear_start = 1;
    @(negedge clk);
    clear_start = 0;
    while (clear_busy) begin clr_cycles++; @(negedge clk); end
    checks++;
    if (clr_cycles != BINS) begin failures++; $display("clear took %0d", clr_cycles); end
    for (int a = 0; a < BINS; a++) model[a] = 0;
    for (int a = 0; a < BINS; a += 97) read_check(a);
    read_check(BINS - 1);
    // update stream
    for (int n = 0; n < 20000; n++) begin
      int a, inc;
      case ($urandom_range(0, 3))
        0: a = last_a;                       // same bin again, back to back
        1: a = $urandom_range(0, 15);        // small hot set
        default: a = $urandom_range(0, BINS - 1);
      endcase
      inc = $urandom_range(0, 2 ** INC_W - 1);
      upd_valid = ($urandom_range(0, 7) != 0);
      upd_addr  = DATA_W'(a);
      upd_inc   = INC_W'(inc);
      if (upd_valid) begin model[a] += inc; last_a = a; end
      @(negedge clk);
    end
    upd_valid = 0;
    repeat (3) @(negedge clk);
    for (int a = 0; a < 16; a++) read_check(a);
    for (int a = 0; a < BINS; a += 13) read_check(a);
    checks++;
    if (n_fwd == 0) begin failures++; $display("forwarding never used"); end
    $display("forwarded updates: %0d", n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
