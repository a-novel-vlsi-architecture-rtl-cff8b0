// tb_histogram_top: end-to-end test of the histogram engine at reduced size.
// U = 4 working units of T = 4 data, 8-bit data (256 bins), 64-group input
// memory. Each run loads an image, starts the engine, waits for done and
// reads back every bin. The expected bins are a plain count of the loaded
// data. The expected number of counting cycles comes from a step-by-step
// model of the flowchart written here (P taken from the rightmost unit at the
// stored pointer, matches of P cleared everywhere, shift when the rightmost
// unit is exhausted, pointer from the first remaining datum). Runs cover
// random data, data from a small set, constant data and images with fewer
// groups than units. The testbench counts how often each mechanism occurs
// (bin clear, fill with t = 1, shift, hold with q = 0, pointer taken from
// unit U-1, forwarding of R3, drain with empty groups, per-unit stop) and
// counts a failure for any that never occurred.
module tb_histogram_top;
  localparam int unsigned DATA_W = 8, UNITS = 4, PER_UNIT = 4, DEPTH = 64;
  localparam int unsigned COUNT_W = $clog2(DEPTH * PER_UNIT + 1);
  localparam int unsigned AW = $clog2(DEPTH), NG_W = $clog2(DEPTH + 1);
  localparam int unsigned BINS = 2 ** DATA_W;

  logic clk = 0, rst_n = 0, load_we = 0, start = 0, busy, done;
  logic [AW-1:0] load_addr = '0;
  logic [PER_UNIT*DATA_W-1:0] load_data = '0;
  logic [NG_W-1:0] num_groups = '0;
  logic [31:0] count_cycles;
  logic [DATA_W-1:0] hist_rd_addr = '0;
  logic [COUNT_W-1:0] hist_rd_data;
  int checks = 0, failures = 0;

  int img [DEPTH][PER_UNIT];
  int exp_hist [BINS];

  // mechanism counters
  int n_clear = 0, n_fill = 0, n_shift = 0, n_hold = 0, n_s1 = 0;
  int n_fwd = 0, n_drain = 0, n_stop = 0;

  histogram_top #(.DATA_W(DATA_W), .UNITS(UNITS), .PER_UNIT(PER_UNIT),
                  .DEPTH(DEPTH), .COUNT_W(COUNT_W)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (dut.clear_busy) n_clear++;
    if (dut.t) n_fill++;
    if (dut.counting && dut.q) n_shift++;
    if (dut.counting && !dut.q) n_hold++;
    if (dut.counting && dut.q && dut.u_sel.s1 != 0) n_s1++;
    if (dut.u_hmem.fwd_used) n_fwd++;
    if (dut.counting && dut.q && dut.new_valid == '0) n_drain++;
    if (dut.counting && dut.c_control[0]) n_stop++;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int first_set(input bit v[PER_UNIT]);
    for (int i = 0; i < PER_UNIT; i++) if (v[i]) return i;
    return 0;
  endfunction

  // Flowchart model: returns the number of counting cycles.
  function automatic int model_cycles(input int ng);
    int  m [UNITS][PER_UNIT];
    bit  d [UNITS][PER_UNIT];
    bit  kk [UNITS][PER_UNIT];
    bit  empty [UNITS];
    int  next_g = 0, ptr = 0, cycles = 0;
    for (int j = 0; j < UNITS; j++) begin
      empty[j] = 1;
      for (int i = 0; i < PER_UNIT; i++) begin m[j][i] = 0; d[j][i] = 0; end
    end
    // fill: U shifts without counting
    repeat (UNITS) begin
      for (int j = UNITS - 1; j > 0; j--) begin
        m[j] = m[j-1]; d[j] = d[j-1]; empty[j] = empty[j-1];
      end
      empty[0] = (next_g >= ng);
      for (int i = 0; i < PER_UNIT; i++) begin
        m[0][i] = empty[0] ? 0 : img[next_g][i];
        d[0][i] = !empty[0];
      end
      next_g++;
    end
    ptr = first_set(d[UNITS-1]);
    while (!empty[UNITS-1]) begin
      int p;
      bit q;
      cycles++;
      p = m[UNITS-1][ptr];
      for (int j = 0; j < UNITS; j++)
        for (int i = 0; i < PER_UNIT; i++)
          kk[j][i] = d[j][i] && (m[j][i] != p);
      q = 1;
      for (int i = 0; i < PER_UNIT; i++) if (kk[UNITS-1][i]) q = 0;
      ptr = q ? first_set(kk[UNITS-2]) : first_set(kk[UNITS-1]);
      if (q) begin
        for (int j = UNITS - 1; j > 0; j--) begin
          m[j] = m[j-1]; d[j] = kk[j-1]; empty[j] = empty[j-1];
        end
        empty[0] = (next_g >= ng);
        for (int i = 0; i < PER_UNIT; i++) begin
          m[0][i] = empty[0] ? 0 : img[next_g][i];
          d[0][i] = !empty[0];
        end
        next_g++;
      end else begin
        d = kk;
      end
    end
    return cycles;
  endfunction

  task automatic run(input int ng, input int kind);
    int exp_cyc, waited = 0;
    for (int b = 0; b < BINS; b++) exp_hist[b] = 0;
    for (int g = 0; g < ng; g++) begin
      for (int i = 0; i < PER_UNIT; i++) begin
        case (kind)
          0: img[g][i] = $urandom_range(0, BINS - 1);
          1: img[g][i] = $urandom_range(0, 5) * 37;
          2: img[g][i] = 200;
          default: img[g][i] = (g / 3 + $urandom_range(0, 2)) % BINS;
        endcase
        exp_hist[img[g][i]]++;
        load_data[i*DATA_W +: DATA_W] = DATA_W'(img[g][i]);
      end
      @(negedge clk);
      load_we = 1; load_addr = AW'(g);
      @(negedge clk);
      load_we = 0;
    end
    exp_cyc = model_cycles(ng);
    num_groups = NG_W'(ng);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); waited++; end
    checks++;
    if (int'(count_cycles) != exp_cyc) begin
      failures++;
      $display("run ng=%0d kind=%0d: %0d counting cycles, model %0d", ng, kind, count_cycles, exp_cyc);
    end
    for (int b = 0; b < BINS; b++) begin
      hist_rd_addr = DATA_W'(b);
      @(negedge clk);
      checks++;
      if (int'(hist_rd_data) != exp_hist[b]) begin
        failures++;
        $display("run ng=%0d kind=%0d: bin %0d = %0d expected %0d", ng, kind, b, hist_rd_data, exp_hist[b]);
      end
    end
    $display("run ng=%0d kind=%0d: %0d pixels, %0d counting cycles, %0d cycles start to done",
             ng, kind, ng * PER_UNIT, count_cycles, waited + 1);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(8, 0);
    run(DEPTH, 0);
    run(DEPTH, 1);
    run(DEPTH, 2);
    run(2, 1);
    run(DEPTH, 3);
    for (int n = 0; n < 6; n++) run($urandom_range(1, DEPTH), $urandom_range(0, 3));
    $display("mechanisms: clear=%0d fill=%0d shift=%0d hold=%0d s1=%0d fwd=%0d drain=%0d stop=%0d",
             n_clear, n_fill, n_shift, n_hold, n_s1, n_fwd, n_drain, n_stop);
    checks += 8;
    if (n_clear == 0) begin failures++; $display("bin clear never happened"); end
    if (n_fill == 0)  begin failures++; $display("fill never happened"); end
    if (n_shift == 0) begin failures++; $display("shift never happened"); end
    if (n_hold == 0)  begin failures++; $display("hold never happened"); end
    if (n_s1 == 0)    begin failures++; $display("pointer from U-1 never nonzero"); end
    if (n_fwd == 0)   begin failures++; $display("forwarding never happened"); end
    if (n_drain == 0) begin failures++; $display("drain never happened"); end
    if (n_stop == 0)  begin failures++; $display("unit stop never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
