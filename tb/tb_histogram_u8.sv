// tb_histogram_u8: the full-size image run with U = 8 working units.
// Same as tb_histogram_full except that the array has U = 8 working units of
// T = 8 pixel pairs, 256 x 256 images, 65536 bins of 17 bits. Two 8-bit test
// images are generated here: A is a smooth pattern with noise, B a remapped,
// noisy copy of A, so the joint histogram is clustered like that of two
// registered images. Their pixel pairs {A, B} are loaded, the engine is run
// once, and all 65536 bins are compared with a direct count. A second run
// does the same with two images of independent noise. The number of
// counting cycles is compared with a step-by-step model of the algorithm,
// and must not exceed one cycle per pixel pair.
module tb_histogram_u8;
  localparam int unsigned DATA_W = hist_pkg::DATA_W, UNITS = 8;
  localparam int unsigned PER_UNIT = hist_pkg::PER_UNIT, DEPTH = hist_pkg::GROUPS;
  localparam int unsigned COUNT_W = hist_pkg::COUNT_W;
  localparam int unsigned AW = $clog2(DEPTH), NG_W = $clog2(DEPTH + 1);
  localparam int unsigned BINS = 2 ** DATA_W, SIDE = 256;

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

  histogram_top #(.UNITS(UNITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #40_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int first_set(input bit v[PER_UNIT]);
    for (int i = 0; i < PER_UNIT; i++) if (v[i]) return i;
    return 0;
  endfunction

  // Step-by-step model of the algorithm; returns the counting cycles.
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

  // kind 0: the clustered image pair described above; kind 1: independent
  // uniform noise in both images, where nearly every pair is distinct
  task automatic run(input int kind);
    int exp_cyc, waited = 0, bad = 0;
    for (int b = 0; b < BINS; b++) exp_hist[b] = 0;
    // images in raster order, T consecutive pixels per group
    for (int n = 0; n < SIDE * SIDE; n++) begin
      int x = n % SIDE, y = n / SIDE, a, b;
      if (kind == 0) begin
        a = ((x + y) / 2 + ((x / 32) % 2) * 40 + $urandom_range(0, 3)) % 256;
        b = (255 - a + $urandom_range(0, 3)) % 256;
      end else begin
        a = $urandom_range(0, 255);
        b = $urandom_range(0, 255);
      end
      img[n / PER_UNIT][n % PER_UNIT] = a * 256 + b;
      exp_hist[a * 256 + b]++;
    end
    @(negedge clk);
    load_we = 1;
    for (int g = 0; g < DEPTH; g++) begin
      for (int i = 0; i < PER_UNIT; i++) load_data[i*DATA_W +: DATA_W] = DATA_W'(img[g][i]);
      load_addr = AW'(g);
      @(negedge clk);
    end
    load_we = 0;
    exp_cyc = model_cycles(DEPTH);
    num_groups = NG_W'(DEPTH);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); waited++; end
    checks += 2;
    if (int'(count_cycles) != exp_cyc) begin
      failures++;
      $display("%0d counting cycles, model %0d", count_cycles, exp_cyc);
    end
    if (int'(count_cycles) > SIDE * SIDE) begin
      failures++;
      $display("more counting cycles than pixel pairs");
    end
    for (int b = 0; b < BINS; b++) begin
      hist_rd_addr = DATA_W'(b);
      @(negedge clk);
      checks++;
      if (int'(hist_rd_data) != exp_hist[b]) begin
        failures++;
        if (bad++ < 10) $display("bin %0d = %0d expected %0d", b, hist_rd_data, exp_hist[b]);
      end
    end
    $display("%s images, %0d pixel pairs, U=%0d T=%0d: %0d counting cycles (model %0d), %0d cycles start to done",
             kind == 0 ? "clustered" : "noise", SIDE * SIDE, UNITS, PER_UNIT, count_cycles, exp_cyc, waited + 1);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
