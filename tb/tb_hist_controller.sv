// tb_hist_controller: self-checking test of the run sequencing.
// The histogram memory's clear is imitated by a busy pulse of random length,
// and the selection unit's q by a random bit. A cycle model kept here tracks
// the input memory address, the fill count, the drain flag and the c_control
// shift register, and the outputs are compared with it every cycle: t high
// for exactly U shifts, shift = q while counting, the address sequence
// 0..num_groups-1 then wrapping to 0, empty groups entering after the last
// one, the stop when c_control[U] rises, and the cycle counter. Several runs
// with different image sizes, including fewer groups than units.
module tb_hist_controller;
  import hist_pkg::*;
  localparam int unsigned UNITS = 4, PER_UNIT = 4, DEPTH = 64;
  localparam int unsigned AW = $clog2(DEPTH), NG_W = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0, start = 0, clear_busy = 0, q = 0;
  logic [NG_W-1:0] num_groups = '0;
  phase_e phase;
  logic clear_start, arr_clr, t, sel_en, counting, shift, busy, done;
  logic [UNITS-1:0] c_control;
  logic [PER_UNIT-1:0] new_valid;
  logic [AW-1:0] mem_ads, rd_addr;
  logic [31:0] count_cycles;
  int checks = 0, failures = 0;

  hist_controller #(.UNITS(UNITS), .PER_UNIT(PER_UNIT), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%0t: %s", $time, what); end
  endtask

  task automatic run(input int ng);
    int ads = 0, fills = 0, ncount = 0, clr_len;
    bit drain = 0;
    logic [UNITS-1:0] cc = '0;
    @(negedge clk);
    num_groups = NG_W'(ng);
    start = 1;
    #1 check(clear_start == 1, "clear_start");
    @(negedge clk);
    start = 0;
    clear_busy = 1;
    clr_len = $urandom_range(1, 20);
    repeat (clr_len) begin
      #1 check(arr_clr && busy && !t && !counting, "clear phase");
      @(negedge clk);
    end
    clear_busy = 0;
    @(negedge clk);
    // fill: U forced shifts, no counting
    while (fills < UNITS) begin
      bit last;
      q = $urandom_range(0, 1);
      #1;
      last = !drain && (ads == ng - 1);
      check(t && shift && !counting, "fill shift");
      check(int'(mem_ads) == ads, "fill mem_ads");
      check(new_valid == (drain ? '0 : '1), "fill valid");
      check(int'(rd_addr) == (last ? 0 : ads + 1), "fill rd_addr");
      cc = {cc[UNITS-2:0], drain};
      ads = last ? 0 : ads + 1;
      if (last) drain = 1;
      fills++;
      @(negedge clk);
    end
    // counting until the last unit has been passed by the last data
    while (!cc[UNITS-1]) begin
      bit last;
      q = ($urandom_range(0, 2) == 0);
      #1;
      last = !drain && (ads == ng - 1);
      check(!t && counting, "counting");
      check(shift == q, "shift follows q");
      check(c_control == cc, "c_control");
      check(int'(mem_ads) == ads, "mem_ads");
      check(int'(rd_addr) == (q ? (last ? 0 : ads + 1) : ads), "rd_addr");
      check(new_valid == (drain ? '0 : '1), "new_valid");
      ncount++;
      if (q) begin
        cc = {cc[UNITS-2:0], drain};
        ads = last ? 0 : ads + 1;
        if (last) drain = 1;
      end
      @(negedge clk);
    end
    // the drain ends when mem_ads has counted to U after wrapping
    #1 check(!counting && !shift && c_control == cc, "stopped");
    check(drain && ads == UNITS, "mem_ads reached U in the drain");
    repeat (5) @(negedge clk);
    #1 check(done && !busy, "done");
    check(int'(count_cycles) == ncount, "count_cycles");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(10);
    run(1);
    run(3);
    run(UNITS);
    run(DEPTH);
    for (int n = 0; n < 10; n++) run($urandom_range(1, DEPTH));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
