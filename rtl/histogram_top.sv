// histogram_top: memory-based parallel engine for joint histograms.
//
// The image (pixel pairs of two 8-bit images, each pair one 16-bit datum) is
// loaded into the input memory in groups of T data. A linear array of U
// working units holds U groups at a time; the array moves one unit to the
// right, taking a fresh group from the input memory into the leftmost unit,
// whenever the rightmost unit has no uncounted datum left. Each cycle the
// selection unit picks one uncounted datum P of the rightmost unit and
// broadcasts it; every unit counts its uncounted data equal to P and marks
// them counted; the count adder forms their total C; the histogram memory
// adds C to bin P. One cycle therefore retires every copy of P present in
// the T*U data of the array, so the run takes roughly one cycle per distinct
// value per window rather than one per pixel, and the hardware does not grow
// with the number of bins (only the bin memory does).
//
// Interface: load the input memory through load_* (one group per write),
// set num_groups, pulse start. busy stays 1 through the bin clear (2**16
// cycles), the fill (U cycles) and the counting; then done is 1 and
// hist_rd_data returns bin hist_rd_addr one cycle after it is presented.
// count_cycles is the number of counting cycles of the last run.
//
// Datapath register stages per counted datum: compare (cycle 0), per-unit
// count register (1), bin read (2), bin write (3).
module histogram_top #(
  parameter int unsigned DATA_W   = hist_pkg::DATA_W,
  parameter int unsigned UNITS    = hist_pkg::UNITS,
  parameter int unsigned PER_UNIT = hist_pkg::PER_UNIT,
  parameter int unsigned DEPTH    = hist_pkg::GROUPS,
  parameter int unsigned COUNT_W  = hist_pkg::COUNT_W,
  localparam int unsigned AW      = $clog2(DEPTH),
  localparam int unsigned NG_W    = $clog2(DEPTH + 1),
  localparam int unsigned CNT_W   = $clog2(PER_UNIT + 1),
  localparam int unsigned SUM_W   = $clog2(UNITS * PER_UNIT + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        load_we,
  input  logic [AW-1:0]               load_addr,
  input  logic [PER_UNIT*DATA_W-1:0]  load_data,
  input  logic [NG_W-1:0]             num_groups,
  input  logic                        start,
  output logic                        busy,
  output logic                        done,
  output logic [31:0]                 count_cycles,
  input  logic [DATA_W-1:0]           hist_rd_addr,
  output logic [COUNT_W-1:0]          hist_rd_data
);
  hist_pkg::phase_e           phase;
  logic                       clear_start, clear_busy, arr_clr, t, sel_en;
  logic                       counting, shift, q;
  logic [UNITS-1:0]           c_control;
  logic [PER_UNIT-1:0]        new_valid;
  logic [AW-1:0]              mem_ads, rd_addr;
  logic [PER_UNIT*DATA_W-1:0] group;
  logic [DATA_W-1:0]          p, p_q;
  logic                       v_q;
  logic [SUM_W-1:0]           c;
  logic                       fwd_used;

  logic [UNITS-1:0][PER_UNIT*DATA_W-1:0] u_data;
  logic [UNITS-1:0][PER_UNIT-1:0]        u_d, u_k;
  logic [UNITS-1:0][CNT_W-1:0]           u_cnt;

  hist_controller #(.UNITS(UNITS), .PER_UNIT(PER_UNIT), .DEPTH(DEPTH)) u_ctrl (
    .clk, .rst_n, .start, .num_groups, .clear_busy, .q,
    .phase, .clear_start, .arr_clr, .t, .sel_en, .counting, .shift,
    .c_control, .new_valid, .mem_ads, .rd_addr, .busy, .done, .count_cycles
  );

  input_memory #(.DATA_W(DATA_W), .PER_UNIT(PER_UNIT), .DEPTH(DEPTH)) u_imem (
    .clk, .wr_en(load_we), .wr_addr(load_addr), .wr_data(load_data),
    .rd_addr, .rd_data(group)
  );

  for (genvar j = 0; j < UNITS; j++) begin : g_unit
    working_unit #(.DATA_W(DATA_W), .PER_UNIT(PER_UNIT)) u_wu (
      .clk, .rst_n,
      .clr     (arr_clr),
      .en      (counting && !c_control[j]),
      .shift,
      .p,
      .in_data ((j == 0) ? group     : u_data[(j == 0) ? 0 : j-1]),
      .in_k    ((j == 0) ? new_valid : u_k[(j == 0) ? 0 : j-1]),
      .data    (u_data[j]),
      .d       (u_d[j]),
      .k       (u_k[j]),
      .cnt     (u_cnt[j])
    );
  end

  selection_unit #(.DATA_W(DATA_W), .PER_UNIT(PER_UNIT)) u_sel (
    .clk, .rst_n, .clr(arr_clr), .en(sel_en), .force_shift(t),
    .k_last(u_k[UNITS-1]), .k_prev(u_k[UNITS-2]), .m_last(u_data[UNITS-1]),
    .q, .p, .sel()
  );

  // P and its valid flag travel with the registered per-unit counts
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q <= '0;
      v_q <= 1'b0;
    end else begin
      p_q <= p;
      v_q <= counting;
    end
  end

  count_adder #(.UNITS(UNITS), .PER_UNIT(PER_UNIT)) u_add (.cnt(u_cnt), .c);

  histogram_memory #(.DATA_W(DATA_W), .COUNT_W(COUNT_W), .INC_W(SUM_W)) u_hmem (
    .clk, .rst_n, .clear_start, .clear_busy,
    .upd_valid(v_q), .upd_addr(p_q), .upd_inc(c),
    .rd_addr(hist_rd_addr), .rd_data(hist_rd_data), .fwd_used
  );
endmodule
