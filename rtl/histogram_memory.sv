// histogram_memory: the bin_ram and their read-modify-write update.
//
// One bin per possible datum (2**DATA_W bin_ram of COUNT_W bits). Each counting
// cycle delivers a bin address P and an increment C, and the memory performs
// histogram(P) = histogram(P) + C in a pipeline:
//   stage 1 (upd_valid, upd_addr, upd_inc in): the bin is read (synchronous
//           read); address and increment are registered.
//   stage 2: old value + increment is written back, and the written value is
//           kept in register R3.
// A bin read in stage 1 while the same bin is being written in stage 2 would
// return the value from before that write. mem_enable is 1 normally and 0
// when the read address equals the write address; its one-cycle delayed copy
// X then makes the mux take R3 instead of the stale read data. This keeps
// back-to-back updates of one bin exact at one update per cycle.
//
// clear_start begins a sweep that writes zero into every bin, one bin per
// cycle (clear_busy is 1 meanwhile). When no update is in flight the read
// port serves the host: rd_data shows the bin at rd_addr one cycle later.
//
// The forwarding through mem_enable, X and R3 follows the architecture; the
// two-stage timing, the clear sweep and the host read port are this design's
// own choices.
module histogram_memory #(
  parameter int unsigned DATA_W  = hist_pkg::DATA_W,
  parameter int unsigned COUNT_W = hist_pkg::COUNT_W,
  parameter int unsigned INC_W   = $clog2(hist_pkg::UNITS * hist_pkg::PER_UNIT + 1),
  localparam int unsigned BINS   = 2 ** DATA_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear_start,
  output logic               clear_busy,
  input  logic               upd_valid,
  input  logic [DATA_W-1:0]  upd_addr,
  input  logic [INC_W-1:0]   upd_inc,
  input  logic [DATA_W-1:0]  rd_addr,
  output logic [COUNT_W-1:0] rd_data,
  output logic               fwd_used     // X was 0: R3 replaced the read data
);
  logic [COUNT_W-1:0] bin_ram [BINS];

  logic               clr_q;
  logic [DATA_W-1:0]  clr_addr_q;
  logic               v2_q;
  logic [DATA_W-1:0]  a2_q;
  logic [INC_W-1:0]   inc2_q;
  logic [COUNT_W-1:0] rdata_q;
  logic [COUNT_W-1:0] r3_q;
  logic               x_q;
  logic               mem_enable;
  logic [COUNT_W-1:0] old_val, new_val;
  logic [DATA_W-1:0]  raddr;

  always_comb begin
    mem_enable = !(v2_q && upd_valid && (upd_addr == a2_q));
    old_val    = x_q ? rdata_q : r3_q;
    new_val    = old_val + COUNT_W'(inc2_q);
    raddr      = upd_valid ? upd_addr : rd_addr;
  end

  // bin array: one write port (update or clear), one synchronous read port
  always_ff @(posedge clk) begin
    if (clr_q)     bin_ram[clr_addr_q] <= '0;
    else if (v2_q) bin_ram[a2_q]       <= new_val;
    rdata_q <= bin_ram[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_q      <= 1'b0;
      clr_addr_q <= '0;
      v2_q       <= 1'b0;
      a2_q       <= '0;
      inc2_q     <= '0;
      r3_q       <= '0;
      x_q        <= 1'b1;
    end else begin
      if (clear_start) begin
        clr_q      <= 1'b1;
        clr_addr_q <= '0;
      end else if (clr_q) begin
        clr_addr_q <= clr_addr_q + 1'b1;
        if (clr_addr_q == DATA_W'(BINS - 1)) clr_q <= 1'b0;
      end
      v2_q   <= upd_valid;
      a2_q   <= upd_addr;
      inc2_q <= upd_inc;
      x_q    <= mem_enable;
      if (v2_q) r3_q <= new_val;
    end
  end

  // no bin update may arrive while the bins are being cleared
  a_no_update_in_clear: assert property (@(posedge clk) disable iff (!rst_n)
    !(clr_q && upd_valid));

  assign clear_busy = clr_q;
  assign rd_data    = rdata_q;
  assign fwd_used   = v2_q && !x_q;
endmodule
