// count_adder: sums the per-unit match counts into C.
//
// Each working unit reports, one cycle after the compare, how many of its
// data equalled P and had not been counted before. This block adds the U
// reports into C, the amount by which histogram(P) grows. It is purely
// combinational; the histogram memory registers C together with the bin
// address. The architecture draws one adder block under the units; the
// plain sum written here is this design's choice of its insides.
module count_adder #(
  parameter int unsigned UNITS    = hist_pkg::UNITS,
  parameter int unsigned PER_UNIT = hist_pkg::PER_UNIT,
  localparam int unsigned CNT_W   = $clog2(PER_UNIT + 1),
  localparam int unsigned SUM_W   = $clog2(UNITS * PER_UNIT + 1)
) (
  input  logic [UNITS-1:0][CNT_W-1:0] cnt,
  output logic [SUM_W-1:0]            c
);
  always_comb begin
    c = '0;
    for (int j = 0; j < UNITS; j++) c = c + SUM_W'(cnt[j]);
  end
endmodule
