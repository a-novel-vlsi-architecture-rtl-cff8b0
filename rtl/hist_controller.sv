// hist_controller: sequencing of one histogram run.
//
// A run has these phases (hist_pkg::phase_e):
//   CLEAR  the histogram memory zeroes every bin; the array's D bits are
//          cleared and the input memory is addressed at group 0.
//   FILL   flag t = 1. The array shifts on every cycle and nothing is counted,
//          until U shifts have brought the first group into the rightmost
//          unit. Then t falls and stays 0 for the rest of the run.
//   RUN    one datum P is counted per cycle; the array shifts when the
//          selection unit raises q.
//   DRAIN  the input memory has delivered its last group. mem_ads restarts
//          from 0 and every further shift brings in an empty group (all D bits
//          0). c_control[j] is 1 once unit j holds such an empty group; it
//          travels right with the shifts, so the units stop one after the
//          other from left to right. When c_control[U] (index UNITS-1) is 1,
//          which is when mem_ads has counted to U again, every datum has been
//          counted and the array stops.
//   FLUSH  the last bin updates leave the three-stage update pipeline.
//   DONE   the histogram can be read; start begins a new run.
//
// mem_ads is the input memory address. rd_addr is the address to present to
// the synchronous input memory this cycle: mem_ads + 1 on a shift, so the
// next group is ready one cycle later, when it may be needed. new_valid gives
// the D bits of the group entering unit 1 (all 1 for image data, 0 when
// draining). count_cycles counts the cycles spent in RUN and DRAIN, one per
// selected datum.
//
// mem_ads, t and c_control, and their behaviour at the two ends of the run,
// follow the architecture's description. The explicit phases, the clear of
// the bins before a run, the flush and the cycle counter are this design's
// own. num_groups must be at least 1 and at most the input memory depth.
module hist_controller #(
  parameter int unsigned UNITS    = hist_pkg::UNITS,
  parameter int unsigned PER_UNIT = hist_pkg::PER_UNIT,
  parameter int unsigned DEPTH    = hist_pkg::GROUPS,
  localparam int unsigned AW      = $clog2(DEPTH),
  localparam int unsigned NG_W    = $clog2(DEPTH + 1),
  localparam int unsigned FILL_W  = $clog2(UNITS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [NG_W-1:0]      num_groups,   // groups of the image in the input memory
  input  logic                 clear_busy,   // histogram memory still zeroing
  input  logic                 q,            // shift flag from the selection unit
  output hist_pkg::phase_e     phase,
  output logic                 clear_start,  // one-cycle request to zero the bins
  output logic                 arr_clr,      // clear D bits and the pointer
  output logic                 t,            // fill flag
  output logic                 sel_en,       // selection unit pointer update
  output logic                 counting,     // array compares and counts
  output logic                 shift,        // array shifts this cycle
  output logic [UNITS-1:0]     c_control,    // unit j passed by the last data
  output logic [PER_UNIT-1:0]  new_valid,    // D bits of the entering group
  output logic [AW-1:0]        mem_ads,
  output logic [AW-1:0]        rd_addr,
  output logic                 busy,
  output logic                 done,
  output logic [31:0]          count_cycles
);
  import hist_pkg::*;

  phase_e            ph_q;
  logic [AW-1:0]     ads_q;
  logic [FILL_W-1:0] fill_q;
  logic [UNITS-1:0]  cc_q;
  logic [1:0]        flush_q;
  logic              drain_q;   // last image group already taken from memory
  logic [31:0]       cyc_q;
  logic              last_group;

  always_comb begin
    t           = (ph_q == PH_FILL);
    counting    = ((ph_q == PH_RUN) || (ph_q == PH_DRAIN)) && !cc_q[UNITS-1];
    sel_en      = t || counting;
    shift       = t || (counting && q);
    clear_start = (ph_q == PH_IDLE || ph_q == PH_DONE) && start;
    arr_clr     = (ph_q == PH_CLEAR);
    last_group  = !drain_q && (NG_W'(ads_q) == num_groups - 1'b1);
    new_valid   = drain_q ? '0 : '1;
    if (shift && !last_group) rd_addr = ads_q + 1'b1;
    else if (shift)           rd_addr = '0;
    else                      rd_addr = ads_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q    <= PH_IDLE;
      ads_q   <= '0;
      fill_q  <= '0;
      cc_q    <= '0;
      flush_q <= '0;
      drain_q <= 1'b0;
      cyc_q   <= '0;
    end else begin
      unique case (ph_q)
        PH_IDLE, PH_DONE: begin
          if (start) begin
            ph_q    <= PH_CLEAR;
            ads_q   <= '0;
            fill_q  <= '0;
            cc_q    <= '0;
            drain_q <= 1'b0;
            cyc_q   <= '0;
          end
        end
        PH_CLEAR: begin
          if (!clear_busy) ph_q <= PH_FILL;
        end
        PH_FILL, PH_RUN, PH_DRAIN: begin
          if (counting) cyc_q <= cyc_q + 1'b1;
          if (shift) begin
            ads_q <= rd_addr;
            cc_q  <= {cc_q[UNITS-2:0], drain_q};
            if (last_group) drain_q <= 1'b1;
            if (t) fill_q <= fill_q + 1'b1;
          end
          if (t) begin
            if (shift && fill_q == FILL_W'(UNITS - 1))
              ph_q <= (drain_q || last_group) ? PH_DRAIN : PH_RUN;
          end else if (cc_q[UNITS-1]) begin
            ph_q    <= PH_FLUSH;
            flush_q <= '0;
          end else if (shift && last_group) begin
            ph_q <= PH_DRAIN;
          end
        end
        PH_FLUSH: begin
          flush_q <= flush_q + 1'b1;
          if (flush_q == 2'd2) ph_q <= PH_DONE;
        end
        default: ph_q <= PH_IDLE;
      endcase
    end
  end

  // c_control is a thermometer code: a unit is stopped only after its left
  // neighbour; fill and counting never overlap.
  a_cc_thermo: assert property (@(posedge clk) disable iff (!rst_n)
    ((cc_q >> 1) & ~cc_q) == '0);
  a_fill_xor_count: assert property (@(posedge clk) disable iff (!rst_n)
    !(t && counting));

  assign phase        = ph_q;
  assign c_control    = cc_q;
  assign mem_ads      = ads_q;
  assign busy         = (ph_q != PH_IDLE) && (ph_q != PH_DONE);
  assign done         = (ph_q == PH_DONE);
  assign count_cycles = cyc_q;
endmodule
