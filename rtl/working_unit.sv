// working_unit: one column of the linear array of the histogram engine.
//
// A working unit holds T data M[i] and, for each, a bit D[i] that is 1 while
// that datum has not yet been counted. Every cycle the selected datum P is
// broadcast to all units; each unit compares it with its T data and forms
//   K[i] = D[i] & (M[i] != P)          (still to be counted after this cycle)
//   cnt  = number of i with D[i] & (M[i] == P)
// which equals sum(~K) - sum(~D), the per-unit term of C. When the shift flag
// q is 1 the whole array moves one unit to the right: a unit loads the data of
// its left neighbour together with that neighbour's K bits (K rather than D,
// so that what was counted this cycle stays counted). When q is 0 the data
// stay and D takes the value of K.
//
// en gates the unit. With en = 0 nothing is compared: K = D and cnt = 0. The
// engine drops en while the array is being filled (flag t) and once a unit has
// been passed by the last data (flag c_control), matching the gated count mux
// under each column of the architecture drawing.
//
// Timing: k, data and d are combinational views of the present cycle; cnt is
// registered, so it leaves one cycle after the compare (the register between
// the count mux and the adder). clr zeroes the D bits (start of a run).
//
// From the architecture: data registers with a hold/shift mux, one
// not-yet-counted bit per datum, the comparison with P and the K/D update.
// The exact packing of ports and the registered count are this design's
// choices.
module working_unit #(
  parameter int unsigned DATA_W   = hist_pkg::DATA_W,
  parameter int unsigned PER_UNIT = hist_pkg::PER_UNIT,
  localparam int unsigned CNT_W   = $clog2(PER_UNIT + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clr,      // zero all D bits
  input  logic                        en,       // compare and count this cycle
  input  logic                        shift,    // q: load from the left neighbour
  input  logic [DATA_W-1:0]           p,        // broadcast datum P
  input  logic [PER_UNIT*DATA_W-1:0]  in_data,  // left neighbour's data (or new group)
  input  logic [PER_UNIT-1:0]         in_k,     // left neighbour's K bits (or group valid)
  output logic [PER_UNIT*DATA_W-1:0]  data,     // M[.] of this unit
  output logic [PER_UNIT-1:0]         d,        // D[.] of this unit
  output logic [PER_UNIT-1:0]         k,        // K[.] of this unit, this cycle
  output logic [CNT_W-1:0]            cnt       // newly counted matches, one cycle later
);
  logic [PER_UNIT*DATA_W-1:0] m_q;
  logic [PER_UNIT-1:0]        d_q;
  logic [PER_UNIT-1:0]        hit;
  logic [CNT_W-1:0]           cnt_c;

  always_comb begin
    cnt_c = '0;
    for (int i = 0; i < PER_UNIT; i++) begin
      hit[i] = en && d_q[i] && (m_q[i*DATA_W +: DATA_W] == p);
      k[i]   = d_q[i] && !hit[i];
      cnt_c  = cnt_c + CNT_W'(hit[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q <= '0;
      m_q <= '0;
      cnt <= '0;
    end else begin
      cnt <= cnt_c;
      if (clr) begin
        d_q <= '0;
      end else if (shift) begin
        m_q <= in_data;
        d_q <= in_k;
      end else begin
        d_q <= k;
      end
    end
  end

  assign data = m_q;
  assign d    = d_q;
endmodule
