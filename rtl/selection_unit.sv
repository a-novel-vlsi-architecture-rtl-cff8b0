// selection_unit: picks the datum P that the array counts next.
//
// The rightmost working unit (U) and its neighbour (U-1) feed their K bits
// into two priority encoders. S0 is the lowest index i with K[i][U] = 1 (the
// first datum of unit U still to be counted), S1 the lowest with K[i][U-1] = 1.
// When no K[i][U] is 1, unit U is finished and q = 1: the array shifts, the
// group now in unit U-1 becomes unit U, and the next pointer is S1.
// Otherwise q = 0, nothing moves, and the next pointer is S0. mux0 makes this
// choice and the register sel_q keeps it; the data mux then reads P out of
// unit U at the stored pointer (after a shift the stored pointer already
// refers to the group that has just arrived). If the chosen encoder finds no
// 1 it gives 0; P may then be a datum already counted, which costs one cycle
// but no accuracy, because only data with D = 1 are ever counted.
//
// force_shift makes q = 1 regardless of K (used while the array is filled).
// p is combinational from the stored pointer and unit U's data; q is
// combinational from this cycle's K bits; the pointer is updated on each
// clock edge while en is 1 and cleared by clr.
//
// From the architecture: the two priority encoders, the gate forming Q over
// K[.][U], mux0 selecting S0 or S1 and the data mux over M[.][U]. The register
// holding the pointer, and the reading of q as "unit U has nothing left"
// with S1 taken after a shift, are this design's choices.
module selection_unit #(
  parameter int unsigned DATA_W   = hist_pkg::DATA_W,
  parameter int unsigned PER_UNIT = hist_pkg::PER_UNIT,
  localparam int unsigned SEL_W   = (PER_UNIT > 1) ? $clog2(PER_UNIT) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clr,
  input  logic                        en,
  input  logic                        force_shift,
  input  logic [PER_UNIT-1:0]         k_last,     // K[.][U]
  input  logic [PER_UNIT-1:0]         k_prev,     // K[.][U-1]
  input  logic [PER_UNIT*DATA_W-1:0]  m_last,     // M[.][U]
  output logic                        q,          // shift flag
  output logic [DATA_W-1:0]           p,          // selected datum P
  output logic [SEL_W-1:0]            sel         // pointer S into unit U
);
  logic [SEL_W-1:0] sel_q, s0, s1, s_next;

  function automatic logic [SEL_W-1:0] first_one(input logic [PER_UNIT-1:0] v);
    first_one = '0;
    for (int i = PER_UNIT - 1; i >= 0; i--)
      if (v[i]) first_one = SEL_W'(i);
  endfunction

  always_comb begin
    s0     = first_one(k_last);
    s1     = first_one(k_prev);
    q      = force_shift || !(|k_last);
    s_next = q ? s1 : s0;
    p      = m_last[sel_q*DATA_W +: DATA_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sel_q <= '0;
    else if (clr) sel_q <= '0;
    else if (en)  sel_q <= s_next;
  end

  assign sel = sel_q;
endmodule
