// input_memory: image store of the histogram engine.
//
// Holds the image as DEPTH words; each word is one group of T pixel pairs
// (element i in bits [i*DATA_W +: DATA_W]), the data that enter the leftmost
// working unit on one shift of the array. A host loads it through the write
// port before a run. The read port is synchronous: rd_data shows the word
// at the rd_addr presented on the previous clock edge. The engine presents
// the next address in the same cycle as it shifts, so the group it needs is
// always waiting on rd_data. That the image sits in a memory addressed by a
// counter (mem_ads) is from the architecture; the word layout, the separate
// load port and the one-cycle read are this design's choices.
module input_memory #(
  parameter int unsigned DATA_W   = hist_pkg::DATA_W,
  parameter int unsigned PER_UNIT = hist_pkg::PER_UNIT,
  parameter int unsigned DEPTH    = hist_pkg::GROUPS,
  localparam int unsigned AW      = $clog2(DEPTH)
) (
  input  logic                         clk,
  // host load port
  input  logic                         wr_en,
  input  logic [AW-1:0]                wr_addr,
  input  logic [PER_UNIT*DATA_W-1:0]   wr_data,
  // engine read port
  input  logic [AW-1:0]                rd_addr,
  output logic [PER_UNIT*DATA_W-1:0]   rd_data
);
  logic [PER_UNIT*DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
