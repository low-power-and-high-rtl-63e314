// local_ram: on-chip memory block of the engine (activation banks, packed
// weights, batch-norm parameters, scores).
//
// One write port and one read port on the same clock. The read is
// synchronous: the word at rd_addr appears on rd_data one cycle later, as in
// an FPGA block RAM. A write and a read of the same address in the same cycle
// return the old word. The contents are not reset. Sizes are this design's
// choice; the on-chip memories are only named, not sized, for the original
// engine.
module local_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
