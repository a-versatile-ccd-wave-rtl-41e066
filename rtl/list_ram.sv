// list_ram: memory for the superpixel list.
//
// The host downloads the list of operations that reads the CCD into subapertures
// (104 entries for the 19-subaperture pattern) before operation; the readout
// controller then reads one entry at a time.  One write port for the host and one
// read port for the controller; the read is synchronous with one cycle of latency
// (rd_data shows the entry at rd_addr of the previous cycle).  Depth 128 is the
// smallest power of two that holds the 104-entry list; the depth and the
// synchronous read are this design's choices.  Contents are not reset.
module list_ram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
