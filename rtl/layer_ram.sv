// layer_ram: on-chip memory with one write port and one read port, the
// building block of every inputs, weights and outputs memory of a layer.
//
// It models an FPGA block RAM with a single input and a single output port:
// a write of wr_data at wr_addr takes effect at the clock edge when wr_en is
// high, and a read issued with rd_en at rd_addr returns rd_data on the next
// clock edge (registered read, one cycle latency). A read and a write to
// the same address in the same cycle return the old contents. The memory
// is not reset; every layer writes a location before reading it.
// The one-cycle read latency and read-before-write behaviour are this
// design's choices.
module layer_ram #(
  parameter int WIDTH = 9,
  parameter int DEPTH = 400,
  localparam int AW   = (DEPTH <= 1) ? 1 : $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
