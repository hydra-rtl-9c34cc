// buffer_ram: one-write, one-read on-chip buffer used for the activation buffer
// (AB, 512 x 16 bit = 1 KB), the weight buffer (WB, 64 x 16 bit = 128 B) and the
// output buffer (OB) of a Hydra unit.
//
// The AB and WB sizes are the ones the Hydra design gives; the OB depth and the
// port structure are this design's choice. Writes take effect at the clock
// edge. Reads are synchronous: rd_data holds the word addressed by rd_addr in
// the cycle rd_en was high, from the next cycle on. A read and a write of the
// same address in one cycle return the old word. The array is not reset.
module buffer_ram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
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
