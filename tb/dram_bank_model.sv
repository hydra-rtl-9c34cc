// dram_bank_model: behavioural model of the DRAM banks of one chip, as seen from
// the chip's internal shared bus. Not synthesizable hardware of the design: the
// DRAM arrays are outside the RTL. It accepts one request per cycle; a write
// updates the array at once, a read returns its word in order LATENCY cycles
// later (default 5 cycles, the column latency of the DRAM in the evaluated
// configuration). The array starts at zero.
module dram_bank_model
  import hydra_pkg::*;
#(
  parameter int unsigned LATENCY = 5,
  parameter int unsigned WORDS   = 1 << BANK_AW
) (
  input  logic               clk,
  input  logic               req,
  input  logic               we,
  input  logic [BANK_AW-1:0] addr,
  input  fx16_t              wdata,
  output logic               rvalid,
  output fx16_t              rdata
);
  fx16_t mem [WORDS];
  logic  vpipe [LATENCY];
  fx16_t dpipe [LATENCY];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    for (int i = 0; i < LATENCY; i++) begin vpipe[i] = 1'b0; dpipe[i] = '0; end
  end

  always_ff @(posedge clk) begin
    if (req && we) mem[addr] <= wdata;
    vpipe[0] <= req && !we;
    dpipe[0] <= mem[addr];
    for (int i = 1; i < LATENCY; i++) begin
      vpipe[i] <= vpipe[i-1];
      dpipe[i] <= dpipe[i-1];
    end
  end

  assign rvalid = vpipe[LATENCY-1];
  assign rdata  = dpipe[LATENCY-1];
endmodule
