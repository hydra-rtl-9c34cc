// result_accumulation_unit: the result accumulation unit of the memory
// controller, with its integrated linear function.
//
// Each Hydra convolves one input channel, so an output channel is the sum of
// the partial results of many Hydras. The memory controller reads the same OB
// word from all chips of a rank with one READ; the words arrive here as
// in_data[0..N_LANES-1]. The unit adds the lanes selected by in_mask (adder
// tree), adds the partial sum it keeps for that neuron address (or starts from
// zero when acc_first is set) and stores the new partial sum. This lets a
// neuron collect the two ranks, and more batches of 16 channels, in turn. On the
// pass marked acc_last it applies the linear function (ReLU when relu_en, the
// identity otherwise), saturates to FX16 and presents the value on
// out_data/out_addr with out_valid one cycle after the input.
//
// That partial results are accumulated in the memory controller and a linear
// function applied follows the Hydra design; the lane mask, the partial-sum
// memory, its width and the reading of "linear function" as ReLU are this
// design's choices. The partial-sum array is read combinationally and written
// at the clock edge.
module result_accumulation_unit
  import hydra_pkg::*;
#(
  parameter int unsigned N_LANES = 8,
  parameter int unsigned DEPTH   = 512,
  parameter int unsigned PSUM_W  = 32,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [AW-1:0]            in_addr,
  input  fx16_t [N_LANES-1:0]      in_data,
  input  logic  [N_LANES-1:0]      in_mask,
  input  logic                     acc_first,
  input  logic                     acc_last,
  input  logic                     relu_en,
  output logic                     out_valid,
  output logic [AW-1:0]            out_addr,
  output fx16_t                    out_data
);

  logic signed [PSUM_W-1:0] psum [DEPTH];
  logic signed [PSUM_W-1:0] lane_sum, new_sum;
  fx16_t                    lin;

  always_comb begin
    lane_sum = '0;
    for (int i = 0; i < N_LANES; i++)
      if (in_mask[i]) lane_sum = lane_sum + PSUM_W'(in_data[i]);
    new_sum = (acc_first ? '0 : psum[in_addr]) + lane_sum;
    lin     = sat16(48'(new_sum));
    if (relu_en && lin < 0) lin = '0;
  end

  always_ff @(posedge clk) begin
    if (in_valid) psum[in_addr] <= new_sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_addr  <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid && acc_last;
      if (in_valid && acc_last) begin
        out_addr <= in_addr;
        out_data <= lin;
      end
    end
  end

endmodule
