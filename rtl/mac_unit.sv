// mac_unit: one of the 32 multiply-accumulate lanes of a Hydra unit.
//
// Each lane computes one neuron position of a convolution: the sum of
// weight x activation over the kernel window, plus the bias once. It consumes
// one <W,A> pair per cycle from its streaming buffer (in_valid, one cycle per
// pair). The pair marked first restarts the accumulator with the bias; the pair
// marked last finishes the position: the next cycle, result holds the sum
// rounded back to FX16 (arithmetic shift by FRAC, saturated) and done pulses
// for one cycle. result keeps its value until the next position finishes.
//
// FX16 precision, the multiplier/adder/accumulator structure and adding the bias
// once per position follow the Hydra design. The Q8.8 format, the accumulator
// width, truncation and saturation are this design's choices.
module mac_unit
  import hydra_pkg::*;
#(
  parameter int unsigned ACC_W = 40
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  wa_pair_t in_pair,
  input  fx16_t    bias,
  output fx16_t    result,
  output logic     done
);

  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] prod, base, sum;
  logic signed [47:0]      sum_wide;

  always_comb begin
    prod = ACC_W'(in_pair.w * in_pair.a);
    base = in_pair.first ? (ACC_W'(bias) <<< FRAC) : acc;
    sum  = base + prod;
    sum_wide = 48'(sum >>> FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= '0;
      result <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (in_valid) begin
        acc <= sum;
        if (in_pair.last) begin
          result <= sat16(sum_wide);
          done   <= 1'b1;
        end
      end
    end
  end

endmodule
