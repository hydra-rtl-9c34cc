// pool_unit: the pool unit of a Hydra, one comparator per lane (32 by default).
//
// Each lane takes the activations of one pooling window from its streaming
// buffer (in_valid[i], one per cycle) and keeps the running maximum. The
// activation marked first starts a new window; on the one marked last, the next
// cycle result[i] holds the window maximum and done[i] pulses for one cycle.
//
// A pool unit with 32 comparators is part of the Hydra design; max pooling (the
// CNN model the design is built for pools by maximum) and the per-lane
// running-maximum structure are this implementation's reading of it.
module pool_unit
  import hydra_pkg::*;
#(
  parameter int unsigned N_LANES = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic     [N_LANES-1:0] in_valid,
  input  wa_pair_t [N_LANES-1:0] in_pair,
  output fx16_t    [N_LANES-1:0] result,
  output logic     [N_LANES-1:0] done
);

  fx16_t [N_LANES-1:0] run_max;

  for (genvar i = 0; i < N_LANES; i++) begin : g_lane
    fx16_t nxt;
    always_comb begin
      if (in_pair[i].first || (in_pair[i].a > run_max[i])) nxt = in_pair[i].a;
      else                                                  nxt = run_max[i];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        run_max[i] <= '0;
        result[i]  <= '0;
        done[i]    <= 1'b0;
      end else begin
        done[i] <= 1'b0;
        if (in_valid[i]) begin
          run_max[i] <= nxt;
          if (in_pair[i].last) begin
            result[i] <= nxt;
            done[i]   <= 1'b1;
          end
        end
      end
    end
  end

endmodule
