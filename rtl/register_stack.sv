// register_stack: the layer meta-data registers of one Hydra unit.
//
// The host sends the hyperparameters of the layer (mode, input map size, kernel
// size, stride) and the bias through the memory controller; they land here as
// WRITE commands to the register region. cfg presents them to the controller.
// A write to REG_START produces a one-cycle start pulse and is not stored.
// Reads are combinational: rd_data follows rd_idx; REG_STATUS returns
// {done, busy} from the controller. All registers reset to zero. The base
// registers place the input map in AB and the kernel in WB, so that the memory
// controller can write the next layer's data into a free part of the buffers
// while a layer runs.
//
// That the register stack holds the hyperparameters and the bias follows the
// Hydra design; the register list and its encoding are this design's choice.
module register_stack
  import hydra_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [REG_AW-1:0] wr_idx,
  input  fx16_t             wr_data,
  input  logic [REG_AW-1:0] rd_idx,
  output fx16_t             rd_data,
  input  logic              busy,
  input  logic              done,
  output layer_cfg_t        cfg,
  output logic              start
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg   <= '0;
      start <= 1'b0;
    end else begin
      start <= 1'b0;
      if (wr_en) begin
        unique case (wr_idx)
          REG_MODE:    cfg.mode    <= layer_mode_e'(wr_data[0]);
          REG_IN_H:    cfg.in_h    <= wr_data[9:0];
          REG_IN_W:    cfg.in_w    <= wr_data[9:0];
          REG_K:       cfg.k       <= wr_data[3:0];
          REG_STRIDE:  cfg.stride  <= wr_data[3:0];
          REG_BIAS:    cfg.bias    <= wr_data;
          REG_SRC:     cfg.src     <= wr_data[BANK_AW-1:0];
          REG_SRC_LEN: cfg.src_len <= wr_data[9:0];
          REG_AB_BASE: cfg.ab_base <= wr_data[9:0];
          REG_WB_BASE: cfg.wb_base <= wr_data[7:0];
          REG_WSRC:    cfg.wsrc    <= wr_data[BANK_AW-1:0];
          REG_WSRC_LEN: cfg.wsrc_len <= wr_data[7:0];
          REG_START:   start       <= 1'b1;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (rd_idx)
      REG_MODE:    rd_data = fx16_t'(cfg.mode);
      REG_IN_H:    rd_data = fx16_t'(cfg.in_h);
      REG_IN_W:    rd_data = fx16_t'(cfg.in_w);
      REG_K:       rd_data = fx16_t'(cfg.k);
      REG_STRIDE:  rd_data = fx16_t'(cfg.stride);
      REG_BIAS:    rd_data = cfg.bias;
      REG_SRC:     rd_data = fx16_t'(cfg.src);
      REG_SRC_LEN: rd_data = fx16_t'(cfg.src_len);
      REG_AB_BASE: rd_data = fx16_t'(cfg.ab_base);
      REG_WB_BASE: rd_data = fx16_t'(cfg.wb_base);
      REG_WSRC:    rd_data = fx16_t'(cfg.wsrc);
      REG_WSRC_LEN: rd_data = fx16_t'(cfg.wsrc_len);
      REG_STATUS:  rd_data = fx16_t'({done, busy});
      default:     rd_data = '0;
    endcase
  end

endmodule
