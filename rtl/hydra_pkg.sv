// hydra_pkg: types and constants shared by the Hydra near-memory CNN accelerator.
//
// Data are 16-bit fixed point (FX16). The number of fraction bits (FRAC) is this
// design's choice: Q8.8. Products of two FX16 values are accumulated at full
// precision and rounded back to FX16 (truncation, saturation) only when a neuron
// position is finished.
//
// The command bus from the memory controller to a rank carries a plain READ /
// WRITE command, an address and, for this design, three qualifiers that stay
// inside the memory controller and steer its result accumulation unit.
//
// Address map of one chip (16-bit word address, upper three bits select a
// region; this map is this design's choice):
//   3'd0  DRAM banks of the chip (13-bit word address, through the internal bus)
//   3'd1  activation buffer (AB)
//   3'd2  weight buffer (WB)
//   3'd3  output buffer (OB), read only
//   3'd4  register stack
package hydra_pkg;

  localparam int unsigned DATA_W   = 16;   // FX16
  localparam int unsigned FRAC     = 8;    // Q8.8
  localparam int unsigned ADDR_W   = 16;   // chip word address
  localparam int unsigned BANK_AW  = 13;   // bank word address on the internal bus
  localparam int unsigned REG_AW   = 4;    // register stack index width

  typedef logic signed [DATA_W-1:0] fx16_t;

  // Memory command on a rank's command/address bus
  typedef enum logic [1:0] {
    CMD_NOP   = 2'd0,
    CMD_WRITE = 2'd1,
    CMD_READ  = 2'd2
  } mem_cmd_e;

  // Chip address regions (addr[15:13])
  typedef enum logic [2:0] {
    RGN_BANK = 3'd0,
    RGN_AB   = 3'd1,
    RGN_WB   = 3'd2,
    RGN_OB   = 3'd3,
    RGN_REG  = 3'd4
  } region_e;

  typedef struct packed {
    mem_cmd_e           op;
    logic [ADDR_W-1:0]  addr;
    logic               acc_first;  // result accumulation: clear the partial sum first
    logic               acc_last;   // result accumulation: final pass, apply linear function
    logic               relu_en;    // result accumulation: linear function is ReLU when set
  } rank_cmd_t;

  // Register stack indices
  typedef enum logic [REG_AW-1:0] {
    REG_MODE    = 4'd0,   // 0: convolution, 1: max pooling
    REG_IN_H    = 4'd1,   // input map rows held in AB
    REG_IN_W    = 4'd2,   // input map columns held in AB
    REG_K       = 4'd3,   // kernel (or pool window) size, square
    REG_STRIDE  = 4'd4,
    REG_BIAS    = 4'd5,   // FX16 bias, added once per neuron position
    REG_SRC     = 4'd6,   // DRAM bank word address of the input map
    REG_SRC_LEN = 4'd7,   // words the command generator loads into AB (0: none)
    REG_START   = 4'd8,   // write: start the layer
    REG_STATUS  = 4'd9,   // read: {done, busy}
    REG_AB_BASE = 4'd10,  // first AB word of the input map
    REG_WB_BASE = 4'd11,  // first WB word of the kernel
    REG_WSRC    = 4'd12,  // DRAM bank word address of the kernel
    REG_WSRC_LEN = 4'd13  // words the command generator loads into WB (0: none)
  } reg_idx_e;

  typedef enum logic { MODE_CONV = 1'b0, MODE_POOL = 1'b1 } layer_mode_e;

  // Layer configuration held in the register stack
  typedef struct packed {
    layer_mode_e          mode;
    logic [9:0]           in_h;
    logic [9:0]           in_w;
    logic [3:0]           k;
    logic [3:0]           stride;
    fx16_t                bias;
    logic [BANK_AW-1:0]   src;
    logic [9:0]           src_len;
    logic [9:0]           ab_base;
    logic [7:0]           wb_base;
    logic [BANK_AW-1:0]   wsrc;
    logic [7:0]           wsrc_len;
  } layer_cfg_t;

  // One weight-activation pair in a streaming buffer
  typedef struct packed {
    logic   first;   // first pair of a neuron position
    logic   last;    // last pair of a neuron position
    fx16_t  w;
    fx16_t  a;
  } wa_pair_t;

  // Saturate a wide signed value to FX16
  function automatic fx16_t sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

endpackage
