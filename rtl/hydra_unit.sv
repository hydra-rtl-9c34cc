// hydra_unit: one Hydra near-memory CNN accelerator, placed in one DRAM chip.
//
// Contents: register stack (layer meta-data and bias), controller and command
// generator, activation buffer (AB, 512 x FX16), weight buffer (WB, 64 x FX16),
// N_MAC streaming buffers of <W,A> pairs, N_MAC MAC lanes, the pool unit with one
// comparator per lane, the output mux and the output buffer (OB).
//
// The memory controller (through chip_io) writes the layer parameters and bias
// into the register stack and, unless the controller loads them from the DRAM
// banks itself, the kernel into WB and the input map into AB. A write to REG_START
// runs the layer; status reads {done, busy}. Each lane pops one pair per cycle
// from its streaming buffer into its MAC (convolution) or its pool comparator
// (max pooling). Finished results go through the output mux into OB, where the
// memory controller reads them (1-cycle synchronous read).
//
// The bus_* port is the command generator's master port on the chip's internal
// shared bus. The block list and sizes follow the Hydra design; the OB depth and
// the streaming buffer depth are this design's choices.
module hydra_unit
  import hydra_pkg::*;
#(
  parameter int unsigned N_MAC    = 32,
  parameter int unsigned AB_DEPTH = 512,
  parameter int unsigned WB_DEPTH = 64,
  parameter int unsigned OB_DEPTH = 512,
  parameter int unsigned SB_DEPTH = 4,
  localparam int unsigned AB_AW = $clog2(AB_DEPTH),
  localparam int unsigned WB_AW = $clog2(WB_DEPTH),
  localparam int unsigned OB_AW = $clog2(OB_DEPTH),
  localparam int unsigned LW    = (N_MAC > 1) ? $clog2(N_MAC) : 1,
  localparam int unsigned SCW   = $clog2(SB_DEPTH + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // from chip I/O
  input  logic                io_ab_we,
  input  logic [AB_AW-1:0]    io_ab_addr,
  input  logic                io_wb_we,
  input  logic [WB_AW-1:0]    io_wb_addr,
  input  fx16_t               io_wdata,
  input  logic                io_reg_we,
  input  logic [REG_AW-1:0]   io_reg_idx,
  output fx16_t               io_reg_rdata,
  input  logic                io_ob_rd,
  input  logic [OB_AW-1:0]    io_ob_addr,
  output fx16_t               io_ob_rdata,
  // internal shared bus master port (command generator)
  output logic                bus_req,
  output logic [BANK_AW-1:0]  bus_addr,
  input  logic                bus_gnt,
  input  logic                bus_rvalid,
  input  fx16_t               bus_rdata,
  output logic                busy,
  output logic                done
);

  layer_cfg_t cfg;
  logic       start;

  register_stack u_regs (
    .clk, .rst_n,
    .wr_en(io_reg_we), .wr_idx(io_reg_idx), .wr_data(io_wdata),
    .rd_idx(io_reg_idx), .rd_data(io_reg_rdata),
    .busy, .done, .cfg, .start
  );

  // controller
  logic               c_ab_we, c_wb_we, ab_rd, wb_rd, ob_we;
  logic [WB_AW-1:0]   c_wb_waddr;
  fx16_t              c_wb_wdata;
  logic [AB_AW-1:0]   c_ab_waddr, ab_raddr;
  fx16_t              c_ab_wdata, ab_rdata, wb_rdata, ob_wdata;
  logic [WB_AW-1:0]   wb_raddr;
  logic [OB_AW-1:0]   ob_waddr;
  logic [LW-1:0]      drain_lane;
  logic     [N_MAC-1:0] sb_push, sb_afull, sb_valid, lane_done, mac_done, pool_done;
  wa_pair_t [N_MAC-1:0] sb_pair, sb_head;
  fx16_t    [N_MAC-1:0] mac_res, pool_res;
  logic                 stall;

  hydra_controller #(
    .N_MAC(N_MAC), .AB_DEPTH(AB_DEPTH), .WB_DEPTH(WB_DEPTH), .OB_DEPTH(OB_DEPTH)
  ) u_ctrl (
    .clk, .rst_n, .cfg, .start, .busy, .done,
    .bus_req, .bus_addr, .bus_gnt, .bus_rvalid, .bus_rdata,
    .ab_we(c_ab_we), .ab_waddr(c_ab_waddr), .ab_wdata(c_ab_wdata),
    .ab_rd, .ab_raddr, .ab_rdata,
    .wb_we(c_wb_we), .wb_waddr(c_wb_waddr), .wb_wdata(c_wb_wdata),
    .wb_rd, .wb_raddr, .wb_rdata,
    .sb_push, .sb_pair, .sb_afull, .lane_done,
    .ob_we, .ob_waddr, .drain_lane, .stall
  );

  // AB and WB are written by the command generator while it loads, else by chip I/O
  buffer_ram #(.DEPTH(AB_DEPTH), .WIDTH(16)) u_ab (
    .clk,
    .wr_en(c_ab_we || io_ab_we),
    .wr_addr(c_ab_we ? c_ab_waddr : io_ab_addr),
    .wr_data(c_ab_we ? c_ab_wdata : io_wdata),
    .rd_en(ab_rd), .rd_addr(ab_raddr), .rd_data(ab_rdata)
  );

  buffer_ram #(.DEPTH(WB_DEPTH), .WIDTH(16)) u_wb (
    .clk,
    .wr_en(c_wb_we || io_wb_we),
    .wr_addr(c_wb_we ? c_wb_waddr : io_wb_addr),
    .wr_data(c_wb_we ? c_wb_wdata : io_wdata),
    .rd_en(wb_rd), .rd_addr(wb_raddr), .rd_data(wb_rdata)
  );

  // streaming buffers and MAC lanes
  logic is_pool;
  assign is_pool = (cfg.mode == MODE_POOL);

  for (genvar j = 0; j < N_MAC; j++) begin : g_lane
    logic [SCW-1:0] cnt;
    stream_buffer #(.DEPTH(SB_DEPTH)) u_sb (
      .clk, .rst_n,
      .push(sb_push[j]), .wr_data(sb_pair[j]),
      .pop(sb_valid[j]), .rd_data(sb_head[j]), .valid(sb_valid[j]), .count(cnt)
    );
    assign sb_afull[j] = (cnt >= SCW'(SB_DEPTH - 1));

    mac_unit u_mac (
      .clk, .rst_n,
      .in_valid(sb_valid[j] && !is_pool), .in_pair(sb_head[j]), .bias(cfg.bias),
      .result(mac_res[j]), .done(mac_done[j])
    );
  end

  pool_unit #(.N_LANES(N_MAC)) u_pool (
    .clk, .rst_n,
    .in_valid(sb_valid & {N_MAC{is_pool}}), .in_pair(sb_head),
    .result(pool_res), .done(pool_done)
  );

  assign lane_done = is_pool ? pool_done : mac_done;

  // output mux in front of OB
  assign ob_wdata = is_pool ? pool_res[drain_lane] : mac_res[drain_lane];

  buffer_ram #(.DEPTH(OB_DEPTH), .WIDTH(16)) u_ob (
    .clk,
    .wr_en(ob_we), .wr_addr(ob_waddr), .wr_data(ob_wdata),
    .rd_en(io_ob_rd), .rd_addr(io_ob_addr), .rd_data(io_ob_rdata)
  );

  assert property (@(posedge clk) disable iff (!rst_n) !(c_wb_we && io_wb_we))
    else $error("hydra_unit: WB written by the command generator and chip I/O at once");
  assert property (@(posedge clk) disable iff (!rst_n) !(c_ab_we && io_ab_we))
    else $error("hydra_unit: chip I/O writes AB while the command generator loads it");

endmodule
