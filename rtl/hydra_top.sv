// hydra_top: a DRAM module with one Hydra accelerator per chip, and the result
// accumulation unit of the memory controller.
//
// N_RANKS ranks of CHIPS_PER_RANK chips (2 x 8 = 16 Hydras by default). Each
// chip holds: its chip I/O, the internal shared bus arbiter, a Hydra unit, and a
// port towards its DRAM banks (the banks themselves are outside this RTL). The
// memory controller, which is also outside, drives one command bus per rank:
// every chip of the rank decodes the same command and address, each with its
// own 16-bit data lane, so one WRITE fills e.g. the weight buffers of all chips
// of a rank with different data, and one READ returns one OB word from each.
//
// Dataflow (following the Hydra design): each Hydra convolves or pools one input
// channel; 16 channels run at once across the chips (inter-chip parallelism),
// and within a Hydra 32 MAC lanes compute 32 neuron positions at once
// (intra-chip parallelism). The memory controller reads the OB words back with
// READ commands whose acc_first/acc_last/relu_en fields, and the acc_mask
// lanes, steer the result accumulation unit: it sums the partial results of
// the chips and ranks per neuron and applies the linear function; the final
// values appear on res_valid/res_addr/res_data.
//
// OB reads of the two ranks must not be issued in the same cycle (asserted).
// The rank/chip organisation, Hydra count and buffer sizes follow the design;
// the command encoding and the accumulation control fields are this design's.
module hydra_top
  import hydra_pkg::*;
#(
  parameter int unsigned N_RANKS        = 2,
  parameter int unsigned CHIPS_PER_RANK = 8,
  parameter int unsigned N_MAC          = 32,
  parameter int unsigned AB_DEPTH       = 512,
  parameter int unsigned WB_DEPTH       = 64,
  parameter int unsigned OB_DEPTH       = 512,
  parameter int unsigned SB_DEPTH       = 4,
  localparam int unsigned NH    = N_RANKS * CHIPS_PER_RANK,
  localparam int unsigned OB_AW = $clog2(OB_DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  // memory controller side, per rank
  input  rank_cmd_t   cmd       [N_RANKS],
  input  fx16_t       wdata     [N_RANKS][CHIPS_PER_RANK],
  input  logic [CHIPS_PER_RANK-1:0] acc_mask [N_RANKS],
  output fx16_t       rdata     [N_RANKS][CHIPS_PER_RANK],
  output logic [CHIPS_PER_RANK-1:0] rvalid    [N_RANKS],
  output logic [CHIPS_PER_RANK-1:0] bank_busy [N_RANKS],
  // DRAM bank port of each chip (chip c of rank r is index r*CHIPS_PER_RANK+c)
  output logic                bank_req   [NH],
  output logic                bank_we    [NH],
  output logic [BANK_AW-1:0]  bank_addr  [NH],
  output fx16_t               bank_wdata [NH],
  input  logic                bank_rvalid[NH],
  input  fx16_t               bank_rdata [NH],
  // Hydra status
  output logic [NH-1:0]       hydra_busy,
  output logic [NH-1:0]       hydra_done,
  // results of the result accumulation unit
  output logic                res_valid,
  output logic [OB_AW-1:0]    res_addr,
  output fx16_t               res_data
);

  localparam int unsigned AB_AW = $clog2(AB_DEPTH);
  localparam int unsigned WB_AW = $clog2(WB_DEPTH);

  for (genvar r = 0; r < N_RANKS; r++) begin : g_rank
    for (genvar c = 0; c < CHIPS_PER_RANK; c++) begin : g_chip
      localparam int unsigned H = r * CHIPS_PER_RANK + c;

      logic               ab_we, wb_we, reg_we, ob_rd;
      logic [AB_AW-1:0]   ab_addr;
      logic [WB_AW-1:0]   wb_addr;
      logic [OB_AW-1:0]   ob_addr;
      logic [REG_AW-1:0]  reg_idx;
      fx16_t              buf_wdata, reg_rdata, ob_rdata;

      logic [1:0]         m_req, m_we, m_gnt, m_rvalid;
      logic [BANK_AW-1:0] m_addr  [2];
      fx16_t              m_wdata [2];
      fx16_t              m_rdata;
      logic               h_req;
      logic [BANK_AW-1:0] h_addr;

      chip_io #(.AB_AW(AB_AW), .WB_AW(WB_AW), .OB_AW(OB_AW)) u_io (
        .clk, .rst_n,
        .cmd(cmd[r]), .wdata(wdata[r][c]), .rdata(rdata[r][c]), .rvalid(rvalid[r][c]),
        .bank_busy(bank_busy[r][c]),
        .ab_we, .ab_addr, .wb_we, .wb_addr, .buf_wdata,
        .reg_we, .reg_idx, .reg_rdata, .ob_rd, .ob_addr, .ob_rdata,
        .bus_req(m_req[0]), .bus_we(m_we[0]), .bus_addr(m_addr[0]), .bus_wdata(m_wdata[0]),
        .bus_gnt(m_gnt[0]), .bus_rvalid(m_rvalid[0]), .bus_rdata(m_rdata)
      );

      assign m_req[1]   = h_req;
      assign m_we[1]    = 1'b0;
      assign m_addr[1]  = h_addr;
      assign m_wdata[1] = '0;

      shared_bus_arbiter #(.N_MASTERS(2)) u_bus (
        .clk, .rst_n,
        .m_req, .m_we, .m_addr, .m_wdata, .m_gnt, .m_rvalid, .m_rdata,
        .b_req(bank_req[H]), .b_we(bank_we[H]), .b_addr(bank_addr[H]),
        .b_wdata(bank_wdata[H]), .b_rvalid(bank_rvalid[H]), .b_rdata(bank_rdata[H])
      );

      hydra_unit #(
        .N_MAC(N_MAC), .AB_DEPTH(AB_DEPTH), .WB_DEPTH(WB_DEPTH),
        .OB_DEPTH(OB_DEPTH), .SB_DEPTH(SB_DEPTH)
      ) u_hydra (
        .clk, .rst_n,
        .io_ab_we(ab_we), .io_ab_addr(ab_addr), .io_wb_we(wb_we), .io_wb_addr(wb_addr),
        .io_wdata(buf_wdata), .io_reg_we(reg_we), .io_reg_idx(reg_idx),
        .io_reg_rdata(reg_rdata), .io_ob_rd(ob_rd), .io_ob_addr(ob_addr),
        .io_ob_rdata(ob_rdata),
        .bus_req(h_req), .bus_addr(h_addr), .bus_gnt(m_gnt[1]),
        .bus_rvalid(m_rvalid[1]), .bus_rdata(m_rdata),
        .busy(hydra_busy[H]), .done(hydra_done[H])
      );
    end
  end

  // OB reads returning to the memory controller feed the accumulation unit
  rank_cmd_t                   cmd_q [N_RANKS];
  logic [CHIPS_PER_RANK-1:0]   mask_q [N_RANKS];
  logic [N_RANKS-1:0]          ob_ret;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N_RANKS; r++) begin
        cmd_q[r]  <= '0;
        mask_q[r] <= '0;
      end
    end else begin
      for (int r = 0; r < N_RANKS; r++) begin
        cmd_q[r]  <= cmd[r];
        mask_q[r] <= acc_mask[r];
      end
    end
  end

  logic                         rau_valid, rau_first, rau_last, rau_relu;
  logic [OB_AW-1:0]             rau_addr;
  fx16_t [CHIPS_PER_RANK-1:0]   rau_data;
  logic  [CHIPS_PER_RANK-1:0]   rau_mask;

  always_comb begin
    rau_valid = 1'b0;
    rau_first = 1'b0;
    rau_last  = 1'b0;
    rau_relu  = 1'b0;
    rau_addr  = '0;
    rau_data  = '0;
    rau_mask  = '0;
    for (int r = 0; r < N_RANKS; r++) begin
      ob_ret[r] = (cmd_q[r].op == CMD_READ) &&
                  (region_e'(cmd_q[r].addr[ADDR_W-1 -: 3]) == RGN_OB);
      if (ob_ret[r] && !rau_valid) begin
        rau_valid = 1'b1;
        rau_first = cmd_q[r].acc_first;
        rau_last  = cmd_q[r].acc_last;
        rau_relu  = cmd_q[r].relu_en;
        rau_addr  = cmd_q[r].addr[OB_AW-1:0];
        rau_mask  = mask_q[r];
        for (int c = 0; c < CHIPS_PER_RANK; c++) rau_data[c] = rdata[r][c];
      end
    end
  end

  result_accumulation_unit #(.N_LANES(CHIPS_PER_RANK), .DEPTH(OB_DEPTH)) u_rau (
    .clk, .rst_n,
    .in_valid(rau_valid), .in_addr(rau_addr), .in_data(rau_data), .in_mask(rau_mask),
    .acc_first(rau_first), .acc_last(rau_last), .relu_en(rau_relu),
    .out_valid(res_valid), .out_addr(res_addr), .out_data(res_data)
  );

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ob_ret))
    else $error("hydra_top: OB reads of several ranks return in the same cycle");

endmodule
