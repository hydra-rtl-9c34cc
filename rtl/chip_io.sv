// chip_io: the chip I/O of one DRAM chip that holds a Hydra unit.
//
// The memory controller drives the same command and address to every chip of a
// rank; each chip has its own 16-bit data lane. chip_io decodes the address
// region (see hydra_pkg) of a WRITE or READ command:
//   - AB, WB and register-stack writes go straight to the Hydra unit (the
//     Hydra design fills AB and WB with WRITE commands);
//   - OB and register-stack reads return their word on rdata with rvalid one
//     cycle after the command;
//   - bank reads and writes become requests on the chip's internal shared bus
//     (master 0). A request waits for its grant in a one-entry register;
//     bank_busy is high meanwhile and the controller must not send another bank
//     command to this rank. Bank read data return on rdata/rvalid when the
//     banks deliver them.
// The controller must not let a local read and a bank read return in the same
// cycle (asserted). The address map and the timing are this design's choices.
module chip_io
  import hydra_pkg::*;
#(
  parameter int unsigned AB_AW = 9,
  parameter int unsigned WB_AW = 6,
  parameter int unsigned OB_AW = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  // from / to the memory controller
  input  rank_cmd_t         cmd,
  input  fx16_t             wdata,
  output fx16_t             rdata,
  output logic              rvalid,
  output logic              bank_busy,
  // Hydra buffers and registers
  output logic              ab_we,
  output logic [AB_AW-1:0]  ab_addr,
  output logic              wb_we,
  output logic [WB_AW-1:0]  wb_addr,
  output fx16_t             buf_wdata,
  output logic              reg_we,
  output logic [REG_AW-1:0] reg_idx,
  input  fx16_t             reg_rdata,
  output logic              ob_rd,
  output logic [OB_AW-1:0]  ob_addr,
  input  fx16_t             ob_rdata,
  // internal shared bus, master port
  output logic              bus_req,
  output logic              bus_we,
  output logic [BANK_AW-1:0] bus_addr,
  output fx16_t             bus_wdata,
  input  logic              bus_gnt,
  input  logic              bus_rvalid,
  input  fx16_t             bus_rdata
);

  region_e rgn;
  logic    is_wr, is_rd;

  assign rgn   = region_e'(cmd.addr[ADDR_W-1 -: 3]);
  assign is_wr = (cmd.op == CMD_WRITE);
  assign is_rd = (cmd.op == CMD_READ);

  assign ab_we     = is_wr && (rgn == RGN_AB);
  assign wb_we     = is_wr && (rgn == RGN_WB);
  assign reg_we    = is_wr && (rgn == RGN_REG);
  assign ab_addr   = cmd.addr[AB_AW-1:0];
  assign wb_addr   = cmd.addr[WB_AW-1:0];
  assign reg_idx   = cmd.addr[REG_AW-1:0];
  assign buf_wdata = wdata;
  assign ob_rd     = is_rd && (rgn == RGN_OB);
  assign ob_addr   = cmd.addr[OB_AW-1:0];

  // local read return
  logic  rd_ob_q, rd_reg_q;
  fx16_t reg_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ob_q  <= 1'b0;
      rd_reg_q <= 1'b0;
      reg_q    <= '0;
    end else begin
      rd_ob_q  <= ob_rd;
      rd_reg_q <= is_rd && (rgn == RGN_REG);
      reg_q    <= reg_rdata;
    end
  end

  // bank request holding register
  logic               pend;
  logic               pend_we;
  logic [BANK_AW-1:0] pend_addr;
  fx16_t              pend_wdata;
  logic               bank_cmd;

  assign bank_cmd = (is_wr || is_rd) && (rgn == RGN_BANK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend       <= 1'b0;
      pend_we    <= 1'b0;
      pend_addr  <= '0;
      pend_wdata <= '0;
    end else begin
      if (pend && bus_gnt) pend <= 1'b0;
      if (bank_cmd) begin
        pend       <= 1'b1;
        pend_we    <= is_wr;
        pend_addr  <= cmd.addr[BANK_AW-1:0];
        pend_wdata <= wdata;
      end
    end
  end

  assign bus_req   = pend;
  assign bus_we    = pend_we;
  assign bus_addr  = pend_addr;
  assign bus_wdata = pend_wdata;
  assign bank_busy = pend;

  always_comb begin
    rvalid = rd_ob_q || rd_reg_q || bus_rvalid;
    if (rd_ob_q)       rdata = ob_rdata;
    else if (rd_reg_q) rdata = reg_q;
    else               rdata = bus_rdata;
  end

  assert property (@(posedge clk) disable iff (!rst_n) bank_cmd |-> !pend || bus_gnt)
    else $error("chip_io: bank command while the previous one waits for the bus");
  assert property (@(posedge clk) disable iff (!rst_n) !((rd_ob_q || rd_reg_q) && bus_rvalid))
    else $error("chip_io: local and bank read data collide");

endmodule
