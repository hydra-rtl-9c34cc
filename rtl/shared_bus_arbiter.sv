// shared_bus_arbiter: the internal shared bus of one DRAM chip.
//
// All banks of a chip sit on one internal bus. Both the chip I/O (ordinary
// memory-controller traffic, master 0) and the Hydra command generator (master
// 1) use it, so the bus is arbitrated: each cycle at most one request goes to
// the banks, chosen round-robin among the masters that request. A master's
// request is accepted in the cycle its gnt is high; it keeps req high until
// then. The banks return read data in order after a fixed latency; the arbiter
// remembers which master each read belongs to in a small FIFO and returns the
// data on that master's rvalid/rdata.
//
// The shared bus and its arbitration follow the Hydra design; round-robin, the
// request/grant handshake and in-order read return are this design's choices.
// The banks are assumed to accept one request every cycle.
module shared_bus_arbiter
  import hydra_pkg::*;
#(
  parameter int unsigned N_MASTERS  = 2,
  parameter int unsigned MAX_OUTST  = 16,
  localparam int unsigned IW = (N_MASTERS > 1) ? $clog2(N_MASTERS) : 1,
  localparam int unsigned QW = $clog2(MAX_OUTST)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // masters
  input  logic [N_MASTERS-1:0]    m_req,
  input  logic [N_MASTERS-1:0]    m_we,
  input  logic [BANK_AW-1:0]      m_addr  [N_MASTERS],
  input  fx16_t                   m_wdata [N_MASTERS],
  output logic [N_MASTERS-1:0]    m_gnt,
  output logic [N_MASTERS-1:0]    m_rvalid,
  output fx16_t                   m_rdata,
  // banks
  output logic                    b_req,
  output logic                    b_we,
  output logic [BANK_AW-1:0]      b_addr,
  output fx16_t                   b_wdata,
  input  logic                    b_rvalid,
  input  fx16_t                   b_rdata
);

  logic [IW-1:0] last_id, sel;
  logic          any;

  // round-robin: search from the master after the last one granted
  always_comb begin
    sel = last_id;
    any = 1'b0;
    for (int unsigned k = 1; k <= N_MASTERS; k++) begin
      int unsigned idx;
      idx = (int'(last_id) + k) % N_MASTERS;
      if (!any && m_req[idx]) begin
        sel = IW'(idx);
        any = 1'b1;
      end
    end
  end

  always_comb begin
    m_gnt = '0;
    if (any) m_gnt[sel] = 1'b1;
    b_req   = any;
    b_we    = m_we[sel];
    b_addr  = m_addr[sel];
    b_wdata = m_wdata[sel];
  end

  // owner FIFO of outstanding reads
  logic [IW-1:0] owner [MAX_OUTST];
  logic [QW-1:0] wp, rp;
  logic [QW:0]   cnt;
  logic          push, pop;

  assign push = any && !m_we[sel];
  assign pop  = b_rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_id <= '0;
      wp <= '0;
      rp <= '0;
      cnt <= '0;
    end else begin
      if (any) last_id <= sel;
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      cnt <= cnt + (QW+1)'(push) - (QW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) owner[wp] <= sel;
  end

  always_comb begin
    m_rvalid = '0;
    if (b_rvalid) m_rvalid[owner[rp]] = 1'b1;
    m_rdata = b_rdata;
  end

  assert property (@(posedge clk) disable iff (!rst_n) b_rvalid |-> cnt != '0)
    else $error("shared_bus_arbiter: read data with no read outstanding");
  assert property (@(posedge clk) disable iff (!rst_n) push |-> (cnt < (QW+1)'(MAX_OUTST)) || pop)
    else $error("shared_bus_arbiter: too many reads outstanding");

endmodule
