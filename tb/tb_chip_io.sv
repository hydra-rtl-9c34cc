// tb_chip_io: self-checking test of the chip I/O decoder. Sends WRITE and READ
// commands to every address region and checks the strobes, addresses and data
// towards the Hydra unit, the one-cycle return of OB and register reads, and
// bank commands waiting for their bus grant and returning bank read data.
module tb_chip_io;
  import hydra_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0;
  rank_cmd_t cmd = '0;
  fx16_t wdata = '0, rdata, buf_wdata, reg_rdata, ob_rdata = '0, bus_wdata, bus_rdata = '0;
  logic rvalid, bank_busy, ab_we, wb_we, reg_we, ob_rd, bus_req, bus_we;
  logic bus_gnt = 0, bus_rvalid = 0;
  logic [8:0] ab_addr, ob_addr;
  logic [5:0] wb_addr;
  logic [REG_AW-1:0] reg_idx;
  logic [BANK_AW-1:0] bus_addr;

  chip_io dut (.*);

  // Hydra-side models: register read is combinational, OB read synchronous
  assign reg_rdata = fx16_t'(16'h1000 + reg_idx);
  always_ff @(posedge clk) if (ob_rd) ob_rdata <= fx16_t'(16'h2000 + ob_addr);

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  task automatic send(input mem_cmd_e op, input region_e rg, input int a, input int d);
    cmd <= '{op: op, addr: {rg, 13'(a)}, acc_first: 0, acc_last: 0, relu_en: 0};
    wdata <= fx16_t'(d);
    @(posedge clk);
    cmd <= '0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // writes to the local regions
    for (int rg = 1; rg <= 4; rg++) begin
      automatic int a = $urandom_range(0, 8);
      automatic int d = $urandom_range(0, 65535);
      cmd <= '{op: CMD_WRITE, addr: {3'(rg), 13'(a)}, acc_first: 0, acc_last: 0, relu_en: 0};
      wdata <= fx16_t'(d);
      #1;
      chk(ab_we, rg == 1, "ab_we"); chk(wb_we, rg == 2, "wb_we"); chk(reg_we, rg == 4, "reg_we");
      chk(ob_rd, 0, "ob_rd on write"); chk(bus_req, 0, "no bus");
      chk($unsigned(buf_wdata), d, "wdata");
      if (rg == 1) chk(ab_addr, a, "ab_addr");
      if (rg == 2) chk(wb_addr, a, "wb_addr");
      if (rg == 4) chk(reg_idx, a, "reg_idx");
      @(posedge clk);
      cmd <= '0;
      #1;
      chk(ab_we, 0, "idle ab_we"); chk(wb_we, 0, "idle wb_we"); chk(reg_we, 0, "idle reg_we");
    end
    @(posedge clk);
    // OB and register reads return one cycle later
    send(CMD_READ, RGN_OB, 77, 0);
    #1 chk(rvalid, 1, "ob rvalid"); chk(rdata, 16'h2000 + 77, "ob rdata");
    send(CMD_READ, RGN_REG, 5, 0);
    #1 chk(rvalid, 1, "reg rvalid"); chk(rdata, 16'h1005, "reg rdata");
    @(posedge clk);
    #1 chk(rvalid, 0, "rvalid one cycle");
    // bank write waits for the grant
    send(CMD_WRITE, RGN_BANK, 1234, 16'hbeef);
    #1 chk(bus_req, 1, "bank req"); chk(bus_we, 1, "bank we"); chk(bus_addr, 1234, "bank addr");
    chk($unsigned(bus_wdata), 16'hbeef, "bank wdata"); chk(bank_busy, 1, "busy");
    repeat (3) @(posedge clk);
    #1 chk(bus_req, 1, "req held");
    bus_gnt = 1;
    @(posedge clk);
    #1 bus_gnt = 0;
    chk(bus_req, 0, "req dropped after grant"); chk(bank_busy, 0, "not busy");
    // bank read: granted at once, data returns later
    send(CMD_READ, RGN_BANK, 42, 0);
    #1 chk(bus_req, 1, "read req"); chk(bus_we, 0, "read we"); chk(bus_addr, 42, "read addr");
    bus_gnt = 1;
    @(posedge clk);
    #1 bus_gnt = 0;
    repeat (4) @(posedge clk);
    #1 chk(rvalid, 0, "no early data");
    bus_rvalid = 1; bus_rdata = 16'h5a5a;
    #1 chk(rvalid, 1, "bank rvalid"); chk($unsigned(rdata), 16'h5a5a, "bank rdata");
    @(posedge clk);
    #1 bus_rvalid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
