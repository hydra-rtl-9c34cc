// hydra_controller: the controller and command generator of one Hydra unit.
//
// After a start from the register stack it runs one layer on one channel:
//
//  1. FETCH (command generation): it reads src_len words from the chip's DRAM
//     banks, starting at src, over the internal shared bus and writes them into
//     the activation buffer (AB) in order from ab_base; then wsrc_len words from
//     wsrc into the weight buffer (WB) from wb_base. A length of zero skips that
//     load: the memory controller has then filled the buffer with WRITE commands.
//     The map is read from AB at ab_base and the kernel from WB at wb_base;
//     the rest of both buffers is free for the next layer's data.
//  2. For every group of up to N_MAC neighbouring output positions of one output
//     row (lane j gets column ocol0+j), and for every kernel row kr:
//       KLOAD  (convolution only) reads kernel row kr from the weight buffer
//              into a K-entry row latch, one word per cycle;
//       SWEEP  reads, one per cycle, every AB activation of input row
//              orow*S+kr that any lane of the group needs, exactly once, and
//              broadcasts it: each lane j whose window covers the column
//              (offset = c - (ocol0+j)*S in 0..K-1) receives the pair
//              <W = row_latch[offset], A> in its streaming buffer. Pairs are
//              tagged first / last for the first and last element of a window.
//              A fetch is held back (stall) while any streaming buffer has fewer
//              than two free entries, so the one fetch in flight always fits.
//  3. WAIT until every active lane has reported its result, then DRAIN the
//     results, one per cycle, through the output mux into the output buffer
//     (OB) at orow*OW + ocol0 + j.
//  4. When the last group is drained, done is set until the next start.
//
// Output size: OH = (in_h-K)/S+1, OW = (in_w-K)/S+1 (no padding). Fetching each
// activation once and broadcasting it to the streaming buffers, 32 lanes at
// 32 neighbouring neuron positions, and loading AB from DRAM by generated
// commands follow the Hydra design. The loop order, the kernel row latch, the
// stall rule and the drain order are this design's choices.
module hydra_controller
  import hydra_pkg::*;
#(
  parameter int unsigned N_MAC    = 32,
  parameter int unsigned AB_DEPTH = 512,
  parameter int unsigned WB_DEPTH = 64,
  parameter int unsigned OB_DEPTH = 512,
  parameter int unsigned K_MAX    = 8,
  localparam int unsigned AB_AW = $clog2(AB_DEPTH),
  localparam int unsigned WB_AW = $clog2(WB_DEPTH),
  localparam int unsigned OB_AW = $clog2(OB_DEPTH),
  localparam int unsigned LW    = (N_MAC > 1) ? $clog2(N_MAC) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  layer_cfg_t          cfg,
  input  logic                start,
  output logic                busy,
  output logic                done,
  // internal shared bus (master port of the command generator)
  output logic                bus_req,
  output logic [BANK_AW-1:0]  bus_addr,
  input  logic                bus_gnt,
  input  logic                bus_rvalid,
  input  fx16_t               bus_rdata,
  // activation buffer
  output logic                ab_we,
  output logic [AB_AW-1:0]    ab_waddr,
  output fx16_t               ab_wdata,
  output logic                ab_rd,
  output logic [AB_AW-1:0]    ab_raddr,
  input  fx16_t               ab_rdata,
  // weight buffer
  output logic                wb_we,
  output logic [WB_AW-1:0]    wb_waddr,
  output fx16_t               wb_wdata,
  output logic                wb_rd,
  output logic [WB_AW-1:0]    wb_raddr,
  input  fx16_t               wb_rdata,
  // streaming buffers and lanes
  output logic     [N_MAC-1:0] sb_push,
  output wa_pair_t [N_MAC-1:0] sb_pair,
  input  logic     [N_MAC-1:0] sb_afull,
  input  logic     [N_MAC-1:0] lane_done,
  // output buffer, through the output mux
  output logic                ob_we,
  output logic [OB_AW-1:0]    ob_waddr,
  output logic [LW-1:0]       drain_lane,
  // activity, for performance counting
  output logic                stall
);

  typedef enum logic [2:0] {
    S_IDLE, S_FETCH, S_GROUP, S_KLOAD, S_SWEEP, S_WAIT, S_DRAIN, S_DONE
  } state_e;

  state_e state;

  // layer geometry, latched at start
  logic [9:0] oh, ow;
  logic [3:0] kk, ss;
  logic       is_pool;

  // loop counters
  logic [9:0]  orow, ocol0, ccol, cend;
  logic [3:0]  kr;
  logic [10:0] fetch_iss, fetch_ret, fetch_len;
  logic        ret_to_ab;
  logic [3:0]  kl_iss;
  logic [LW:0] n_act;
  logic [LW:0] dj;
  logic [N_MAC-1:0] act_mask, done_mask;

  fx16_t row_latch [K_MAX];

  // pipeline stage between the AB/WB read and its use
  logic       p_valid;
  logic [9:0] p_c;
  logic [3:0] p_kr;
  logic       kl_valid;
  logic [3:0] kl_idx;

  logic [9:0] rows_in, cols_in;
  assign rows_in = cfg.in_h;
  assign cols_in = cfg.in_w;

  logic [9:0] n_left;
  assign n_left = ow - ocol0;

  logic do_issue;
  assign stall    = (state == S_SWEEP) && (|sb_afull);
  assign do_issue = (state == S_SWEEP) && !(|sb_afull);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      oh        <= '0;
      ow        <= '0;
      kk        <= '0;
      ss        <= '0;
      is_pool   <= 1'b0;
      orow      <= '0;
      ocol0     <= '0;
      ccol      <= '0;
      cend      <= '0;
      kr        <= '0;
      fetch_iss <= '0;
      fetch_ret <= '0;
      kl_iss    <= '0;
      n_act     <= '0;
      dj        <= '0;
      act_mask  <= '0;
      done_mask <= '0;
      p_valid   <= 1'b0;
      p_c       <= '0;
      p_kr      <= '0;
      kl_valid  <= 1'b0;
      kl_idx    <= '0;
    end else begin
      p_valid  <= 1'b0;
      kl_valid <= 1'b0;
      done_mask <= done_mask | lane_done;

      if (kl_valid) row_latch[kl_idx[$clog2(K_MAX)-1:0]] <= wb_rdata;

      unique case (state)
        S_IDLE: begin
          if (start) begin
            done      <= 1'b0;
            oh        <= 10'((rows_in - 10'(cfg.k)) / 10'(cfg.stride) + 1);
            ow        <= 10'((cols_in - 10'(cfg.k)) / 10'(cfg.stride) + 1);
            kk        <= cfg.k;
            ss        <= cfg.stride;
            is_pool   <= (cfg.mode == MODE_POOL);
            orow      <= '0;
            ocol0     <= '0;
            fetch_iss <= '0;
            fetch_ret <= '0;
            state     <= (fetch_len != '0) ? S_FETCH : S_GROUP;
          end
        end

        S_FETCH: begin
          if (bus_req && bus_gnt) fetch_iss <= fetch_iss + 1'b1;
          if (bus_rvalid) begin
            fetch_ret <= fetch_ret + 1'b1;
            if (fetch_ret + 1'b1 == fetch_len) state <= S_GROUP;
          end
        end

        S_GROUP: begin
          n_act     <= (n_left > 10'(N_MAC)) ? (LW+1)'(N_MAC) : (LW+1)'(n_left);
          for (int j = 0; j < N_MAC; j++) act_mask[j] <= (10'(j) < n_left);
          done_mask <= '0;
          kr        <= '0;
          kl_iss    <= '0;
          ccol      <= 10'(ocol0 * ss);
          cend      <= 10'((ocol0 + ((n_left > 10'(N_MAC)) ? 10'(N_MAC) : n_left) - 1) * ss + kk - 1);
          state     <= is_pool ? S_SWEEP : S_KLOAD;
        end

        S_KLOAD: begin
          kl_valid <= 1'b1;
          kl_idx   <= kl_iss;
          kl_iss   <= kl_iss + 1'b1;
          if (kl_iss == kk - 1) state <= S_SWEEP;
        end

        S_SWEEP: begin
          if (do_issue) begin
            p_valid <= 1'b1;
            p_c     <= ccol;
            p_kr    <= kr;
            if (ccol == cend) begin
              ccol   <= 10'(ocol0 * ss);
              kl_iss <= '0;
              if (kr == kk - 1) begin
                state <= S_WAIT;
              end else begin
                kr    <= kr + 1'b1;
                state <= is_pool ? S_SWEEP : S_KLOAD;
              end
            end else begin
              ccol <= ccol + 1'b1;
            end
          end
        end

        S_WAIT: begin
          if (((done_mask | lane_done) & act_mask) == act_mask) begin
            dj    <= '0;
            state <= S_DRAIN;
          end
        end

        S_DRAIN: begin
          dj <= dj + 1'b1;
          if (dj + 1'b1 == n_act) begin
            if (ocol0 + 10'(N_MAC) >= ow) begin
              ocol0 <= '0;
              orow  <= orow + 1'b1;
              state <= (orow + 1'b1 == oh) ? S_DONE : S_GROUP;
            end else begin
              ocol0 <= ocol0 + 10'(N_MAC);
              state <= S_GROUP;
            end
          end
        end

        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // command generation towards the banks: the map first, then the kernel
  assign fetch_len = 11'(cfg.src_len) + 11'(cfg.wsrc_len);
  assign bus_req   = (state == S_FETCH) && (fetch_iss != fetch_len);
  assign bus_addr  = (fetch_iss < 11'(cfg.src_len))
                   ? BANK_AW'(cfg.src + BANK_AW'(fetch_iss))
                   : BANK_AW'(cfg.wsrc + BANK_AW'(fetch_iss - 11'(cfg.src_len)));
  assign ret_to_ab = (fetch_ret < 11'(cfg.src_len));

  // AB: fetched words in, activations out
  assign ab_we    = (state == S_FETCH) && bus_rvalid && ret_to_ab;
  assign ab_waddr = AB_AW'(11'(cfg.ab_base) + fetch_ret);
  assign ab_wdata = bus_rdata;
  assign ab_rd    = do_issue;
  assign ab_raddr = AB_AW'(cfg.ab_base + (orow * ss + 10'(kr)) * cols_in + ccol);

  // WB: fetched kernel words in
  assign wb_we    = (state == S_FETCH) && bus_rvalid && !ret_to_ab;
  assign wb_waddr = WB_AW'(11'(cfg.wb_base) + fetch_ret - 11'(cfg.src_len));
  assign wb_wdata = bus_rdata;

  // WB: one kernel row per group and kernel row
  assign wb_rd    = (state == S_KLOAD);
  assign wb_raddr = WB_AW'(10'(cfg.wb_base) + 10'(kr * kk) + 10'(kl_iss));

  // broadcast of the fetched activation to every lane whose window covers it
  always_comb begin
    for (int j = 0; j < N_MAC; j++) begin
      logic signed [11:0] off;
      off = 12'(p_c) - 12'((ocol0 + 10'(j)) * ss);
      sb_push[j]       = p_valid && act_mask[j] && (off >= 0) && (off < 12'(kk));
      sb_pair[j].first = (p_kr == 0) && (off == 0);
      sb_pair[j].last  = (p_kr == kk - 1) && (off == 12'(kk) - 1);
      sb_pair[j].a     = ab_rdata;
      sb_pair[j].w     = (is_pool || off < 0 || off >= 12'(K_MAX)) ? '0
                         : row_latch[off[$clog2(K_MAX)-1:0]];
    end
  end

  // results to OB
  assign ob_we      = (state == S_DRAIN);
  assign ob_waddr   = OB_AW'(orow * ow + ocol0 + 10'(dj));
  assign drain_lane = LW'(dj);

  assert property (@(posedge clk) disable iff (!rst_n) start && !busy |-> cfg.k != 0 && cfg.k <= 4'(K_MAX) && cfg.stride != 0)
    else $error("hydra_controller: kernel size must be 1..K_MAX and stride non-zero");
  assert property (@(posedge clk) disable iff (!rst_n) start && !busy |-> 32'(cfg.ab_base) + 32'(cfg.in_h) * 32'(cfg.in_w) <= AB_DEPTH)
    else $error("hydra_controller: input map larger than the activation buffer");
  assert property (@(posedge clk) disable iff (!rst_n) start && !busy |-> 32'(cfg.wb_base) + 32'(cfg.wsrc_len) <= WB_DEPTH)
    else $error("hydra_controller: kernel load beyond the weight buffer");

endmodule
