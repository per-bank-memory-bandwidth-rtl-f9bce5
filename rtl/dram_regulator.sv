// dram_regulator: fixed-rate, per-domain, per-DRAM-bank bandwidth regulator.
//
// The regulator lives in the top level of the shared LLC. Each LLC bank's
// scheduler reports every AcquireBlock (cache-line read) it issues to main
// memory, with the regulation domain of the request and the DRAM bank of its
// address. The regulator keeps one access counter per (domain, DRAM bank). A
// global period counter runs over P cycles; at the end of every period all
// access counters are cleared, which replenishes the budgets. While domain d
// is regulated and its counter for bank b has reached the budget N_acc[d],
// throttle[d][b] is high. The LLC schedulers then hold back that domain's
// reads to that bank, and the tagging unit holds back the domain's
// AcquireBlocks to that bank at the cores. Other banks keep their full
// budget, so a domain can use up to N_acc x N_BANKS lines per period while a
// single bank never sees more than N_acc. The per-bank bandwidth is
// N_acc / P x 64 B x f.
//
// Registers (32-bit, byte offsets, see bru_pkg):
//   0x000 PERIOD     period P in cycles; a write also restarts the period and
//                    clears all counters (P = 0 acts as P = 1)
//   0x004 DOMAIN_EN  bit d set: domain d is regulated (reset: none)
//   0x100 + 4d       BUDGET[d], N_acc of domain d (one value for all banks)
//   0x400 + 4(d*N_BANKS + b)  COUNT[d][b], read-only
//
// Timing: events are counted on the clock edge of the cycle they are
// reported in; throttle is decoded from registers only, so it rises the cycle
// after the access that reached the budget and falls the cycle after the
// period ends. Accesses reported in the cycle the period ends count toward
// the new period. With several LLC banks issuing in the same cycle a counter
// can pass the budget by at most N_LLC_BANKS - 1 accesses.
//
// The counting of AcquireBlocks, the per-domain budget register, the global
// period register, domain enables and the clear-at-period-end scheme follow
// the regulator's architecture. The register offsets and reset values,
// throttling at count >= budget, the readable counters and the saturating
// counters are this design's own.
module dram_regulator
  import bru_pkg::*;
#(
  parameter int unsigned N_DOMAINS    = 2,
  parameter int unsigned BANK_BITS    = 3,
  parameter int unsigned N_LLC_BANKS  = 2,
  parameter int unsigned CNT_W        = 32,
  parameter int unsigned RESET_PERIOD = EVAL_PERIOD_CYCLES,
  parameter int unsigned RESET_BUDGET = EVAL_BUDGET_LINES,
  localparam int unsigned N_BANKS     = 1 << BANK_BITS,
  localparam int unsigned DOM_W       = (N_DOMAINS > 1) ? $clog2(N_DOMAINS) : 1
) (
  input  logic clk,
  input  logic rst_n,

  // issued AcquireBlock reports, one per LLC bank
  input  logic [N_LLC_BANKS-1:0]                ev_valid,
  input  logic [N_LLC_BANKS-1:0][DOM_W-1:0]     ev_domain,
  input  logic [N_LLC_BANKS-1:0][BANK_BITS-1:0] ev_bank,

  // throttle bits to the LLC schedulers and the tagging unit
  output logic [N_DOMAINS-1:0][N_BANKS-1:0]     throttle,

  // last cycle of the current period
  output logic                                  period_end,

  // register port
  input  mmio_req_t mmio_req,
  output mmio_rsp_t mmio_rsp
);

  localparam logic [CNT_W-1:0] CNT_MAX = '1;
  localparam int unsigned INC_W = $clog2(N_LLC_BANKS + 1);

  logic [CNT_W-1:0]                               period_q;
  logic [CNT_W-1:0]                               tick_q;
  logic [N_DOMAINS-1:0]                           en_q;
  logic [N_DOMAINS-1:0][CNT_W-1:0]                budget_q;
  logic [N_DOMAINS-1:0][N_BANKS-1:0][CNT_W-1:0]   cnt_q;

  logic [MMIO_AW-3:0] word;
  logic               wr_period;

  assign word      = mmio_req.addr[MMIO_AW-1:2];
  assign wr_period = mmio_req.valid && mmio_req.write && mmio_req.addr == REG_PERIOD;

  // period counter
  assign period_end = (tick_q + 1'b1 >= period_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick_q <= '0;
    end else if (wr_period || period_end) begin
      tick_q <= '0;
    end else begin
      tick_q <= tick_q + 1'b1;
    end
  end

  // access counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
    end else begin
      for (int unsigned d = 0; d < N_DOMAINS; d++) begin
        for (int unsigned b = 0; b < N_BANKS; b++) begin
          logic [INC_W-1:0] inc;
          logic [CNT_W:0]   sum;
          inc = '0;
          for (int unsigned l = 0; l < N_LLC_BANKS; l++) begin
            if (ev_valid[l] && 32'(ev_domain[l]) == d && 32'(ev_bank[l]) == b) begin
              inc = inc + 1'b1;
            end
          end
          sum = ((wr_period || period_end) ? '0 : {1'b0, cnt_q[d][b]}) + (CNT_W+1)'(inc);
          cnt_q[d][b] <= sum[CNT_W] ? CNT_MAX : sum[CNT_W-1:0];
        end
      end
    end
  end

  // throttle decode
  always_comb begin
    for (int unsigned d = 0; d < N_DOMAINS; d++) begin
      for (int unsigned b = 0; b < N_BANKS; b++) begin
        throttle[d][b] = en_q[d] && (cnt_q[d][b] >= budget_q[d]);
      end
    end
  end

  // register port
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period_q <= CNT_W'(RESET_PERIOD);
      en_q     <= '0;
      budget_q <= {N_DOMAINS{CNT_W'(RESET_BUDGET)}};
      mmio_rsp <= '0;
    end else begin
      mmio_rsp.valid <= mmio_req.valid;
      mmio_rsp.rdata <= '0;
      if (mmio_req.valid) begin
        if (mmio_req.addr == REG_PERIOD) begin
          if (mmio_req.write) period_q <= CNT_W'(mmio_req.wdata);
          mmio_rsp.rdata <= MMIO_DW'(period_q);
        end
        if (mmio_req.addr == REG_DOMAIN_EN) begin
          if (mmio_req.write) en_q <= mmio_req.wdata[N_DOMAINS-1:0];
          mmio_rsp.rdata <= MMIO_DW'(en_q);
        end
        for (int unsigned d = 0; d < N_DOMAINS; d++) begin
          if (word == REG_BUDGET0[MMIO_AW-1:2] + (MMIO_AW-2)'(d)) begin
            if (mmio_req.write) budget_q[d] <= CNT_W'(mmio_req.wdata);
            mmio_rsp.rdata <= MMIO_DW'(budget_q[d]);
          end
          for (int unsigned b = 0; b < N_BANKS; b++) begin
            if (word == REG_COUNT0[MMIO_AW-1:2] + (MMIO_AW-2)'(d * N_BANKS + b)) begin
              mmio_rsp.rdata <= MMIO_DW'(cnt_q[d][b]);
            end
          end
        end
      end
    end
  end

  // Reported domains and banks must exist.
  for (genvar l = 0; l < N_LLC_BANKS; l++) begin : g_chk
    a_event_domain: assert property (@(posedge clk) disable iff (!rst_n)
      ev_valid[l] |-> 32'(ev_domain[l]) < N_DOMAINS);
  end

endmodule
