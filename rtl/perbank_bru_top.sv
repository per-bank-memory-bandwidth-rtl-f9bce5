// perbank_bru_top: per-bank DRAM bandwidth regulation of a multicore SoC.
//
// The regulation logic of the SoC, wired as in the system it belongs to:
//
//   cores --A--> tag_unit --A + domain--> system bus --> LLC banks
//                   ^                                     |  MSHRs
//                   |  throttle (regulation forwarding)   v
//                   +------------------ dram_regulator <- mshr_sched (x N_LLC_BANKS)
//                                                           |
//                                                           v  memory bus
//
// The tagging unit tags each core request with the core's regulation domain
// and holds back AcquireBlocks of throttled (domain, DRAM bank) pairs. Inside
// the LLC, every bank's MSHR scheduler skips MSHRs whose memory read is
// throttled and reports each read it issues to the DRAM regulator, which
// counts reads per (domain, DRAM bank) over a fixed period and raises the
// throttle bits. The cores, the system bus, the LLC banks themselves (tags,
// data, MSHR contents), the memory bus and the DRAM are outside this module:
// their signals are the ports. The tagged requests leave on bus_a_*; each LLC
// bank presents the state of its MSHRs on mshr_req_* and gets the chosen MSHR
// back on mshr_grant*. Both register ports sit on the periphery bus.
//
// Defaults are those of the evaluated system: 4 cores, 2 domains (real-time
// and best-effort), 8 DRAM banks mapped by address bits 9-11, 2 LLC banks with
// 27 MSHRs each, a 1 ms period at 1 GHz and an 828-line per-bank budget
// (53 MB/s). Timing is that of the sub-blocks: forwarding and gating are
// combinational, counters and throttle bits change on the clock edge.
module perbank_bru_top
  import bru_pkg::*;
#(
  parameter int unsigned N_CORES      = 4,
  parameter int unsigned N_DOMAINS    = 2,
  parameter int unsigned BANK_BITS    = 3,
  parameter bank_masks_t BANK_MASKS   = DDR3_DIRECT_MASKS,
  parameter int unsigned N_LLC_BANKS  = 2,
  parameter int unsigned N_MSHRS      = 27,
  parameter int unsigned SRC_W        = 8,
  parameter int unsigned CNT_W        = 32,
  parameter int unsigned RESET_PERIOD = EVAL_PERIOD_CYCLES,
  parameter int unsigned RESET_BUDGET = EVAL_BUDGET_LINES,
  localparam int unsigned N_BANKS     = 1 << BANK_BITS,
  localparam int unsigned DOM_W       = (N_DOMAINS > 1) ? $clog2(N_DOMAINS) : 1,
  localparam int unsigned IDX_W       = (N_MSHRS > 1) ? $clog2(N_MSHRS) : 1
) (
  input  logic clk,
  input  logic rst_n,

  // cores, channel A
  input  logic     [N_CORES-1:0]              core_a_valid,
  output logic     [N_CORES-1:0]              core_a_ready,
  input  tl_a_op_e [N_CORES-1:0]              core_a_opcode,
  input  logic     [N_CORES-1:0][PADDR_W-1:0] core_a_addr,
  input  logic     [N_CORES-1:0][SRC_W-1:0]   core_a_source,

  // system bus, tagged channel A
  output logic     [N_CORES-1:0]              bus_a_valid,
  input  logic     [N_CORES-1:0]              bus_a_ready,
  output tl_a_op_e [N_CORES-1:0]              bus_a_opcode,
  output logic     [N_CORES-1:0][PADDR_W-1:0] bus_a_addr,
  output logic     [N_CORES-1:0][SRC_W-1:0]   bus_a_source,
  output logic     [N_CORES-1:0][DOM_W-1:0]   bus_a_domain,

  // LLC banks: MSHR requests and the scheduler's choice
  input  logic [N_LLC_BANKS-1:0][N_MSHRS-1:0]              mshr_req_valid,
  input  logic [N_LLC_BANKS-1:0][N_MSHRS-1:0]              mshr_req_acquire,
  input  logic [N_LLC_BANKS-1:0][N_MSHRS-1:0][DOM_W-1:0]   mshr_req_domain,
  input  logic [N_LLC_BANKS-1:0][N_MSHRS-1:0][PADDR_W-1:0] mshr_req_addr,
  output logic [N_LLC_BANKS-1:0][N_MSHRS-1:0]              mshr_grant,
  output logic [N_LLC_BANKS-1:0]                           mshr_grant_valid,
  output logic [N_LLC_BANKS-1:0][IDX_W-1:0]                mshr_grant_idx,
  input  logic [N_LLC_BANKS-1:0]                           mem_issue_ready,

  // periphery bus register ports
  input  mmio_req_t tag_mmio_req,
  output mmio_rsp_t tag_mmio_rsp,
  input  mmio_req_t reg_mmio_req,
  output mmio_rsp_t reg_mmio_rsp,

  // status
  output logic [N_DOMAINS-1:0][N_BANKS-1:0] throttle,
  output logic                              period_end,
  output logic [N_CORES-1:0][DOM_W-1:0]     core_domain
);

  logic [N_LLC_BANKS-1:0]                ev_valid;
  logic [N_LLC_BANKS-1:0][DOM_W-1:0]     ev_domain;
  logic [N_LLC_BANKS-1:0][BANK_BITS-1:0] ev_bank;

  tag_unit #(
    .N_CORES    (N_CORES),
    .N_DOMAINS  (N_DOMAINS),
    .BANK_BITS  (BANK_BITS),
    .BANK_MASKS (BANK_MASKS),
    .SRC_W      (SRC_W)
  ) u_tag (
    .clk, .rst_n,
    .core_a_valid, .core_a_ready, .core_a_opcode, .core_a_addr, .core_a_source,
    .bus_a_valid, .bus_a_ready, .bus_a_opcode, .bus_a_addr, .bus_a_source,
    .bus_a_domain,
    .throttle_fwd (throttle),
    .mmio_req     (tag_mmio_req),
    .mmio_rsp     (tag_mmio_rsp),
    .core_domain
  );

  for (genvar l = 0; l < N_LLC_BANKS; l++) begin : g_llc
    mshr_sched #(
      .N_MSHRS    (N_MSHRS),
      .N_DOMAINS  (N_DOMAINS),
      .BANK_BITS  (BANK_BITS),
      .BANK_MASKS (BANK_MASKS)
    ) u_sched (
      .clk, .rst_n,
      .req_valid   (mshr_req_valid[l]),
      .req_acquire (mshr_req_acquire[l]),
      .req_domain  (mshr_req_domain[l]),
      .req_addr    (mshr_req_addr[l]),
      .throttle    (throttle),
      .grant       (mshr_grant[l]),
      .grant_valid (mshr_grant_valid[l]),
      .grant_idx   (mshr_grant_idx[l]),
      .issue_ready (mem_issue_ready[l]),
      .ev_valid    (ev_valid[l]),
      .ev_domain   (ev_domain[l]),
      .ev_bank     (ev_bank[l])
    );
  end

  dram_regulator #(
    .N_DOMAINS    (N_DOMAINS),
    .BANK_BITS    (BANK_BITS),
    .N_LLC_BANKS  (N_LLC_BANKS),
    .CNT_W        (CNT_W),
    .RESET_PERIOD (RESET_PERIOD),
    .RESET_BUDGET (RESET_BUDGET)
  ) u_reg (
    .clk, .rst_n,
    .ev_valid, .ev_domain, .ev_bank,
    .throttle,
    .period_end,
    .mmio_req (reg_mmio_req),
    .mmio_rsp (reg_mmio_rsp)
  );

endmodule
