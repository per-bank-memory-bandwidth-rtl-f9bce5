// mshr_sched: throttle-aware MSHR selection of one LLC bank's scheduler.
//
// Each of the N_MSHRS miss status holding registers of an LLC bank may want
// to send a request out. The scheduler picks one of them round-robin. An MSHR
// is schedulable when it has a request whose cache resources are available
// (req_valid, decided by the cache) and, if that request is an AcquireBlock
// (a line read from main memory), when the throttle bit of its regulation
// domain and of the DRAM bank of its address is clear. Throttled MSHRs simply
// wait; the other MSHRs of the same LLC bank are not blocked, so no extra
// request queue is needed between the LLC and the memory controller.
//
// Interface: per-MSHR request (valid, acquire flag, domain, address); the
// chosen MSHR is given as a one-hot grant and an index, and the request goes
// out when issue_ready is high (fire). Each fired AcquireBlock is reported
// to the regulator on ev_* in the same cycle.
//
// Timing: combinational from requests and throttle to grant; the round-robin
// pointer moves past the granted MSHR on each fire.
//
// Gating the round-robin arbiter's schedulable set with the throttle bits is
// the regulator's scheme. The round-robin order (search starts after the last
// fired MSHR), the handshake and computing the DRAM bank here with the same
// bank map are this design's own; requests other than AcquireBlock are never
// throttled.
module mshr_sched
  import bru_pkg::*;
#(
  parameter int unsigned N_MSHRS    = 27,
  parameter int unsigned N_DOMAINS  = 2,
  parameter int unsigned BANK_BITS  = 3,
  parameter bank_masks_t BANK_MASKS = DDR3_DIRECT_MASKS,
  localparam int unsigned N_BANKS   = 1 << BANK_BITS,
  localparam int unsigned DOM_W     = (N_DOMAINS > 1) ? $clog2(N_DOMAINS) : 1,
  localparam int unsigned IDX_W     = (N_MSHRS > 1) ? $clog2(N_MSHRS) : 1
) (
  input  logic clk,
  input  logic rst_n,

  input  logic [N_MSHRS-1:0]              req_valid,
  input  logic [N_MSHRS-1:0]              req_acquire,
  input  logic [N_MSHRS-1:0][DOM_W-1:0]   req_domain,
  input  logic [N_MSHRS-1:0][PADDR_W-1:0] req_addr,

  input  logic [N_DOMAINS-1:0][N_BANKS-1:0] throttle,

  output logic [N_MSHRS-1:0]              grant,
  output logic                            grant_valid,
  output logic [IDX_W-1:0]                grant_idx,
  input  logic                            issue_ready,

  output logic                            ev_valid,
  output logic [DOM_W-1:0]                ev_domain,
  output logic [BANK_BITS-1:0]            ev_bank
);

  logic [N_MSHRS-1:0][BANK_BITS-1:0] req_bank;
  logic [N_MSHRS-1:0]                schedulable;
  logic [IDX_W-1:0]                  last_q;
  logic                              fire;

  for (genvar m = 0; m < N_MSHRS; m++) begin : g_mshr
    bank_map #(.BANK_BITS(BANK_BITS), .BANK_MASKS(BANK_MASKS)) u_map (
      .addr (req_addr[m]),
      .bank (req_bank[m])
    );
    assign schedulable[m] = req_valid[m] &&
                            !(req_acquire[m] && throttle[req_domain[m]][req_bank[m]]);
  end

  // round-robin search, starting after the last fired MSHR
  always_comb begin
    grant       = '0;
    grant_valid = 1'b0;
    grant_idx   = '0;
    for (int unsigned k = 1; k <= N_MSHRS; k++) begin
      logic [IDX_W-1:0] idx;
      idx = IDX_W'((32'(last_q) + k) % N_MSHRS);
      if (!grant_valid && schedulable[idx]) begin
        grant_valid = 1'b1;
        grant_idx   = idx;
      end
    end
    if (grant_valid) grant[grant_idx] = 1'b1;
  end

  assign fire      = grant_valid && issue_ready;
  assign ev_valid  = fire && req_acquire[grant_idx];
  assign ev_domain = req_domain[grant_idx];
  assign ev_bank   = req_bank[grant_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q <= IDX_W'(N_MSHRS - 1);
    end else if (fire) begin
      last_q <= grant_idx;
    end
  end

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(grant));
  a_no_throttled_issue: assert property (@(posedge clk) disable iff (!rst_n)
    ev_valid |-> !throttle[ev_domain][ev_bank]);

endmodule
