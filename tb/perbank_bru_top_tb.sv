// perbank_bru_top_tb: end-to-end run of the regulation logic inside a small
// model of the SoC around it.
//
// The top is used with its default parameters (4 cores, 2 domains, 8 DRAM
// banks on address bits 11:9, 2 LLC banks of 27 MSHRs). Around it the bench
// models:
//   - cores that keep offering channel-A requests (AcquireBlock or other
//     opcodes) to one chosen DRAM bank or to all banks in turn, holding each
//     request until accepted (a core whose next AcquireBlock goes to a
//     throttled bank therefore waits for the period end, as a real
//     in-order request channel would);
//   - at most 6 outstanding misses per core (its L1 MSHRs);
//   - the LLC: line-interleaved banks (address bit 6 picks the LLC bank), an
//     accepted AcquireBlock always misses and takes a free MSHR, which waits
//     for the scheduler's grant, is issued when memory is ready and is freed
//     a fixed 60 cycles later; other requests are absorbed by the cache;
//   - memory that is ready on 80 % of cycles.
// Software setup goes through the two register ports: core 0 alone in the
// unregulated real-time domain 0, cores 1-3 in the regulated best-effort
// domain 1.
//
// Phases: (1) short period (3000 cycles, budget 10), best-effort cores hit
// one DRAM bank; (2) same, cores spread over all 8 banks, which must yield
// close to 8x the accesses of phase 1 per period (at least 90 % of it: a core
// waiting in order on a throttled bank can leave another bank short); (3) random traffic with cores moved
// between domains; (4) the evaluated setting, a 1 ms period at 1 GHz
// (1,000,000 cycles) with an 828-line budget (53 MB/s per bank), for one
// whole period of a single-bank attacker, with the bank's counter read back
// over the register port half-way through.
// Checked throughout: no (domain, bank) of the regulated domain is issued
// more than budget + 1 lines in a period (2 LLC banks may issue in the same
// cycle), the real-time domain is never throttled, every tagged request
// carries the domain of its core, no throttled AcquireBlock leaves the
// tagging unit, and every MSHR request is eventually issued. Each mechanism
// (throttle, MSHR gating, forwarded stall at the cores, replenishment at
// the period end, domain change) must happen at least once. A watchdog ends
// the run if it hangs.
module perbank_bru_top_tb;
  import bru_pkg::*;

  localparam int NC = 4, ND = 2, NB = 8, NL = 2, NM = 27, LAT = 60, L1_MSHRS = 6;

  logic clk = 1'b0, rst_n = 1'b0;

  logic     [NC-1:0]              core_a_valid, core_a_ready;
  tl_a_op_e [NC-1:0]              core_a_opcode;
  logic     [NC-1:0][PADDR_W-1:0] core_a_addr;
  logic     [NC-1:0][7:0]         core_a_source;
  logic     [NC-1:0]              bus_a_valid, bus_a_ready;
  tl_a_op_e [NC-1:0]              bus_a_opcode;
  logic     [NC-1:0][PADDR_W-1:0] bus_a_addr;
  logic     [NC-1:0][7:0]         bus_a_source;
  logic     [NC-1:0][0:0]         bus_a_domain, core_domain;
  logic [NL-1:0][NM-1:0]              mshr_req_valid, mshr_req_acquire, mshr_grant;
  logic [NL-1:0][NM-1:0][0:0]         mshr_req_domain;
  logic [NL-1:0][NM-1:0][PADDR_W-1:0] mshr_req_addr;
  logic [NL-1:0]                      mshr_grant_valid, mem_issue_ready;
  logic [NL-1:0][4:0]                 mshr_grant_idx;
  mmio_req_t tag_req, reg_req;
  mmio_rsp_t tag_rsp, reg_rsp;
  logic [ND-1:0][NB-1:0] throttle;
  logic                  period_end;

  perbank_bru_top dut (
    .clk, .rst_n,
    .core_a_valid, .core_a_ready, .core_a_opcode, .core_a_addr, .core_a_source,
    .bus_a_valid, .bus_a_ready, .bus_a_opcode, .bus_a_addr, .bus_a_source, .bus_a_domain,
    .mshr_req_valid, .mshr_req_acquire, .mshr_req_domain, .mshr_req_addr,
    .mshr_grant, .mshr_grant_valid, .mshr_grant_idx, .mem_issue_ready,
    .tag_mmio_req(tag_req), .tag_mmio_rsp(tag_rsp),
    .reg_mmio_req(reg_req), .reg_mmio_rsp(reg_rsp),
    .throttle, .period_end, .core_domain);

  always #0.5 clk = ~clk;   // 1 GHz

  int checks = 0, failures = 0;

  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL t=%0t %s", $time, s);
  endtask

  // ---------------------------------------------------------------- model
  typedef enum int {IDLE, ONE_BANK, ALL_BANKS} pattern_e;

  pattern_e pat [NC];
  int       pat_bank [NC];
  int       next_bank [NC];       // ALL_BANKS sweeps the banks in turn
  int       acq_pct [NC];
  bit       have_req [NC];
  int       dom_of [NC];          // software's view of the domain table

  // MSHRs: 0 free, 1 waiting for issue, 2 in flight
  int      m_state [NL][NM];
  int      m_timer [NL][NM];
  int      m_wait  [NL][NM];
  int      m_dom   [NL][NM];
  int      m_core  [NL][NM];
  int      outstanding [NC];      // L1 misses in flight per core, at most L1_MSHRS
  logic [PADDR_W-1:0] m_addr [NL][NM];

  // accounting per period
  int issued   [ND][NB];           // this period
  int budget_now = 0;
  bit regulated_now = 0;
  int period_total [ND];
  int last_period_total [ND];

  // mechanism counters
  int n_throttle_rise = 0, n_replenish = 0, n_mshr_gated = 0, n_tag_stall = 0;
  int n_domain_change = 0, n_issued = 0, n_rt_issued_while_thr = 0;
  logic [ND-1:0][NB-1:0] thr_prev = '0;

  function automatic int bank_of(logic [PADDR_W-1:0] a);
    return int'(a[11:9]);
  endfunction

  function automatic int llc_of(logic [PADDR_W-1:0] a);
    return int'(a[6]);
  endfunction

  function automatic int free_mshrs(int l);
    int n = 0;
    for (int m = 0; m < NM; m++) if (m_state[l][m] == 0) n++;
    return n;
  endfunction

  task automatic new_request(int c);
    int b;
    logic [PADDR_W-1:0] a;
    have_req[c] = 0;
    core_a_valid[c] = 1'b0;
    if (pat[c] == IDLE) return;
    if (pat[c] == ONE_BANK) b = pat_bank[c];
    else begin
      b = next_bank[c];
      next_bank[c] = (next_bank[c] + 1) % NB;
    end
    a = PADDR_W'({$urandom_range(0, 3), $urandom()});
    a[5:0] = '0;
    a[11:9] = 3'(b);
    core_a_addr[c] = a;
    core_a_opcode[c] = ($urandom_range(1, 100) <= acq_pct[c]) ? TL_ACQUIRE_BLK :
                       (($urandom_range(0, 1) != 0) ? TL_PUT_FULL : TL_GET);
    core_a_source[c] = 8'($urandom());
    core_a_valid[c] = 1'b1;
    have_req[c] = 1;
  endtask

  // drive the inputs that depend only on bench state
  task automatic drive();
    for (int c = 0; c < NC; c++) begin
      if (!have_req[c]) new_request(c);
      // room for every core, so the decision does not depend on valid
      if (core_a_opcode[c] == TL_ACQUIRE_BLK)
        bus_a_ready[c] = 1'(free_mshrs(llc_of(core_a_addr[c])) > NC && outstanding[c] < L1_MSHRS);
      else
        bus_a_ready[c] = 1'b1;
    end
    for (int l = 0; l < NL; l++) begin
      mem_issue_ready[l] = 1'($urandom_range(0, 9) < 8);
      for (int m = 0; m < NM; m++) begin
        mshr_req_valid[l][m]   = 1'(m_state[l][m] == 1);
        mshr_req_acquire[l][m] = 1'b1;
        mshr_req_domain[l][m]  = 1'(m_dom[l][m]);
        mshr_req_addr[l][m]    = m_addr[l][m];
      end
    end
  endtask

  // compare outputs and update the model; called after the inputs settle
  task automatic observe_and_step();
    // checks on the tagged channel
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (int'(bus_a_domain[c]) != dom_of[c]) fail($sformatf("core %0d tagged %0d exp %0d", c, bus_a_domain[c], dom_of[c]));
      if (bus_a_valid[c] && bus_a_opcode[c] == TL_ACQUIRE_BLK &&
          throttle[dom_of[c]][bank_of(bus_a_addr[c])]) fail("throttled AcquireBlock passed");
      if (core_a_valid[c] && !bus_a_valid[c]) n_tag_stall++;
    end
    checks++;
    if (throttle[0] != '0) fail("real-time domain throttled");
    for (int d = 0; d < ND; d++)
      for (int b = 0; b < NB; b++)
        if (throttle[d][b] && !thr_prev[d][b]) n_throttle_rise++;
    // gated MSHRs
    for (int l = 0; l < NL; l++)
      for (int m = 0; m < NM; m++)
        if (m_state[l][m] == 1 && throttle[m_dom[l][m]][bank_of(m_addr[l][m])]) begin
          n_mshr_gated++;
          checks++;
          if (mshr_grant[l][m]) fail("throttled MSHR granted");
        end

    @(posedge clk);

    // replenishment seen as throttle falling after a period end
    // (checked next cycle through thr_prev)
    // issued requests
    for (int l = 0; l < NL; l++) begin
      if (mshr_grant_valid[l] && mem_issue_ready[l]) begin
        int m, d, b;
        m = int'(mshr_grant_idx[l]);
        d = m_dom[l][m];
        b = bank_of(m_addr[l][m]);
        checks++;
        if (m_state[l][m] != 1) fail("grant of an MSHR with no request");
        m_state[l][m] = 2;
        m_timer[l][m] = LAT;
        issued[d][b]++;
        period_total[d]++;
        n_issued++;
        if (d == 0 && throttle[1][b]) n_rt_issued_while_thr++;
      end
    end
    // waiting and in-flight MSHRs
    for (int l = 0; l < NL; l++)
      for (int m = 0; m < NM; m++) begin
        if (m_state[l][m] == 2) begin
          m_timer[l][m]--;
          if (m_timer[l][m] == 0) begin
            m_state[l][m] = 0;
            outstanding[m_core[l][m]]--;
          end
        end else if (m_state[l][m] == 1) begin
          m_wait[l][m]++;
        end
      end
    // accepted core requests
    for (int c = 0; c < NC; c++) begin
      if (core_a_valid[c] && core_a_ready[c]) begin
        if (core_a_opcode[c] == TL_ACQUIRE_BLK) begin
          int l, m;
          l = llc_of(core_a_addr[c]);
          m = -1;
          for (int k = 0; k < NM; k++) if (m == -1 && m_state[l][k] == 0) m = k;
          checks++;
          if (m < 0) fail("no free MSHR for an accepted request");
          else begin
            m_state[l][m] = 1;
            m_wait[l][m]  = 0;
            m_dom[l][m]   = int'(bus_a_domain[c]);
            m_addr[l][m]  = core_a_addr[c];
            m_core[l][m]  = c;
            outstanding[c]++;
          end
        end
        have_req[c] = 0;
      end
    end
    // end of period: check the per-bank bound, then start over
    if (period_end) begin
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (regulated_now && issued[1][b] > budget_now + NL - 1)
          fail($sformatf("bank %0d got %0d lines, budget %0d", b, issued[1][b], budget_now));
      end
      for (int d = 0; d < ND; d++) begin
        last_period_total[d] = period_total[d];
        period_total[d] = 0;
        for (int b = 0; b < NB; b++) issued[d][b] = 0;
      end
      if (throttle != '0) n_replenish++;
    end
    thr_prev = throttle;
    @(negedge clk);
    tag_req = '0;
    reg_req = '0;
  endtask

  task automatic cycle();
    drive();
    #0.1;
    observe_and_step();
  endtask

  task automatic reg_write(bit tag, logic [11:0] a, logic [31:0] v);
    if (tag) begin tag_req.valid = 1; tag_req.write = 1; tag_req.addr = a; tag_req.wdata = v; end
    else     begin reg_req.valid = 1; reg_req.write = 1; reg_req.addr = a; reg_req.wdata = v; end
    cycle();
    // the bench's view follows the write
    if (tag) begin
      if (dom_of[a[11:2]] != int'(v)) n_domain_change++;
      dom_of[a[11:2]] = int'(v);
    end else begin
      if (a == REG_PERIOD) for (int d = 0; d < ND; d++) begin
        period_total[d] = 0;
        for (int b = 0; b < NB; b++) issued[d][b] = 0;
      end
      if (a == REG_BUDGET0 + 12'h4) budget_now = int'(v);
      if (a == REG_DOMAIN_EN) regulated_now = v[1];
    end
  endtask

  task automatic reg_read(bit tag, logic [11:0] a, output logic [31:0] v);
    if (tag) begin tag_req.valid = 1; tag_req.addr = a; end
    else     begin reg_req.valid = 1; reg_req.addr = a; end
    cycle();
    v = tag ? tag_rsp.rdata : reg_rsp.rdata;
  endtask

  // run until the next period end has been processed
  task automatic run_period();
    do cycle(); while (!thr_prev_period_end());
  endtask
  bit pe_seen;
  function automatic bit thr_prev_period_end();
    return pe_seen;
  endfunction
  always @(posedge clk) pe_seen <= period_end;

  task automatic set_pattern(pattern_e p, int bank, int pct);
    for (int c = 1; c < NC; c++) begin pat[c] = p; pat_bank[c] = bank; acq_pct[c] = pct; end
  endtask

  task automatic drain();
    set_pattern(IDLE, 0, 0);
    pat[0] = IDLE;
    for (int c = 0; c < NC; c++) begin have_req[c] = 0; core_a_valid[c] = 1'b0; end
    repeat (400) cycle();
  endtask

  // -------------------------------------------------------------- watchdog
  initial begin
    #4_000_000;
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ test
  initial begin
    logic [31:0] v;
    int sb_lines, ab_lines;
    core_a_valid = '0; core_a_opcode = '{default: TL_GET}; core_a_addr = '0;
    core_a_source = '0; bus_a_ready = '0; mem_issue_ready = '0;
    mshr_req_valid = '0; mshr_req_acquire = '0; mshr_req_domain = '0; mshr_req_addr = '0;
    tag_req = '0; reg_req = '0;
    for (int c = 0; c < NC; c++) outstanding[c] = 0;
    for (int c = 0; c < NC; c++) begin pat[c] = IDLE; have_req[c] = 0; dom_of[c] = 0; acq_pct[c] = 0; pat_bank[c] = 0; next_bank[c] = 2 * c; end
    for (int l = 0; l < NL; l++) for (int m = 0; m < NM; m++) begin
      m_state[l][m] = 0; m_timer[l][m] = 0; m_wait[l][m] = 0; m_dom[l][m] = 0; m_addr[l][m] = '0; m_core[l][m] = 0;
    end
    for (int d = 0; d < ND; d++) begin
      period_total[d] = 0; last_period_total[d] = 0;
      for (int b = 0; b < NB; b++) issued[d][b] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // reset values: the evaluated period and budget
    reg_read(0, REG_PERIOD, v);
    checks++; if (v != EVAL_PERIOD_CYCLES) fail($sformatf("reset period %0d", v));
    reg_read(0, REG_BUDGET0 + 12'h4, v);
    checks++; if (v != EVAL_BUDGET_LINES) fail($sformatf("reset budget %0d", v));
    budget_now = int'(v);

    // domains: core 0 real-time (0), cores 1-3 best-effort (1)
    for (int c = 1; c < NC; c++) reg_write(1, 12'(4 * c), 1);
    reg_read(1, 12'h8, v);
    checks++; if (v != 1) fail("domain table read-back");
    reg_write(0, REG_BUDGET0 + 12'h4, 10);
    reg_write(0, REG_DOMAIN_EN, 32'h2);
    reg_write(0, REG_PERIOD, 3000);

    // phase 1: single-bank attack by the best-effort cores, real-time core
    // reads all banks
    pat[0] = ALL_BANKS; acq_pct[0] = 100;
    set_pattern(ONE_BANK, 5, 90);
    run_period();
    repeat (4) run_period();
    sb_lines = last_period_total[1];
    $display("phase 1: best-effort lines per period, one bank: %0d", sb_lines);
    checks++; if (sb_lines < 10 || sb_lines > 11) fail("single-bank lines per period");

    // phase 2: the same cores spread over all banks
    set_pattern(ALL_BANKS, 0, 90);
    repeat (5) run_period();
    ab_lines = last_period_total[1];
    $display("phase 2: best-effort lines per period, all banks: %0d", ab_lines);
    // at most one budget (+1) per bank, and at least 90 % of eight budgets
    checks++; if (ab_lines * 10 < 8 * 10 * 9 || ab_lines > 8 * 11) fail("all-bank lines per period");

    // phase 3: random patterns, domain moves, budget changes
    for (int r = 0; r < 12; r++) begin
      for (int c = 0; c < NC; c++) begin
        pat[c] = pattern_e'($urandom_range(0, 2));
        pat_bank[c] = $urandom_range(0, NB - 1);
        acq_pct[c] = $urandom_range(30, 100);
      end
      if (r % 3 == 1) reg_write(1, 12'(4 * $urandom_range(1, NC - 1)), $urandom_range(0, 1));
      if (r % 4 == 2) reg_write(0, REG_BUDGET0 + 12'h4, $urandom_range(3, 20));
      repeat (2) run_period();
    end
    drain();
    // every request was issued
    for (int l = 0; l < NL; l++) for (int m = 0; m < NM; m++) begin
      checks++;
      if (m_state[l][m] != 0) fail($sformatf("MSHR %0d.%0d never issued", l, m));
    end

    // phase 4: evaluated setting, one full 1 ms period at 1 GHz
    for (int c = 1; c < NC; c++) reg_write(1, 12'(4 * c), 1);
    reg_write(1, 12'h0, 0);
    reg_write(0, REG_BUDGET0 + 12'h4, EVAL_BUDGET_LINES);
    reg_write(0, REG_PERIOD, EVAL_PERIOD_CYCLES);
    pat[0] = ALL_BANKS; acq_pct[0] = 100;
    set_pattern(ONE_BANK, 2, 100);
    begin
      int t0, rise_cycle;
      t0 = 0; rise_cycle = -1;
      do begin
        if (t0 == EVAL_PERIOD_CYCLES / 2) begin
          // mid-period read-back of the counter of (domain 1, bank 2)
          int exp_cnt;
          exp_cnt = issued[1][2];
          reg_read(0, REG_COUNT0 + 12'(4 * (NB + 2)), v);
          checks++;
          if (int'(v) != exp_cnt) fail($sformatf("COUNT[1][2] read %0d exp %0d", v, exp_cnt));
        end else cycle();
        t0++;
        if (rise_cycle < 0 && throttle[1][2]) rise_cycle = t0;
      end while (!pe_seen);
      $display("phase 4: %0d lines to bank 2 in a %0d-cycle period, throttled from cycle %0d",
               last_period_total[1], t0, rise_cycle);
      checks++; if (t0 < EVAL_PERIOD_CYCLES - 10 || t0 > EVAL_PERIOD_CYCLES + 10) fail("period length");
      checks++; if (last_period_total[1] < EVAL_BUDGET_LINES || last_period_total[1] > EVAL_BUDGET_LINES + 1)
        fail("evaluated budget not enforced");
      checks++; if (rise_cycle < 0) fail("no throttle at the evaluated budget");
    end
    drain();

    // every mechanism happened
    $display("throttle rises %0d, replenishments %0d, MSHR gated cycles %0d, core stalls %0d",
             n_throttle_rise, n_replenish, n_mshr_gated, n_tag_stall);
    $display("domain changes %0d, lines issued %0d, real-time lines past a throttled bank %0d",
             n_domain_change, n_issued, n_rt_issued_while_thr);
    checks += 6;
    if (n_throttle_rise == 0) fail("throttle never rose");
    if (n_replenish == 0) fail("no replenishment");
    if (n_mshr_gated == 0) fail("no MSHR gated");
    if (n_tag_stall == 0) fail("no forwarded stall");
    if (n_domain_change == 0) fail("no domain change");
    if (n_rt_issued_while_thr == 0) fail("real-time domain never passed a throttled bank");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
