// bank_scaling_tb: per-bank regulation scaling with the number of DRAM
// banks a best-effort workload uses.
//
// The top runs with its default parameters inside the same SoC model as the
// end-to-end bench (cores holding channel-A requests in order with at most 6
// misses outstanding each, line-
// interleaved LLC banks whose AcquireBlocks always miss into 27 MSHRs, a
// 60-cycle memory ready on 80 % of cycles). Core 0 is alone in the
// unregulated real-time domain and streams reads over all banks; cores 1-3
// form the regulated best-effort domain, with a budget of 12 lines per bank
// in a 4000-cycle period. The best-effort cores sweep k = 1, 2, ..., 8 DRAM
// banks in turn. With per-bank regulation each bank has its own budget, so
// the best-effort lines per period approach k x 12: never more than one
// extra line per bank (two LLC banks may issue in the same cycle), and at
// least 90 % of k x 12 (a core waiting in order on a throttled bank can leave
// another bank a little short). A final single-bank attack must be held to
// one budget. Throughout, the real-time core, whose accesses are not
// regulated, must get at least 95 % of the lines it gets alone. The bench's
// memory has no bank conflicts, so this checks only that regulation takes
// nothing from the real-time domain. A watchdog ends the run if it hangs.
module bank_scaling_tb;
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
  int       next_bank [NC];       // ALL_BANKS sweeps banks 0..k_banks-1 in turn
  int       k_banks = NB;
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
      next_bank[c] = (next_bank[c] + 1) % k_banks;
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

  localparam int BUDGET = 12, PERIOD = 4000;

  // ------------------------------------------------------------------ test
  initial begin
    int one_bank, rt_solo, rt_lines;
    core_a_valid = '0; core_a_opcode = '{default: TL_GET}; core_a_addr = '0;
    core_a_source = '0; bus_a_ready = '0; mem_issue_ready = '0;
    mshr_req_valid = '0; mshr_req_acquire = '0; mshr_req_domain = '0; mshr_req_addr = '0;
    tag_req = '0; reg_req = '0;
    for (int c = 0; c < NC; c++) outstanding[c] = 0;
    for (int c = 0; c < NC; c++) begin pat[c] = IDLE; have_req[c] = 0; dom_of[c] = 0; acq_pct[c] = 0; pat_bank[c] = 0; next_bank[c] = 0; end
    for (int l = 0; l < NL; l++) for (int m = 0; m < NM; m++) begin
      m_state[l][m] = 0; m_timer[l][m] = 0; m_wait[l][m] = 0; m_dom[l][m] = 0; m_addr[l][m] = '0; m_core[l][m] = 0;
    end
    for (int d = 0; d < ND; d++) begin
      period_total[d] = 0; last_period_total[d] = 0;
      for (int b = 0; b < NB; b++) issued[d][b] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int c = 1; c < NC; c++) reg_write(1, 12'(4 * c), 1);
    reg_write(0, REG_BUDGET0 + 12'h4, BUDGET);
    reg_write(0, REG_DOMAIN_EN, 32'h2);
    reg_write(0, REG_PERIOD, PERIOD);

    // real-time core alone
    pat[0] = ALL_BANKS; acq_pct[0] = 100;
    repeat (4) run_period();
    rt_solo = last_period_total[0];
    $display("real-time lines per period, attackers idle: %0d", rt_solo);

    // scaling sweep
    one_bank = 0;
    for (int k = 1; k <= NB; k++) begin
      k_banks = k;
      for (int c = 1; c < NC; c++) next_bank[c] = 0;
      set_pattern(ALL_BANKS, 0, 100);
      repeat (4) run_period();
      if (k == 1) one_bank = last_period_total[1];
      $display("banks %0d: best-effort lines per period %0d, speedup %0d.%02d",
               k, last_period_total[1], last_period_total[1] / one_bank,
               (100 * last_period_total[1] / one_bank) % 100);
      checks++;
      // bound: budget per bank; scaling: at least 90 % of k budgets
      if (last_period_total[1] > k * (BUDGET + NL - 1) || last_period_total[1] * 10 < k * BUDGET * 9)
        fail($sformatf("%0d banks: %0d lines, expected %0d", k, last_period_total[1], k * BUDGET));
      rt_lines = last_period_total[0];
      checks++;
      if (rt_lines * 100 < rt_solo * 95)
        fail($sformatf("real-time domain slowed: %0d of %0d lines", rt_lines, rt_solo));
    end

    // single-bank attack after the all-bank one
    k_banks = 1;
    set_pattern(ONE_BANK, 6, 100);
    repeat (4) run_period();
    $display("single-bank attack: %0d best-effort lines per period, real-time %0d",
             last_period_total[1], last_period_total[0]);
    checks += 2;
    if (last_period_total[1] < BUDGET || last_period_total[1] > BUDGET + NL - 1) fail("single-bank attack not held to budget");
    if (last_period_total[0] * 100 < rt_solo * 95) fail("real-time domain slowed by single-bank attack");
    drain();

    checks += 3;
    if (n_throttle_rise == 0) fail("throttle never rose");
    if (n_replenish == 0) fail("no replenishment");
    if (n_tag_stall == 0) fail("no forwarded stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
