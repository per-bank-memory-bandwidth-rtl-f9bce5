// dram_regulator_tb: checks counting, period replenishment, throttling and
// the register port of the DRAM regulator against a cycle model.
//
// Small sizes keep the run short: 2 domains, 8 DRAM banks, 2 LLC banks,
// reset period 40 cycles, reset budget 5 lines. The model keeps its own
// period counter and access counters and predicts, every cycle, the
// throttle bits, period_end and the read data of the register port. The test
// first checks the reset values, then programs period, budgets and enables,
// drives targeted traffic (one bank of one domain to its budget, and the
// same number to all banks) and then random traffic with random register
// writes. It also checks that throttle rises one cycle after the access that
// reached the budget and falls one cycle after the period ends. A watchdog
// ends the run if it hangs.
module dram_regulator_tb;
  import bru_pkg::*;

  localparam int ND = 2, BB = 3, NB = 8, NL = 2;
  localparam int RP = 40, RB = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NL-1:0]         ev_valid;
  logic [NL-1:0][0:0]    ev_domain;
  logic [NL-1:0][BB-1:0] ev_bank;
  logic [ND-1:0][NB-1:0] throttle;
  logic                  period_end;
  mmio_req_t req;
  mmio_rsp_t rsp;

  dram_regulator #(.N_DOMAINS(ND), .BANK_BITS(BB), .N_LLC_BANKS(NL),
                   .RESET_PERIOD(RP), .RESET_BUDGET(RB)) dut (
    .clk, .rst_n, .ev_valid, .ev_domain, .ev_bank, .throttle, .period_end,
    .mmio_req(req), .mmio_rsp(rsp));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int throttle_rises = 0, period_ends = 0;

  // model
  longint m_period, m_tick, m_budget [ND], m_cnt [ND][NB];
  bit     m_en [ND];
  bit     exp_rsp_valid;
  longint exp_rdata;

  task automatic fail(string s);
    failures++;
    $display("FAIL t=%0t %s", $time, s);
  endtask

  function automatic longint m_read(logic [11:0] a);
    if (a == 12'h000) return m_period;
    if (a == 12'h004) return longint'({m_en[1], m_en[0]});
    for (int d = 0; d < ND; d++) begin
      if (a == 12'h100 + 12'(4 * d)) return m_budget[d];
      for (int b = 0; b < NB; b++)
        if (a == 12'h400 + 12'(4 * (d * NB + b))) return m_cnt[d][b];
    end
    return 0;
  endfunction

  // compare outputs with the model (inputs are stable after negedge)
  task automatic compare();
    bit pe;
    pe = (m_tick + 1 >= m_period);
    checks++;
    if (period_end !== pe) fail($sformatf("period_end %0b exp %0b tick %0d", period_end, pe, m_tick));
    for (int d = 0; d < ND; d++)
      for (int b = 0; b < NB; b++) begin
        bit t;
        t = m_en[d] && (m_cnt[d][b] >= m_budget[d]);
        checks++;
        if (throttle[d][b] !== t)
          fail($sformatf("throttle[%0d][%0d]=%0b exp %0b cnt %0d budget %0d", d, b, throttle[d][b], t, m_cnt[d][b], m_budget[d]));
      end
    if (exp_rsp_valid) begin
      checks++;
      if (!rsp.valid || rsp.rdata !== 32'(exp_rdata))
        fail($sformatf("rsp valid %0b rdata %0d exp %0d", rsp.valid, rsp.rdata, exp_rdata));
    end
  endtask

  // advance the model across one clock edge
  task automatic model_step();
    bit clr;
    exp_rsp_valid = req.valid;
    exp_rdata = req.valid ? m_read(req.addr) : 0;
    clr = (m_tick + 1 >= m_period) || (req.valid && req.write && req.addr == 12'h000);
    if (clr) period_ends++;
    for (int d = 0; d < ND; d++)
      for (int b = 0; b < NB; b++) begin
        longint n;
        n = clr ? 0 : m_cnt[d][b];
        for (int l = 0; l < NL; l++)
          if (ev_valid[l] && int'(ev_domain[l]) == d && int'(ev_bank[l]) == b) n++;
        m_cnt[d][b] = n;
      end
    m_tick = clr ? 0 : m_tick + 1;
    if (req.valid && req.write) begin
      if (req.addr == 12'h000) m_period = req.wdata;
      if (req.addr == 12'h004) begin m_en[0] = req.wdata[0]; m_en[1] = req.wdata[1]; end
      for (int d = 0; d < ND; d++)
        if (req.addr == 12'h100 + 12'(4 * d)) m_budget[d] = req.wdata;
    end
  endtask

  // one cycle: inputs already set; compare, then clock
  logic [ND-1:0][NB-1:0] thr_prev = '0;
  task automatic cycle();
    compare();
    for (int d = 0; d < ND; d++)
      for (int b = 0; b < NB; b++)
        if (throttle[d][b] && !thr_prev[d][b]) throttle_rises++;
    thr_prev = throttle;
    @(posedge clk);
    model_step();
    @(negedge clk);
    ev_valid = '0;
    req = '0;
  endtask

  task automatic mmio(bit wr, logic [11:0] a, logic [31:0] wd);
    req.valid = 1'b1; req.write = wr; req.addr = a; req.wdata = wd;
    cycle();
  endtask

  task automatic event1(int l, int d, int b);
    ev_valid[l] = 1'b1; ev_domain[l] = 1'(d); ev_bank[l] = BB'(b);
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ev_valid = '0; ev_domain = '0; ev_bank = '0; req = '0;
    m_period = RP; m_tick = 0; exp_rsp_valid = 0; exp_rdata = 0;
    for (int d = 0; d < ND; d++) begin
      m_budget[d] = RB; m_en[d] = 0;
      for (int b = 0; b < NB; b++) m_cnt[d][b] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // reset values read back
    mmio(0, 12'h000, 0);
    mmio(0, 12'h004, 0);
    mmio(0, 12'h100, 0);

    // restart the period at 200 cycles, budget 4 for domain 1, regulate it
    mmio(1, 12'h104, 4);
    mmio(1, 12'h004, 32'h2);
    mmio(1, 12'h000, 200);

    // domain 1 reads bank 3 four times: throttle rises exactly after the 4th
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (throttle[1][3]) fail("throttle early");
      event1(0, 1, 3);
      cycle();
    end
    checks++;
    if (!throttle[1][3]) fail("throttle[1][3] not set after budget reached");
    checks++;
    if (throttle[1][2] || throttle[1][4]) fail("other banks throttled");
    // same budget still available on every other bank
    for (int b = 0; b < NB; b++) if (b != 3) begin
      for (int i = 0; i < 4; i++) begin event1(1, 1, b); cycle(); end
    end
    checks++;
    if (throttle[1] != '1) fail("not all banks of domain 1 throttled at budget");
    // domain 0 is not regulated
    for (int i = 0; i < 10; i++) begin event1(0, 0, 3); event1(1, 0, 3); cycle(); end
    checks++;
    if (throttle[0] != '0) fail("unregulated domain throttled");
    // wait for the period end: throttle falls the cycle after
    while (!period_end) cycle();
    cycle();
    checks++;
    if (throttle != '0) fail("throttle not cleared at period end");
    mmio(0, 12'h400 + 12'(4 * (NB + 3)), 0);

    // random traffic and register writes
    for (int n = 0; n < 20000; n++) begin
      for (int l = 0; l < NL; l++)
        if ($urandom_range(0, 2) != 0) event1(l, $urandom_range(0, 1), $urandom_range(0, NB - 1));
      case ($urandom_range(0, 60))
        0: begin req.valid = 1; req.write = 1; req.addr = 12'h000; req.wdata = $urandom_range(1, 120); end
        1: begin req.valid = 1; req.write = 1; req.addr = 12'h004; req.wdata = $urandom_range(0, 3); end
        2: begin req.valid = 1; req.write = 1; req.addr = 12'h100 + 12'(4 * $urandom_range(0, 1)); req.wdata = $urandom_range(0, 40); end
        3: begin req.valid = 1; req.write = 0; req.addr = 12'h400 + 12'(4 * $urandom_range(0, 15)); end
        4: begin req.valid = 1; req.write = 0; req.addr = 12'h100 + 12'(4 * $urandom_range(0, 1)); end
        default: ;
      endcase
      cycle();
    end

    checks++;
    if (throttle_rises == 0 || period_ends < 10) fail("mechanisms not exercised");
    $display("throttle rises %0d, period ends %0d", throttle_rises, period_ends);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
