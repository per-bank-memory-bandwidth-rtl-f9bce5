// mshr_sched_tb: checks the throttle-gated round-robin MSHR selection.
//
// Default sizes: 27 MSHRs, 2 domains, 8 DRAM banks (bank = address bits
// 11:9, computed here by slicing). Every cycle each MSHR gets a random
// request (valid, AcquireBlock or not, domain, address), the regulator's
// throttle bits and the memory ready are random. The model keeps its own
// round-robin pointer and predicts the grant: the first schedulable MSHR
// after the last one that fired, where an AcquireBlock of a throttled
// (domain, bank) is not schedulable. It also checks the report sent to the
// regulator. A final phase keeps all MSHRs requesting with no throttling
// and checks that 27 consecutive grants visit every MSHR once, i.e. one
// issue per cycle. A watchdog ends the run if it hangs.
module mshr_sched_tb;
  import bru_pkg::*;

  localparam int NM = 27, ND = 2, NB = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NM-1:0]              req_valid, req_acquire;
  logic [NM-1:0][0:0]         req_domain;
  logic [NM-1:0][PADDR_W-1:0] req_addr;
  logic [ND-1:0][NB-1:0]      throttle;
  logic [NM-1:0]              grant;
  logic                       grant_valid, issue_ready, ev_valid;
  logic [4:0]                 grant_idx;
  logic [0:0]                 ev_domain;
  logic [2:0]                 ev_bank;

  mshr_sched dut (.clk, .rst_n, .req_valid, .req_acquire, .req_domain,
    .req_addr, .throttle, .grant, .grant_valid, .grant_idx, .issue_ready,
    .ev_valid, .ev_domain, .ev_bank);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int m_last = NM - 1;
  int gated = 0, fires = 0;

  task automatic fail(string s);
    failures++;
    $display("FAIL t=%0t %s", $time, s);
  endtask

  function automatic bit sched_ok(int m);
    return req_valid[m] &&
           !(req_acquire[m] && throttle[req_domain[m]][req_addr[m][11:9]]);
  endfunction

  // returns the expected index or -1
  task automatic compare(output int exp);
    exp = -1;
    for (int k = 1; k <= NM; k++) begin
      int i;
      i = (m_last + k) % NM;
      if (exp < 0 && sched_ok(i)) exp = i;
    end
    for (int m = 0; m < NM; m++) if (req_valid[m] && !sched_ok(m)) gated++;
    checks += 2;
    if (grant_valid !== (exp >= 0)) fail($sformatf("grant_valid %0b exp idx %0d", grant_valid, exp));
    if (exp >= 0) begin
      if (int'(grant_idx) != exp || grant != (NM'(1) << exp))
        fail($sformatf("grant idx %0d exp %0d", grant_idx, exp));
    end else if (grant != '0) fail("grant without request");
    checks++;
    if (ev_valid !== (exp >= 0 && issue_ready && req_acquire[exp])) fail("ev_valid");
    if (ev_valid) begin
      checks += 2;
      if (ev_domain !== req_domain[exp]) fail("ev_domain");
      if (ev_bank !== req_addr[exp][11:9]) fail("ev_bank");
    end
  endtask

  initial begin
    #3_000_000;
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    req_valid = '0; req_acquire = '0; req_domain = '0; req_addr = '0;
    throttle = '0; issue_ready = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int n = 0; n < 20000; n++) begin
      for (int m = 0; m < NM; m++) begin
        req_valid[m]   = 1'($urandom_range(0, 3) == 0);
        req_acquire[m] = 1'($urandom_range(0, 3) != 0);
        req_domain[m]  = 1'($urandom());
        req_addr[m]    = PADDR_W'({$urandom(), $urandom()});
      end
      throttle = (ND * NB)'($urandom() & $urandom());
      issue_ready = 1'($urandom_range(0, 3) != 0);
      #1;
      compare(exp);
      @(posedge clk);
      if (exp >= 0 && issue_ready) begin m_last = exp; fires++; end
      @(negedge clk);
    end

    // all requesting, nothing throttled: every MSHR once in 27 cycles
    req_valid = '1; throttle = '0; issue_ready = 1'b1;
    begin
      bit [NM-1:0] seen = '0;
      for (int n = 0; n < NM; n++) begin
        #1;
        compare(exp);
        if (grant_valid) seen[grant_idx] = 1'b1;
        @(posedge clk);
        if (exp >= 0) m_last = exp;
        @(negedge clk);
      end
      checks++;
      if (seen != '1) fail("round robin did not visit every MSHR");
    end

    checks++;
    if (gated == 0 || fires == 0) fail("mechanisms not exercised");
    $display("gated requests %0d, fires %0d", gated, fires);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
