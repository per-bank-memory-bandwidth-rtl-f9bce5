// tag_unit_tb: checks domain tagging, the domain table and the forwarded
// AcquireBlock stall of the tagging unit.
//
// Four cores, two domains, the default 8-bank direct map (bank = address
// bits 11:9, computed here by slicing). Every cycle each core offers a
// random request, the bus gives random ready, and random throttle bits come
// from the regulator. The model predicts valid/ready/domain of every
// channel: an AcquireBlock is held exactly when the throttle bit of its
// core's domain and its bank is set, everything else passes. Register writes
// move cores between domains (writes of a domain that does not exist must be
// ignored) and reads are checked one cycle later. A watchdog ends the run if
// it hangs.
module tag_unit_tb;
  import bru_pkg::*;

  localparam int NC = 4, ND = 2, NB = 8;

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
  logic     [ND-1:0][NB-1:0]      throttle_fwd;
  mmio_req_t req;
  mmio_rsp_t rsp;

  tag_unit dut (.clk, .rst_n, .core_a_valid, .core_a_ready, .core_a_opcode,
    .core_a_addr, .core_a_source, .bus_a_valid, .bus_a_ready, .bus_a_opcode,
    .bus_a_addr, .bus_a_source, .bus_a_domain, .throttle_fwd,
    .mmio_req(req), .mmio_rsp(rsp), .core_domain);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int stalls = 0, passed_acquires = 0, passed_other = 0;
  int m_dom [NC];
  bit exp_rsp_valid;
  int exp_rdata;

  task automatic fail(string s);
    failures++;
    $display("FAIL t=%0t %s", $time, s);
  endtask

  task automatic compare();
    for (int c = 0; c < NC; c++) begin
      bit hold;
      int bank;
      bank = int'(core_a_addr[c][11:9]);
      hold = (core_a_opcode[c] == TL_ACQUIRE_BLK) && throttle_fwd[m_dom[c]][bank];
      checks += 5;
      if (bus_a_valid[c] !== (core_a_valid[c] && !hold)) fail($sformatf("core %0d bus valid", c));
      if (core_a_ready[c] !== (bus_a_ready[c] && !hold)) fail($sformatf("core %0d core ready", c));
      if (int'(bus_a_domain[c]) != m_dom[c]) fail($sformatf("core %0d domain %0d exp %0d", c, bus_a_domain[c], m_dom[c]));
      if (bus_a_addr[c] !== core_a_addr[c] || bus_a_opcode[c] !== core_a_opcode[c]) fail("payload");
      if (bus_a_source[c] !== core_a_source[c]) fail("source");
      if (core_a_valid[c] && hold) stalls++;
      if (core_a_valid[c] && !hold && core_a_opcode[c] == TL_ACQUIRE_BLK) passed_acquires++;
      if (core_a_valid[c] && !hold && core_a_opcode[c] != TL_ACQUIRE_BLK) passed_other++;
    end
    if (exp_rsp_valid) begin
      checks++;
      if (!rsp.valid || int'(rsp.rdata) != exp_rdata) fail($sformatf("rsp %0d exp %0d", rsp.rdata, exp_rdata));
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    core_a_valid = '0; core_a_opcode = '{default: TL_GET}; core_a_addr = '0;
    core_a_source = '0; bus_a_ready = '0; throttle_fwd = '0; req = '0;
    for (int c = 0; c < NC; c++) m_dom[c] = 0;
    exp_rsp_valid = 0; exp_rdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int n = 0; n < 20000; n++) begin
      for (int c = 0; c < NC; c++) begin
        core_a_valid[c]  = 1'($urandom_range(0, 3) != 0);
        core_a_opcode[c] = ($urandom_range(0, 1) != 0) ? TL_ACQUIRE_BLK : tl_a_op_e'($urandom_range(0, 7));
        core_a_addr[c]   = PADDR_W'({$urandom(), $urandom()});
        core_a_source[c] = 8'($urandom());
        bus_a_ready[c]   = 1'($urandom_range(0, 4) != 0);
      end
      throttle_fwd = (ND * NB)'($urandom());
      req = '0;
      if ($urandom_range(0, 20) == 0) begin
        req.valid = 1'b1;
        req.write = 1'($urandom_range(0, 1));
        req.addr  = 12'(4 * $urandom_range(0, NC - 1));
        req.wdata = $urandom_range(0, 2);
      end
      #1;
      compare();
      @(posedge clk);
      exp_rsp_valid = req.valid;
      exp_rdata = req.valid ? m_dom[req.addr[11:2]] : 0;
      if (req.valid && req.write && req.wdata < ND) m_dom[req.addr[11:2]] = int'(req.wdata);
      @(negedge clk);
    end

    checks++;
    if (stalls == 0 || passed_acquires == 0 || passed_other == 0) fail("mechanisms not exercised");
    $display("stalls %0d, passed acquires %0d, passed other %0d", stalls, passed_acquires, passed_other);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
