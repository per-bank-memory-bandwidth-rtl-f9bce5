// tag_unit: regulation-domain tagging and forwarded throttling of core
// requests.
//
// The unit sits between the cores and the system bus, on each core's
// TileLink channel A. A table of N_CORES domain registers, written over the
// register port, says which regulation domain each core belongs to; every
// request leaving the unit carries the domain of the core that sent it.
// The DRAM regulator forwards its N_DOMAINS x N_BANKS throttle bits here.
// An AcquireBlock whose (domain, DRAM bank) throttle bit is set is held at
// the core (ready low, nothing sent) until the bit clears, which keeps a
// throttled domain from also loading the LLC banks. Every other request
// passes at once.
//
// Timing: channel A is a valid/ready handshake passed through
// combinationally; throttle_fwd is used in the same cycle. Register reads
// answer one cycle after the request.
//
// The tagging, the domain table and the forwarded AcquireBlock stall follow
// the regulator's architecture. The register layout (one 32-bit register per
// core, domain in its low bits), the reset value (every core in domain 0), the
// handshake and carrying the domain as a side signal are this design's own.
// Only channel A is handled. The other TileLink channels pass by outside this
// unit.
module tag_unit
  import bru_pkg::*;
#(
  parameter int unsigned N_CORES    = 4,
  parameter int unsigned N_DOMAINS  = 2,
  parameter int unsigned BANK_BITS  = 3,
  parameter bank_masks_t BANK_MASKS = DDR3_DIRECT_MASKS,
  parameter int unsigned SRC_W      = 8,
  localparam int unsigned N_BANKS   = 1 << BANK_BITS,
  localparam int unsigned DOM_W     = (N_DOMAINS > 1) ? $clog2(N_DOMAINS) : 1
) (
  input  logic clk,
  input  logic rst_n,

  // channel A from the cores
  input  logic     [N_CORES-1:0]              core_a_valid,
  output logic     [N_CORES-1:0]              core_a_ready,
  input  tl_a_op_e [N_CORES-1:0]              core_a_opcode,
  input  logic     [N_CORES-1:0][PADDR_W-1:0] core_a_addr,
  input  logic     [N_CORES-1:0][SRC_W-1:0]   core_a_source,

  // tagged channel A to the system bus
  output logic     [N_CORES-1:0]              bus_a_valid,
  input  logic     [N_CORES-1:0]              bus_a_ready,
  output tl_a_op_e [N_CORES-1:0]              bus_a_opcode,
  output logic     [N_CORES-1:0][PADDR_W-1:0] bus_a_addr,
  output logic     [N_CORES-1:0][SRC_W-1:0]   bus_a_source,
  output logic     [N_CORES-1:0][DOM_W-1:0]   bus_a_domain,

  // throttle bits forwarded from the DRAM regulator
  input  logic [N_DOMAINS-1:0][N_BANKS-1:0]   throttle_fwd,

  // register port
  input  mmio_req_t mmio_req,
  output mmio_rsp_t mmio_rsp,

  // domain table, for the rest of the SoC
  output logic [N_CORES-1:0][DOM_W-1:0]       core_domain
);

  logic [N_CORES-1:0][DOM_W-1:0]     dom_q;
  logic [N_CORES-1:0][BANK_BITS-1:0] req_bank;
  logic [N_CORES-1:0]                stall;

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    bank_map #(.BANK_BITS(BANK_BITS), .BANK_MASKS(BANK_MASKS)) u_map (
      .addr (core_a_addr[c]),
      .bank (req_bank[c])
    );

    always_comb begin
      stall[c] = (core_a_opcode[c] == TL_ACQUIRE_BLK) &&
                 throttle_fwd[dom_q[c]][req_bank[c]];
      bus_a_valid[c]  = core_a_valid[c] && !stall[c];
      core_a_ready[c] = bus_a_ready[c] && !stall[c];
    end

    assign bus_a_opcode[c] = core_a_opcode[c];
    assign bus_a_addr[c]   = core_a_addr[c];
    assign bus_a_source[c] = core_a_source[c];
    assign bus_a_domain[c] = dom_q[c];
  end

  assign core_domain = dom_q;

  // register port
  logic [MMIO_AW-3:0] word;
  assign word = mmio_req.addr[MMIO_AW-1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dom_q    <= '0;
      mmio_rsp <= '0;
    end else begin
      mmio_rsp.valid <= mmio_req.valid;
      mmio_rsp.rdata <= '0;
      if (mmio_req.valid) begin
        for (int unsigned c = 0; c < N_CORES; c++) begin
          if (word == (REG_CORE_DOM0[MMIO_AW-1:2] + (MMIO_AW-2)'(c))) begin
            if (mmio_req.write && mmio_req.wdata < MMIO_DW'(N_DOMAINS)) begin
              dom_q[c] <= mmio_req.wdata[DOM_W-1:0];
            end
            mmio_rsp.rdata <= MMIO_DW'(dom_q[c]);
          end
        end
      end
    end
  end

  // Every core's domain is a valid domain, and no throttled AcquireBlock
  // ever reaches the bus.
  for (genvar c = 0; c < N_CORES; c++) begin : g_chk
    a_domain_in_range: assert property (@(posedge clk) disable iff (!rst_n)
      32'(dom_q[c]) < N_DOMAINS);
    a_no_throttled_acquire: assert property (@(posedge clk) disable iff (!rst_n)
      !(bus_a_valid[c] && bus_a_opcode[c] == TL_ACQUIRE_BLK &&
        throttle_fwd[bus_a_domain[c]][req_bank[c]]));
  end

endmodule
