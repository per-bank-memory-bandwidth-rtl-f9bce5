// bru_pkg: types and constants shared by the per-bank DRAM bandwidth
// regulator.
//
// The regulator counts the cache-line reads (TileLink AcquireBlock) that the
// last-level cache (LLC) sends to DRAM, separately for each regulation domain
// and each DRAM bank. The TileLink channel-A opcode values below follow the
// TileLink specification. The configuration interface (MMIO) is a plain
// single-beat register port: one request per cycle, always accepted, with
// read data returned one cycle later. That port, its register offsets, the
// 36-bit physical address and the register reset values are choices of this
// design. The default bank map (bits 9, 10, 11, direct) and the evaluation
// settings (1 ms period at 1 GHz, 53 MB/s per-bank budget) are those of the
// evaluated 8-bank DDR3 system.
package bru_pkg;

  // Physical address width carried by requests.
  localparam int unsigned PADDR_W = 36;

  // Largest number of DRAM bank-address bits a bank map can produce.
  localparam int unsigned MAX_BANK_BITS = 8;

  // One XOR mask per bank bit: bank bit i = ^(addr & mask[i]).
  typedef logic [MAX_BANK_BITS-1:0][PADDR_W-1:0] bank_masks_t;

  // Evaluated DDR3 system: bank bits b0,b1,b2 = address bits 9,10,11.
  localparam bank_masks_t DDR3_DIRECT_MASKS = '{
    7: '0, 6: '0, 5: '0, 4: '0, 3: '0,
    2: PADDR_W'(1) << 11,
    1: PADDR_W'(1) << 10,
    0: PADDR_W'(1) << 9
  };

  // Regulation settings of the evaluation: 1 ms at 1 GHz, and the number of
  // 64-byte lines per period giving 53 MB/s per bank (Eq. 3):
  // N_acc = B * P / (G * f) = 53e6 * 1e6 / (64 * 1e9) = 828.
  localparam int unsigned EVAL_PERIOD_CYCLES = 1_000_000;
  localparam int unsigned EVAL_BUDGET_LINES  = 828;

  // TileLink channel A opcodes.
  typedef enum logic [2:0] {
    TL_PUT_FULL    = 3'd0,
    TL_PUT_PARTIAL = 3'd1,
    TL_ARITHMETIC  = 3'd2,
    TL_LOGICAL     = 3'd3,
    TL_GET         = 3'd4,
    TL_INTENT      = 3'd5,
    TL_ACQUIRE_BLK = 3'd6,
    TL_ACQUIRE_PRM = 3'd7
  } tl_a_op_e;

  // Register-port request and response.
  localparam int unsigned MMIO_AW = 12;
  localparam int unsigned MMIO_DW = 32;

  typedef struct packed {
    logic               valid;
    logic               write;
    logic [MMIO_AW-1:0] addr;   // byte offset, 32-bit aligned
    logic [MMIO_DW-1:0] wdata;
  } mmio_req_t;

  typedef struct packed {
    logic               valid;  // one cycle after the request
    logic [MMIO_DW-1:0] rdata;
  } mmio_rsp_t;

  // Regulator register offsets.
  localparam logic [MMIO_AW-1:0] REG_PERIOD    = 12'h000; // period P in cycles
  localparam logic [MMIO_AW-1:0] REG_DOMAIN_EN = 12'h004; // bit d: regulate domain d
  localparam logic [MMIO_AW-1:0] REG_BUDGET0   = 12'h100; // +4*d: N_acc of domain d
  localparam logic [MMIO_AW-1:0] REG_COUNT0    = 12'h400; // +4*(d*N_BANKS+b): counter, read-only

  // Tagging-unit register offsets.
  localparam logic [MMIO_AW-1:0] REG_CORE_DOM0 = 12'h000; // +4*c: domain of core c

endpackage
