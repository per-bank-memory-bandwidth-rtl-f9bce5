// bank_map: physical address to DRAM bank index.
//
// Each bank-address bit i is the XOR (parity) of the address bits selected by
// BANK_MASKS[i]. A mask with a single bit set gives a direct map, a mask with
// several bits set gives the XOR-based maps that many memory controllers use.
// This is the hardware form of the address-to-bank conversion loop in the
// bank-aware benchmark; the default masks are the evaluated DDR3 system's
// direct map on address bits 9, 10 and 11 (8 banks).
//
// Interface: addr in, bank out. Purely combinational, no clock.
module bank_map
  import bru_pkg::*;
#(
  parameter int unsigned BANK_BITS  = 3,
  parameter bank_masks_t BANK_MASKS = DDR3_DIRECT_MASKS
) (
  input  logic [PADDR_W-1:0]   addr,
  output logic [BANK_BITS-1:0] bank
);

  always_comb begin
    for (int unsigned i = 0; i < BANK_BITS; i++) begin
      bank[i] = ^(addr & BANK_MASKS[i]);
    end
  end

endmodule
