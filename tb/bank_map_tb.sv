// bank_map_tb: checks the address-to-bank map against a reference model.
//
// Three instances are checked: the default direct map (address bits 9, 10,
// 11), the 7-bit XOR map of a 128-bank DDR4 desktop system and the 8-bit XOR
// map of a 256-bank LPDDR5 system. The reference walks a list of address-bit
// positions per bank bit and XORs them, one bit at a time, which is
// independent of the mask form used by the design. Random addresses plus
// single-bit addresses are applied; the map is combinational, so each result
// is checked after a short settle delay. A watchdog ends the run if it hangs.
module bank_map_tb;
  import bru_pkg::*;

  int checks = 0;
  int failures = 0;

  // bit-position lists, -1 terminated
  typedef int bitlist_t [8][10];

  localparam bitlist_t DIRECT_BITS = '{
    '{9, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{10, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{11, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{-1, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{-1, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{-1, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{-1, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{-1, -1, -1, -1, -1, -1, -1, -1, -1, -1}
  };
  localparam bitlist_t DDR4_BITS = '{
    '{7, 14, -1, -1, -1, -1, -1, -1, -1, -1},
    '{15, 20, -1, -1, -1, -1, -1, -1, -1, -1},
    '{16, 21, -1, -1, -1, -1, -1, -1, -1, -1},
    '{17, 22, -1, -1, -1, -1, -1, -1, -1, -1},
    '{18, 23, -1, -1, -1, -1, -1, -1, -1, -1},
    '{19, 24, -1, -1, -1, -1, -1, -1, -1, -1},
    '{8, 9, 12, 13, 18, 19, -1, -1, -1, -1},
    '{-1, -1, -1, -1, -1, -1, -1, -1, -1, -1}
  };
  localparam bitlist_t LP5_BITS = '{
    '{11, 14, 16, 20, 21, 22, 33, -1, -1, -1},
    '{9, 11, 12, 16, 19, 23, 27, 28, -1, -1},
    '{12, 13, 18, 22, 25, 29, 30, 31, -1, -1},
    '{10, 11, 12, 17, 19, 20, 23, 32, -1, -1},
    '{10, 11, 13, 14, 18, 27, 28, 34, -1, -1},
    '{11, 12, 13, 16, 19, 24, 33, 35, -1, -1},
    '{10, 13, 7, 21, 24, 25, 26, 29, 34, -1},
    '{14, 15, 17, 21, 25, 28, 31, 34, 35, -1}
  };

  function automatic bank_masks_t to_masks(bitlist_t bl);
    bank_masks_t m = '0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 10; j++)
        if (bl[i][j] >= 0) m[i][bl[i][j]] = 1'b1;
    return m;
  endfunction

  function automatic int ref_bank(bitlist_t bl, int nbits, logic [PADDR_W-1:0] a);
    int bank = 0;
    for (int i = 0; i < nbits; i++) begin
      int r = 0;
      for (int j = 0; j < 10; j++)
        if (bl[i][j] >= 0) r = r ^ int'((a >> bl[i][j]) & 1);
      if (r == 1) bank = bank | (1 << i);
    end
    return bank;
  endfunction

  logic [PADDR_W-1:0] addr;
  logic [2:0] bank_direct;
  logic [6:0] bank_ddr4;
  logic [7:0] bank_lp5;

  bank_map u_direct (.addr(addr), .bank(bank_direct));
  bank_map #(.BANK_BITS(7), .BANK_MASKS(to_masks(DDR4_BITS))) u_ddr4 (.addr(addr), .bank(bank_ddr4));
  bank_map #(.BANK_BITS(8), .BANK_MASKS(to_masks(LP5_BITS))) u_lp5 (.addr(addr), .bank(bank_lp5));

  task automatic check_addr(logic [PADDR_W-1:0] a);
    addr = a;
    #1;
    checks += 3;
    if (int'(bank_direct) != ref_bank(DIRECT_BITS, 3, a)) begin
      failures++; $display("FAIL direct addr=%h got %0d exp %0d", a, bank_direct, ref_bank(DIRECT_BITS, 3, a));
    end
    if (int'(bank_ddr4) != ref_bank(DDR4_BITS, 7, a)) begin
      failures++; $display("FAIL ddr4 addr=%h got %0d exp %0d", a, bank_ddr4, ref_bank(DDR4_BITS, 7, a));
    end
    if (int'(bank_lp5) != ref_bank(LP5_BITS, 8, a)) begin
      failures++; $display("FAIL lp5 addr=%h got %0d exp %0d", a, bank_lp5, ref_bank(LP5_BITS, 8, a));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // direct map by hand: bits 9..11 give the bank directly
    addr = 36'h0000_0A00; #1; checks++;
    if (bank_direct != 3'b101) begin failures++; $display("FAIL direct 0xA00 -> %0d", bank_direct); end
    addr = 36'hF_FFFF_F1FF; #1; checks++;
    if (bank_direct != 3'b000) begin failures++; $display("FAIL direct 0xFFFFFF1FF -> %0d", bank_direct); end
    for (int b = 0; b < PADDR_W; b++) check_addr(PADDR_W'(1) << b);
    for (int n = 0; n < 2000; n++) check_addr(PADDR_W'({$urandom(), $urandom()}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
