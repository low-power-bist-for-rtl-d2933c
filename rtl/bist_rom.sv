// bist_rom: read-only memory of the expected (fault-free) ALU responses.
//
// 2**AW words of W bits, loaded from INIT_FILE (one hexadecimal word per line) at
// start-up. Read is synchronous: dout holds mem[addr] from the cycle after addr is
// applied. In the BIST, word k is the fault-free ALU result for test pattern k, the
// LP-LFSR state after k+1 steps from reset. The synchronous read and the file format
// are this design's choices.
module bist_rom #(
  parameter int unsigned W         = 8,
  parameter int unsigned AW        = 5,
  parameter string       INIT_FILE = "rtl/bist_rom.hex"
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [W-1:0]  dout
);

  logic [W-1:0] mem [2**AW];

  initial $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk) dout <= mem[addr];

endmodule
