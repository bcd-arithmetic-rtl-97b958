// Program ROM.
//
// 2**ADDR_W bytes with an asynchronous read port. The contents come from
// INIT_FILE, a $readmemh image relative to the project root; locations the
// image does not cover read as 00H. The default image is the DA demonstration
// and instruction-set test program (wimp51_da_test.hex).
module wimp51_rom #(
  parameter int unsigned ADDR_W    = 8,
  parameter string       INIT_FILE = "rtl/wimp51_da_test.hex"
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [7:0]        data
);
  logic [7:0] mem [2**ADDR_W];

  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) mem[i] = 8'h00;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_comb data = mem[addr];
endmodule
