// DA instruction decoder.
//
// Recognises the DA A opcode D4H (1101_0100) in the instruction register as a
// single eight-input AND whose inputs IR5, IR3, IR1 and IR0 are inverted, the
// gate the design uses to drive S_0 of the BCD MUX. Purely combinational;
// s0 follows ir with no clock.
module wimp51_da_decode (
  input  logic [7:0] ir,
  output logic       s0
);
  always_comb
    s0 = ir[7] & ir[6] & ~ir[5] & ir[4] & ~ir[3] & ir[2] & ~ir[1] & ~ir[0];
endmodule
