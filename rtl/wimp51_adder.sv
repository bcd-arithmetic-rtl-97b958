// Ripple-carry adder with auxiliary carry output.
//
// WIDTH full adders are chained carry to carry. Besides the sum and the
// carry out of the top bit it brings out the carry from bit 3 into bit 4,
// the auxiliary (half) carry that DA A needs to know whether the low BCD
// digit overflowed. The ripple structure and the tap between the nibbles
// follow the original DA modification; WIDTH must be at least 5. Combinational.
module wimp51_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             ac
);
  logic [WIDTH:0] carry;

  always_comb carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    always_comb begin
      sum[i]     = a[i] ^ b[i] ^ carry[i];
      carry[i+1] = (a[i] & b[i]) | (carry[i] & (a[i] ^ b[i]));
    end
  end

  always_comb begin
    cout = carry[WIDTH];
    ac   = carry[4];
  end
endmodule
