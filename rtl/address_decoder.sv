// Row address decoder.
//
// Turns the AW-bit way number stored in a stack row into 2**AW one-hot lines
// I0..I(2**AW-1): line i is high exactly when the address equals i. It is the
// decoder inside each row's "address decoder and comparator"; the 2-bit
// version is the one drawn for a 4-way set, the width here is a parameter so
// that stacks of 8, 16 or 32 rows reuse it. Purely combinational.
// The decode function follows the published circuit; which input is the low
// bit (addr[0]) is this design's choice.
module address_decoder #(
  parameter int unsigned AW = 2
) (
  input  logic [AW-1:0]      addr,
  output logic [2**AW-1:0]   onehot
);

  always_comb begin
    onehot = '0;
    onehot[addr] = 1'b1;
  end

endmodule
