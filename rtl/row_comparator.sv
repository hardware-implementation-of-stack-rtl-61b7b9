// Address decoder and comparator of one stack row.
//
// The row holds a way number; the tag RAM presents the way that hit as
// one-hot match lines. The row's address is decoded to one-hot and each
// decoded line is ANDed with the corresponding match line; the wired OR of
// those products is the comparator output, high only when the row holds the
// way that hit. With all match lines low (a miss) the output stays low. In
// silicon this is a pseudo-nMOS pull-down network; here it is plain logic
// with the same function. Purely combinational.
// The decode-and-compare structure follows the published circuit; driving
// the match lines all-zero on a miss (instead of leaving them floating) is
// this design's choice.
module row_comparator #(
  parameter int unsigned WAYS = 4,
  localparam int unsigned AW = $clog2(WAYS)
) (
  input  logic [AW-1:0]   row_addr,
  input  logic [WAYS-1:0] match,
  output logic            equal
);

  logic [WAYS-1:0] dec;

  address_decoder #(.AW(AW)) u_dec (
    .addr   (row_addr),
    .onehot (dec)
  );

  assign equal = |(dec & match);

endmodule
