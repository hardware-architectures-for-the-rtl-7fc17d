// squarer: unsigned square p = a*a, built as a folded partial-product array.
//
// In a*a every cross product a[i]&a[j] (i != j) appears twice, so the array
// keeps the diagonal terms a[i] at weight 2^(2i) (a[i]&a[i] = a[i]) and each
// cross term once at weight 2^(i+j+1). That needs about half the partial
// products of a general multiplier. The reference design uses a dedicated
// squaring component from earlier work without describing its insides; this
// folded array is this design's own choice of the simplest such structure.
// Purely combinational; p is 2*W bits.
module squarer #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  output logic [2*W-1:0] p
);
  always_comb begin
    logic [2*W-1:0] acc;
    acc = '0;
    for (int i = 0; i < int'(W); i++) begin
      acc = acc + ((2*W)'(a[i]) << (2 * i));
      for (int j = i + 1; j < int'(W); j++) begin
        acc = acc + ((2*W)'(a[i] & a[j]) << (i + j + 1));
      end
    end
    p = acc;
  end
endmodule
