// subpart_mux: selects the P history entries that one sub-part of the
// inner loop works on.
//
// The history holds entries 0..M*P; entries 1..M*P are split into M
// sub-parts of P entries. For sub-part s (0-based) output lane j-1
// (j = 1..P) is entry s*P + j, i.e. anchor i - s*P - j. Sub-part indices of
// M or more select lanes of zero. One instance serves the anchor FIFO and
// one the score FIFO, as the two selectors of the block diagram.
// Combinational.
module subpart_mux #(
  parameter type         T     = logic [31:0],  // entry type
  parameter int unsigned M     = 16,
  parameter int unsigned P     = 16,
  parameter int unsigned SW    = (M > 1) ? $clog2(M) : 1
) (
  input  T                 hist [M*P+1],
  input  logic [SW-1:0]    subpart,
  output T                 lane [P]
);

  always_comb begin
    for (int j = 0; j < int'(P); j++) begin
      lane[j] = '0;
      for (int s = 0; s < int'(M); s++) begin
        if (int'(subpart) == s) lane[j] = hist[s*int'(P) + j + 1];
      end
    end
  end

endmodule
