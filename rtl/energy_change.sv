// energy_change: change in tour length caused by swapping two cities.
//
// B and E are the cities swapped; A and C are B's neighbours before and after
// it in the tour, D and F are E's. The swap adds the edges A-E, E-C, D-B and
// B-F and removes A-B, B-C, D-E and E-F, so the change is
//   (AE + EC) + (DB + BF) - ((AB + BC) + (DE + EF)),
// computed as the adder tree of the document's figure: four adders, two
// adders and one subtractor, three levels deep. Purely combinational.
//
// Interface: d[0..7] = AE, EC, DB, BF, AB, BC, DE, EF (unsigned distances);
// delta is the signed change, wide enough not to overflow.
module energy_change #(
  parameter int unsigned DW = 32
) (
  input  logic [DW-1:0]        d [8],
  output logic signed [DW+2:0] delta
);

  logic [DW:0]   l1 [4];
  logic [DW+1:0] l2 [2];

  always_comb begin
    for (int k = 0; k < 4; k++)
      l1[k] = {1'b0, d[2*k]} + {1'b0, d[2*k+1]};
    for (int k = 0; k < 2; k++)
      l2[k] = {1'b0, l1[2*k]} + {1'b0, l1[2*k+1]};
    delta = $signed({1'b0, l2[0]}) - $signed({1'b0, l2[1]});
  end

endmodule
