// INV coding unit (bus-invert rule).
//
// Compares the new word x with prev, the value the bus lines held before, and
// inverts x when more than half of the lines would otherwise toggle:
//   inv = Hamming(x, prev) > W/2 ;  y = inv ? ~x : x
// This is the invert rule of the codec description, with a Hamming unit and a
// ">W/2" decision (">4" for the drawn 8-bit case).
//
// Besides the stand-alone result (y, inv) the unit reports its candidate for
// the adaptive group encoder: cand = ~x and cand_cost, the number of lines that
// would toggle if cand were sent (W - Hamming(x, prev)), and base_cost, the
// toggles of sending x unchanged. Combinational, no clock.
module inv_coder #(
  parameter int unsigned W  = 8,
  parameter int unsigned DW = $clog2(W + 1)
) (
  input  logic [W-1:0]  x,
  input  logic [W-1:0]  prev,
  output logic [W-1:0]  y,
  output logic          inv,
  output logic [W-1:0]  cand,
  output logic [DW-1:0] cand_cost,
  output logic [DW-1:0] base_cost
);

  hamming_dist #(.W(W), .DW(DW)) u_hd (
    .a    (x),
    .b    (prev),
    .hd (base_cost)
  );

  assign cand      = ~x;
  assign cand_cost = DW'(W) - base_cost;
  assign inv       = base_cost > DW'(W / 2);
  assign y         = inv ? cand : x;

endmodule
