// XNOR coding unit.
//
// Forms cand = ~(x XOR prev), where prev is the value the bus lines held
// before, and sends it instead of x when that makes fewer lines toggle:
//   sel = Hamming(x, prev) > Hamming(cand, prev) ;  y = sel ? cand : x
// The rule and its structure (a Hamming unit fed with the new value, the
// previous value and the XNOR value, then an "A>B" decision) follow the codec
// description. Hamming(~(x XOR prev), prev) equals the number of zeros in x,
// so the XNOR function pays off for words with many ones.
//
// cand, cand_cost (toggles when cand is sent) and base_cost (toggles when x is
// sent) feed the adaptive group encoder. Combinational, no clock.
module xnor_coder #(
  parameter int unsigned W  = 8,
  parameter int unsigned DW = $clog2(W + 1)
) (
  input  logic [W-1:0]  x,
  input  logic [W-1:0]  prev,
  output logic [W-1:0]  y,
  output logic          sel,
  output logic [W-1:0]  cand,
  output logic [DW-1:0] cand_cost,
  output logic [DW-1:0] base_cost
);

  assign cand = ~(x ^ prev);

  hamming_dist #(.W(W), .DW(DW)) u_hd_base (
    .a    (x),
    .b    (prev),
    .hd (base_cost)
  );

  hamming_dist #(.W(W), .DW(DW)) u_hd_cand (
    .a    (cand),
    .b    (prev),
    .hd (cand_cost)
  );

  assign sel = base_cost > cand_cost;
  assign y   = sel ? cand : x;

endmodule
