// Adaptive encoder of one bit group.
//
// The new group value x and prev, the value the group's bus lines hold now,
// enter the INV, XOR and XNOR coding units. Each unit offers a candidate word
// and the number of lines that would toggle if it were sent; sending x as it
// is (transparent) is the fourth candidate. A comparator picks the candidate
// with the fewest toggles and a multiplexer puts it on y, with its function
// code on mode (the group's extra lines). This is the inset of the encoder
// block diagram: Value_n and Value_n-1 into INV/XOR/XNOR, comparator, MUX.
//
// On a tie the order transparent, INV, XOR, XNOR decides; the description only
// asks for the minimum, so the tie order is this design's choice. It keeps the
// extra lines at the transparent code whenever coding gains nothing.
// Combinational; the register that holds the previous value lives in the
// codec end (codec_port) that instantiates this unit.
module group_encoder
  import pa_codec_pkg::*;
#(
  parameter int unsigned W  = 4,
  parameter int unsigned DW = $clog2(W + 1)
) (
  input  logic [W-1:0]  x,
  input  logic [W-1:0]  prev,
  output logic [W-1:0]  y,
  output codec_mode_e   mode,
  output logic [DW-1:0] cost   // toggles of the chosen word against prev
);

  logic [W-1:0]  inv_cand, xor_cand, xnor_cand;
  logic [DW-1:0] inv_cost, xor_cost, xnor_cost;
  logic [DW-1:0] trans_cost;

  inv_coder #(.W(W), .DW(DW)) u_inv (
    .x         (x),
    .prev      (prev),
    .y         (),
    .inv       (),
    .cand      (inv_cand),
    .cand_cost (inv_cost),
    .base_cost (trans_cost)
  );

  xor_coder #(.W(W), .DW(DW)) u_xor (
    .x         (x),
    .prev      (prev),
    .y         (),
    .sel       (),
    .cand      (xor_cand),
    .cand_cost (xor_cost),
    .base_cost ()
  );

  xnor_coder #(.W(W), .DW(DW)) u_xnor (
    .x         (x),
    .prev      (prev),
    .y         (),
    .sel       (),
    .cand      (xnor_cand),
    .cand_cost (xnor_cost),
    .base_cost ()
  );

  // The units' own stand-alone decisions (y, inv/sel) are left open: here
  // only their candidates and costs are compared.

  // Comparator and MUX: strict "<" keeps the earlier candidate on a tie.
  always_comb begin
    mode = MODE_TRANS;
    y    = x;
    cost = trans_cost;
    if (inv_cost < cost) begin
      mode = MODE_INV;
      y    = inv_cand;
      cost = inv_cost;
    end
    if (xor_cost < cost) begin
      mode = MODE_XOR;
      y    = xor_cand;
      cost = xor_cost;
    end
    if (xnor_cost < cost) begin
      mode = MODE_XNOR;
      y    = xnor_cand;
      cost = xnor_cost;
    end
  end

endmodule
