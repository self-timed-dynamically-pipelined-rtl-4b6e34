// c_element: Muller C-element with two inputs.
//
// When both inputs are equal the output takes their value, otherwise it keeps
// its previous value.  The state is held in a register that updates once per
// clock (one gate delay of the self-timed model).  It resets to RST_VAL.
//
// The C-element and its use in the depth modifier follow the original design;
// the registered form and the reset value are this design's choices.
module c_element #(
  parameter bit RST_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic x,
  input  logic y,
  output logic z
);

  always_ff @(posedge clk) begin
    if (!rst_n)      z <= RST_VAL;
    else if (x == y) z <= x;
  end

endmodule
