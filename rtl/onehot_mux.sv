// onehot_mux: multiplexer with one select line per input.
//
// Y is the input whose select bit is set (N = 2 or 4 inputs of W bits). With
// no select bit set Y is 0; with several set, their inputs are ORed, and an
// assertion flags that case in simulation. Combinational. The one-select-line-
// per-input scheme is the document's MUX/MUX4; the zero default is this
// design's choice.
module onehot_mux #(
  parameter int N = 4,
  parameter int W = 32
) (
  input  logic [N-1:0][W-1:0] d,
  input  logic [N-1:0]        sel,
  output logic [W-1:0]        y
);
  always_comb begin
    y = '0;
    for (int i = 0; i < N; i++)
      if (sel[i]) y |= d[i];
  end

  always_comb assert ($onehot0(sel) || $isunknown(sel)) else $error("onehot_mux: several selects set");
endmodule
