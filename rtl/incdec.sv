// incdec: increments or decrements the current window pointer.
//
// RES = OP + 1 when FCOD = 1 and OP - 1 when FCOD = 0, modulo 2^W, so the
// window pointer wraps around the circular register file. save and trap
// entry decrement the CWP, restore and rett increment it. Combinational; the
// integer unit holds the CWP in the PSR and loads RES into it. The 5-bit
// width and the FCOD meaning are the document's.
module incdec #(
  parameter int W = 5
) (
  input  logic [W-1:0] op,
  input  logic         fcod,
  output logic [W-1:0] res
);
  assign res = fcod ? op + W'(1) : op - W'(1);
endmodule
