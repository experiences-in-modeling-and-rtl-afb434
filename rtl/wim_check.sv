// wim_check: tests the Window Invalid Mask for a window pointer.
//
// RES is bit CWP of WIM: 1 means the window the CWP points to is invalid, so
// moving into it must raise a window overflow (save) or underflow (restore,
// rett) trap. Combinational. Function as in the document's WIMCheck.
module wim_check (
  input  logic [4:0]  cwp,
  input  logic [31:0] wim,
  output logic        res
);
  assign res = wim[cwp];
endmodule
