// rev_pkg: types shared by the reversible gate and cascade modules.
//
// The new k*k gate family computes a control function f_{k-2} of its
// pass-through lines. The cascades use three forms of that function: a
// product of literals (SOP and ESOP cascades), a sum of literals (factorized
// SOP) and an EXOR of literals (factorized ESOP). f_kind_e selects the form.
// A literal set is described by two masks over the pass-through lines: CARE
// marks the lines that take part, INV marks those that enter complemented.
package rev_pkg;

  typedef enum logic [1:0] {
    F_AND = 2'd0,  // f = product of the selected literals
    F_OR  = 2'd1,  // f = sum of the selected literals
    F_XOR = 2'd2   // f = EXOR of the selected literals
  } f_kind_e;

endpackage
