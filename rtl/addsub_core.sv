// addsub_core: the combinational arithmetic of one add-subtract cluster.
//
// Three 8-bit add/subtract modules sit side by side. Two cascade switches
// (casc01, casc12) pass the carry from one module to the next, so the core
// works as one 24-bit unit, as a 16-bit and an 8-bit unit, or as three
// independent 8-bit units. Subtraction adds the one's complement of the
// subtrahend with a carry-in of one into every module that is not fed by a
// closed cascade switch; op selects A+B, A-B or B-A. When use_ext_cin is set,
// the carry into module 0 is ext_cin instead (used by the digit-serial mode of
// addsub_cluster). cout gives each module's carry out.
// Grouping three 8-bit modules with cascade switches follows the published design;
// the complement-and-carry subtraction is this design's choice.
module addsub_core
  import dwt_ra_pkg::*;
(
  input  logic [DW-1:0]     a,
  input  logic [DW-1:0]     b,
  input  as_op_e            op,
  input  logic              casc01,
  input  logic              casc12,
  input  logic              use_ext_cin,
  input  logic              ext_cin,
  output logic [DW-1:0]     y,
  output logic [NSLICE-1:0] cout
);
  logic          sub;
  logic [DW-1:0] x, z;

  always_comb begin
    sub = (op == OP_AMB) || (op == OP_BMA);
    x   = (op == OP_BMA) ? b : a;
    z   = (op == OP_BMA) ? a : b;
    if (sub) z = ~z;
  end

  always_comb begin
    logic [SLICE_W:0] s;
    logic             cin;
    logic             c_prev;
    c_prev = 1'b0;
    for (int k = 0; k < NSLICE; k++) begin
      if (k == 0)
        cin = use_ext_cin ? ext_cin : sub;
      else if ((k == 1 && casc01) || (k == 2 && casc12))
        cin = c_prev;
      else
        cin = sub;
      s = {1'b0, x[k*SLICE_W +: SLICE_W]} + {1'b0, z[k*SLICE_W +: SLICE_W]}
          + {{SLICE_W{1'b0}}, cin};
      y[k*SLICE_W +: SLICE_W] = s[SLICE_W-1:0];
      cout[k] = s[SLICE_W];
      c_prev  = s[SLICE_W];
    end
  end
endmodule
