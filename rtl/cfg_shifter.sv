// cfg_shifter: configurable shifter of the coefficient multiplier cluster.
//
// Multiplies its 24-bit signed input by 2**amt (SH_MUL) or divides it by
// 2**amt (SH_DIV, an arithmetic right shift, so the quotient is rounded
// towards minus infinity), or outputs zero (SH_OFF). amt runs from 0 to
// MAX_SHIFT; larger codes clamp to MAX_SHIFT. Purely combinational.
// The published design states a multiply or divide range of 2 to 32, that is shifts
// of 1 to 5 places (MAX_SHIFT = 5). Shift 0 (factor 1) and the zero output
// are this design's additions: the integer 9/7 mapping needs unit
// coefficients, and a zero input lets a shifter pair form a single term.
module cfg_shifter
  import dwt_ra_pkg::*;
#(
  parameter int unsigned MAX_SHIFT = 5
) (
  input  sh_cfg_t       cfg,
  input  logic [DW-1:0] d,
  output logic [DW-1:0] y
);
  logic [2:0] amt;

  always_comb begin
    amt = (cfg.amt > 3'(MAX_SHIFT)) ? 3'(MAX_SHIFT) : cfg.amt;
    case (cfg.mode)
      SH_MUL:  y = d << amt;
      SH_DIV:  y = DW'($signed(d) >>> amt);
      default: y = '0;
    endcase
  end
endmodule
