// buffer_cluster: configurable buffer / delay and normalizing cluster.
//
// The input word is first cut to a programmed width of 4, 8, 12, 16, 20 or 24
// bits (cfg.nibbles 4-bit units; the kept part is sign-extended back to 24
// bits), then normalized by an arithmetic right shift of cfg.norm places
// (division by 2**norm, rounded towards minus infinity), and then delayed in
// a shift register. The output is the stage selected by cfg.depth, so q
// follows d by cfg.depth clocks (1..DEPTH; a depth of 0 acts as 1).
// The programmable widths in 4-bit steps, the delay-element use and the
// normalizing function follow the published design. The delay range, the order
// width-then-normalize-then-delay, sign extension and rounding by plain
// arithmetic shift are this design's choices.
module buffer_cluster
  import dwt_ra_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  buf_cfg_t      cfg,
  input  logic [DW-1:0] d,
  output logic [DW-1:0] q
);
  logic [DW-1:0] cut, normed;
  logic [DW-1:0] stage [DEPTH];
  int unsigned   nib, dep;

  always_comb begin
    nib = (cfg.nibbles == 3'd0 || cfg.nibbles > 3'd6) ? 6 : int'(cfg.nibbles);
    cut = d;
    for (int k = 1; k <= 6; k++)
      if (k == nib && k < 6)
        cut = DW'($signed(d << (DW - 4*k)) >>> (DW - 4*k));
    normed = DW'($signed(cut) >>> cfg.norm);
    dep = (cfg.depth == 3'd0) ? 1 : int'(cfg.depth);
    if (dep > DEPTH) dep = DEPTH;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) stage[i] <= '0;
    end else begin
      stage[0] <= normed;
      for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[dep-1];
endmodule
