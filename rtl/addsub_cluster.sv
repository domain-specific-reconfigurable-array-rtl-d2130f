// addsub_cluster: configurable add-subtract cluster of the DWT array.
//
// The cluster computes A+B, A-B or B-A (cfg.op) on its two 24-bit operands
// and registers the result, so its output follows its inputs by one clock.
// Three 8-bit modules are joined by two cascade switches (cfg.casc01,
// cfg.casc12): both closed give a 24-bit unit, one closed gives 16+8 bits,
// both open give three separate 8-bit lanes.
// cfg.ser chooses the arithmetic style:
//   SER_PARALLEL  whole word every cycle.
//   SER_DIGIT     digit-serial: one 8-bit digit per cycle on bits [7:0] of
//                 a and b, least significant digit first; the carry out of
//                 module 0 is kept in a flip-flop for the next digit.
//   SER_BIT       bit-serial: one bit per cycle on bit 0, least significant
//                 first, with the carry kept in the same flip-flop.
// In both serial styles the `first` input marks the first digit or bit of a
// word; it loads the initial carry (1 for a subtraction, 0 for an addition).
// Serial results appear on the same low bits of y, one clock later; the
// other bits of y are zero.
// The operations, the 8-bit module width, the cascading to 24 bits and the
// three arithmetic styles follow the published design. The 8-bit digit size, the
// `first` marker and the one-cycle output register are this design's choices.
module addsub_cluster
  import dwt_ra_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  as_cfg_t       cfg,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  input  logic          first,
  output logic [DW-1:0] y
);
  logic              sub;
  logic              carry_q;
  logic              serial_cin;
  logic [DW-1:0]     core_y;
  logic [NSLICE-1:0] core_cout;
  logic              bit_x, bit_z, bit_s, bit_c;
  logic [DW-1:0]     y_d;
  logic              carry_d;
  logic              digit_mode, bit_mode;

  assign sub        = (cfg.op == OP_AMB) || (cfg.op == OP_BMA);
  assign serial_cin = first ? sub : carry_q;
  assign digit_mode = (cfg.ser == SER_DIGIT);
  assign bit_mode   = (cfg.ser == SER_BIT);

  addsub_core u_core (
    .a           (a),
    .b           (b),
    .op          (cfg.op),
    .casc01      (cfg.casc01 && !digit_mode),
    .casc12      (cfg.casc12 && !digit_mode),
    .use_ext_cin (digit_mode),
    .ext_cin     (serial_cin),
    .y           (core_y),
    .cout        (core_cout)
  );

  // Bit-serial full adder on bit 0.
  always_comb begin
    bit_x = (cfg.op == OP_BMA) ? b[0] : a[0];
    bit_z = (cfg.op == OP_BMA) ? a[0] : b[0];
    if (sub) bit_z = ~bit_z;
    bit_s = bit_x ^ bit_z ^ serial_cin;
    bit_c = (bit_x & bit_z) | (bit_x & serial_cin) | (bit_z & serial_cin);
  end

  always_comb begin
    if (bit_mode) begin
      y_d     = {{(DW-1){1'b0}}, bit_s};
      carry_d = bit_c;
    end else if (digit_mode) begin
      y_d     = {{(DW-SLICE_W){1'b0}}, core_y[SLICE_W-1:0]};
      carry_d = core_cout[0];
    end else begin
      y_d     = core_y;
      carry_d = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= '0;
      carry_q <= 1'b0;
    end else begin
      y       <= y_d;
      carry_q <= carry_d;
    end
  end
endmodule
