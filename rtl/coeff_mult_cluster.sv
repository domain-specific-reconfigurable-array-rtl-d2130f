// coeff_mult_cluster: shift-and-add constant multiplier of the DWT array.
//
// Each of the three inputs feeds a pair of configurable shifters; each pair
// feeds an add-subtract unit (add-subs 0, 1, 2), so every input can be scaled
// by a sum or difference of two powers of two. A second level of two
// add-subtract units combines those: add-sub 3 takes add-subs 0 and 1; add-sub
// 4 takes add-sub 2 together with add-sub 1 or, when cfg.as4_from_as3 is set,
// add-sub 3, so one cluster can sum all three scaled inputs. A multiplexer
// chooses which of the five add-sub results leaves the cluster
// (cfg.mux_sel), and the result is registered: y follows the inputs by one
// clock. All arithmetic is 24-bit two's complement and wraps on overflow.
// The six shifters, five add-subs in two levels, the multiplexer and the
// three inputs follow the block diagram of the published design's coefficient
// multiplier. Which add-sub feeds which, and the switch in front of add-sub 4,
// are this design's reading of the published design's "programmable switches"
// between the sub-modules. The internal add-subs are combinational and
// always 24 bits wide; only the output is registered.
module coeff_mult_cluster
  import dwt_ra_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  cm_cfg_t       cfg,
  input  logic [DW-1:0] in1,
  input  logic [DW-1:0] in2,
  input  logic [DW-1:0] in3,
  output logic [DW-1:0] y
);
  logic [DW-1:0] sh_in  [6];
  logic [DW-1:0] sh_out [6];
  logic [DW-1:0] as_a   [5];
  logic [DW-1:0] as_b   [5];
  logic [DW-1:0] as_y   [5];
  logic [DW-1:0] mux_y;

  assign sh_in[0] = in1;
  assign sh_in[1] = in1;
  assign sh_in[2] = in2;
  assign sh_in[3] = in2;
  assign sh_in[4] = in3;
  assign sh_in[5] = in3;

  for (genvar i = 0; i < 6; i++) begin : g_sh
    cfg_shifter u_sh (.cfg(cfg.sh[i]), .d(sh_in[i]), .y(sh_out[i]));
  end

  assign as_a[0] = sh_out[0];
  assign as_b[0] = sh_out[1];
  assign as_a[1] = sh_out[2];
  assign as_b[1] = sh_out[3];
  assign as_a[2] = sh_out[4];
  assign as_b[2] = sh_out[5];
  assign as_a[3] = as_y[0];
  assign as_b[3] = as_y[1];
  assign as_a[4] = cfg.as4_from_as3 ? as_y[3] : as_y[1];
  assign as_b[4] = as_y[2];

  for (genvar i = 0; i < 5; i++) begin : g_as
    logic [NSLICE-1:0] unused_cout;
    addsub_core u_as (
      .a           (as_a[i]),
      .b           (as_b[i]),
      .op          (cfg.op[i]),
      .casc01      (1'b1),
      .casc12      (1'b1),
      .use_ext_cin (1'b0),
      .ext_cin     (1'b0),
      .y           (as_y[i]),
      .cout        (unused_cout)
    );
  end

  always_comb begin
    case (cfg.mux_sel)
      3'd0:    mux_y = as_y[0];
      3'd1:    mux_y = as_y[1];
      3'd2:    mux_y = as_y[2];
      3'd3:    mux_y = as_y[3];
      3'd4:    mux_y = as_y[4];
      default: mux_y = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= mux_y;
  end
endmodule
