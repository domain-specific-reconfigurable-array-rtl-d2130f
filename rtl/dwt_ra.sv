// dwt_ra: domain-specific reconfigurable array for the discrete wavelet
// transform.
//
// ROWS rows of NCOL clusters are laid out in columns of one kind, in the
// column order add-sub, coefficient multiplier, add-sub, add-sub, buffer,
// add-sub, buffer (column c of row r is cluster r*NCOL + c). With the default
// five rows that is 20 add-subtract, 5 coefficient multiplier and 10 buffer
// clusters. Every cluster registers its result, so each hop through a
// cluster costs one clock.
//
// Routing mesh: a horizontal channel runs above and below every row and a
// vertical channel left and right of every column, each with NTRK tracks of
// one 24-bit word. Channels are cut into segments one cluster long:
// horizontal segment H(h,c) (h = 0..ROWS, c = 0..NCOL-1) has index
// h*NCOL + c, vertical segment V(v,r) (v = 0..NCOL, r = 0..ROWS-1) has index
// (ROWS+1)*NCOL + v*ROWS + r. A switch box sits at every crossing (h,v),
// index h*(NCOL+1) + v, and joins the segments meeting there (sbox, Fs = 3).
// Every track of every segment has one configured driver, chosen by a
// connection box: the switch box at either end of the segment, or the
// output of either cluster beside it, or nothing. Every cluster data pin
// reads, through its connection box, any track of the four segments around
// the cluster or any of the NIN array inputs din. The NCTRL 1-bit control
// tracks carry ctrl_in to the serial-mode `first` pin of every add-subtract
// cluster. Each array output dout takes the result of one chosen cluster.
//
// A route is a tree of segments on one track number, each segment driven
// from its parent through a switch box. The fabric has combinational loops
// as drawn (segment -> switch box -> neighbouring segment -> switch box ->
// back), as every island-style routing fabric has; a configuration that is a
// set of trees, as a router produces, never closes one.
//
// Configuration is written one word at a time through cfg_we/cfg_addr/
// cfg_wdata (address map in dwt_ra_pkg); a write takes effect on the next
// clock. After reset every cluster configuration is zero and every
// connection and switch is open.
//
// What follows the published design: the three cluster kinds, 24-bit operation, the
// column arrangement of the clusters, 24 data and 24 control tracks,
// connection boxes through which a pin reaches all 24 tracks of a channel
// (Fc = 24), switch boxes with Fs = 3 at the channel crossings, and the
// 5/3 lifting and 9/7 integer mappings being set up by configuration alone.
// This design's own choices: a track carries a whole 24-bit word where the
// published design's tracks are 4 bits wide, directional multiplexers instead of
// bidirectional switches, one segment per cluster, array inputs reachable
// from every pin and outputs taken straight from clusters, the use of the
// control tracks, and the configuration port and its address map.
module dwt_ra
  import dwt_ra_pkg::*;
#(
  parameter int unsigned ROWS  = 5,
  parameter int unsigned NTRK  = 24,
  parameter int unsigned NCTRL = 24,
  parameter int unsigned NIN   = 9,
  parameter int unsigned NOUT  = 2,
  parameter int unsigned DEPTH = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_we,
  input  logic [CFG_AW-1:0]         cfg_addr,
  input  logic [CFG_W-1:0]          cfg_wdata,
  input  logic [NIN-1:0][DW-1:0]    din,
  input  logic [NCTRL-1:0]          ctrl_in,
  output logic [NOUT-1:0][DW-1:0]   dout
);
  localparam int unsigned NCL   = ROWS * NCOL;
  localparam int unsigned NH    = (ROWS + 1) * NCOL;   // horizontal segments
  localparam int unsigned NSEG  = NH + (NCOL + 1) * ROWS;
  localparam int unsigned NSB   = (ROWS + 1) * (NCOL + 1);
  localparam int unsigned HALF  = (NTRK + 1) / 2;      // tracks per segment config word
  localparam int unsigned NPSRC = 4 * NTRK + NIN;      // sources of a data pin
  localparam int unsigned PSW   = $clog2(NPSRC + 1);
  localparam int unsigned CSW   = $clog2(NCTRL + 1);
  localparam int unsigned OSW   = $clog2(NCL + 1);

  // Segment indices (see the header).
  function automatic int unsigned hseg(int unsigned h, int unsigned c);
    return h * NCOL + c;
  endfunction
  function automatic int unsigned vseg(int unsigned v, int unsigned r);
    return NH + v * ROWS + r;
  endfunction
  function automatic int unsigned sbi(int unsigned h, int unsigned v);
    return h * (NCOL + 1) + v;
  endfunction

  // ---------------------------------------------------------------- config
  logic [CFG_W-1:0]          cl_cfg   [NCL];
  logic [PSW-1:0]            pin_sel  [NCL][3];
  logic [CSW-1:0]            ctrl_sel [NCL];
  logic [NTRK-1:0][2:0]      seg_drv  [NSEG];
  logic [3:0][NTRK-1:0][1:0] sb_sel   [NSB];
  logic [OSW-1:0]            out_sel  [NOUT];

  logic [3:0]  cfg_page;
  int unsigned cfg_idx;
  assign cfg_page = cfg_addr[CFG_AW-1 -: 4];
  assign cfg_idx  = int'(cfg_addr[CFG_AW-5:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NCL); i++) begin
        cl_cfg[i]   <= '0;
        ctrl_sel[i] <= '1;
        for (int k = 0; k < 3; k++) pin_sel[i][k] <= '1;
      end
      for (int s = 0; s < int'(NSEG); s++) seg_drv[s] <= '0;
      for (int b = 0; b < int'(NSB); b++) sb_sel[b] <= '0;
      for (int o = 0; o < int'(NOUT); o++) out_sel[o] <= '1;
    end else if (cfg_we) begin
      case (cfg_page)
        A_CLUSTER: if (cfg_idx < NCL) cl_cfg[cfg_idx] <= cfg_wdata;
        A_PIN:     if (cfg_idx < 3 * NCL)
                     pin_sel[cfg_idx / 3][cfg_idx % 3] <= cfg_wdata[PSW-1:0];
        A_CTRL:    if (cfg_idx < NCL) ctrl_sel[cfg_idx] <= cfg_wdata[CSW-1:0];
        A_SEG:     if (cfg_idx < 2 * NSEG)
                     for (int t = 0; t < int'(HALF); t++)
                       if ((cfg_idx % 2) * HALF + t < NTRK)
                         seg_drv[cfg_idx / 2][(cfg_idx % 2) * HALF + t] <= cfg_wdata[3*t +: 3];
        A_OUT:     if (cfg_idx < NOUT) out_sel[cfg_idx] <= cfg_wdata[OSW-1:0];
        A_SBOX:    if (cfg_idx < 4 * NSB)
                     sb_sel[cfg_idx / 4][cfg_idx % 4] <= cfg_wdata[2*NTRK-1:0];
        default:   ;
      endcase
    end
  end

  // ------------------------------------------------------------ routing
  logic [NTRK-1:0][DW-1:0]      seg_val [NSEG];
  logic [3:0][NTRK-1:0][DW-1:0] sb_in   [NSB];
  logic [3:0][NTRK-1:0][DW-1:0] sb_out  [NSB];
  logic [NCL-1:0][DW-1:0]       cl_out;

  // Switch boxes: side inputs are the segments meeting at the crossing.
  for (genvar h = 0; h <= ROWS; h++) begin : g_sbr
    for (genvar v = 0; v <= NCOL; v++) begin : g_sbc
      localparam int unsigned B = sbi(h, v);
      if (h > 0)    begin : g_n assign sb_in[B][SIDE_N] = seg_val[vseg(v, h - 1)]; end
      else          begin : g_n assign sb_in[B][SIDE_N] = '0; end
      if (v < NCOL) begin : g_e assign sb_in[B][SIDE_E] = seg_val[hseg(h, v)]; end
      else          begin : g_e assign sb_in[B][SIDE_E] = '0; end
      if (h < ROWS) begin : g_s assign sb_in[B][SIDE_S] = seg_val[vseg(v, h)]; end
      else          begin : g_s assign sb_in[B][SIDE_S] = '0; end
      if (v > 0)    begin : g_w assign sb_in[B][SIDE_W] = seg_val[hseg(h, v - 1)]; end
      else          begin : g_w assign sb_in[B][SIDE_W] = '0; end
      sbox #(.W(DW), .NT(NTRK)) u_sb (.side_in(sb_in[B]), .sel(sb_sel[B]), .side_out(sb_out[B]));
    end
  end

  // Horizontal segments: ends are the switch boxes west and east of it,
  // neighbours the clusters above (A) and below (B).
  for (genvar h = 0; h <= ROWS; h++) begin : g_hs
    for (genvar c = 0; c < NCOL; c++) begin : g_c
      localparam int unsigned S = hseg(h, c);
      logic [DW-1:0] cla, clb;
      if (h > 0)    begin : g_a assign cla = cl_out[(h - 1) * NCOL + c]; end
      else          begin : g_a assign cla = '0; end
      if (h < ROWS) begin : g_b assign clb = cl_out[h * NCOL + c]; end
      else          begin : g_b assign clb = '0; end
      for (genvar t = 0; t < NTRK; t++) begin : g_t
        cbox #(.W(DW), .N(5), .SW(3)) u_drv (
          .src ({clb, cla, sb_out[sbi(h, c + 1)][SIDE_W][t], sb_out[sbi(h, c)][SIDE_E][t], {DW{1'b0}}}),
          .sel (seg_drv[S][t]),
          .y   (seg_val[S][t])
        );
      end
    end
  end

  // Vertical segments: ends are the switch boxes north and south of it,
  // neighbours the clusters to the left (A) and right (B).
  for (genvar v = 0; v <= NCOL; v++) begin : g_vs
    for (genvar r = 0; r < ROWS; r++) begin : g_r
      localparam int unsigned S = vseg(v, r);
      logic [DW-1:0] cla, clb;
      if (v > 0)    begin : g_a assign cla = cl_out[r * NCOL + v - 1]; end
      else          begin : g_a assign cla = '0; end
      if (v < NCOL) begin : g_b assign clb = cl_out[r * NCOL + v]; end
      else          begin : g_b assign clb = '0; end
      for (genvar t = 0; t < NTRK; t++) begin : g_t
        cbox #(.W(DW), .N(5), .SW(3)) u_drv (
          .src ({clb, cla, sb_out[sbi(r + 1, v)][SIDE_N][t], sb_out[sbi(r, v)][SIDE_S][t], {DW{1'b0}}}),
          .sel (seg_drv[S][t]),
          .y   (seg_val[S][t])
        );
      end
    end
  end

  for (genvar o = 0; o < NOUT; o++) begin : g_out
    cbox #(.W(DW), .N(NCL), .SW(OSW)) u_cb (
      .src (cl_out),
      .sel (out_sel[o]),
      .y   (dout[o])
    );
  end

  // ----------------------------------------------------------- clusters
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < NCOL; c++) begin : g_col
      localparam int unsigned I = r * NCOL + c;
      // pin sources: N tracks, E tracks, S tracks, W tracks, array inputs
      logic [NPSRC-1:0][DW-1:0] pin_src;
      assign pin_src = {din, seg_val[vseg(c, r)], seg_val[hseg(r + 1, c)],
                        seg_val[vseg(c + 1, r)], seg_val[hseg(r, c)]};
      if (col_kind(c) == K_ADDSUB) begin : g_as
        logic [DW-1:0] a, b;
        logic          first;
        cbox #(.W(DW), .N(NPSRC), .SW(PSW)) u_pa (.src(pin_src), .sel(pin_sel[I][0]), .y(a));
        cbox #(.W(DW), .N(NPSRC), .SW(PSW)) u_pb (.src(pin_src), .sel(pin_sel[I][1]), .y(b));
        cbox #(.W(1),  .N(NCTRL), .SW(CSW)) u_pc (.src(ctrl_in), .sel(ctrl_sel[I]),   .y(first));
        addsub_cluster u_cl (
          .clk   (clk),
          .rst_n (rst_n),
          .cfg   (as_cfg_t'(cl_cfg[I][$bits(as_cfg_t)-1:0])),
          .a     (a),
          .b     (b),
          .first (first),
          .y     (cl_out[I])
        );
      end else if (col_kind(c) == K_COEFF) begin : g_cm
        logic [DW-1:0] i1, i2, i3;
        cbox #(.W(DW), .N(NPSRC), .SW(PSW)) u_p1 (.src(pin_src), .sel(pin_sel[I][0]), .y(i1));
        cbox #(.W(DW), .N(NPSRC), .SW(PSW)) u_p2 (.src(pin_src), .sel(pin_sel[I][1]), .y(i2));
        cbox #(.W(DW), .N(NPSRC), .SW(PSW)) u_p3 (.src(pin_src), .sel(pin_sel[I][2]), .y(i3));
        coeff_mult_cluster u_cl (
          .clk   (clk),
          .rst_n (rst_n),
          .cfg   (cm_cfg_t'(cl_cfg[I][$bits(cm_cfg_t)-1:0])),
          .in1   (i1),
          .in2   (i2),
          .in3   (i3),
          .y     (cl_out[I])
        );
      end else begin : g_buf
        logic [DW-1:0] d;
        cbox #(.W(DW), .N(NPSRC), .SW(PSW)) u_pd (.src(pin_src), .sel(pin_sel[I][0]), .y(d));
        buffer_cluster #(.DEPTH(DEPTH)) u_cl (
          .clk   (clk),
          .rst_n (rst_n),
          .cfg   (buf_cfg_t'(cl_cfg[I][$bits(buf_cfg_t)-1:0])),
          .d     (d),
          .q     (cl_out[I])
        );
      end
    end
  end
endmodule
