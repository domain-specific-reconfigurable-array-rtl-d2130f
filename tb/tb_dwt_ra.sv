// tb_dwt_ra: end-to-end test of the reconfigurable array at its default size.
//
// The array is configured through its configuration port only. Each mapping
// is written as a netlist (which cluster drives which net, which pins read
// it); a small router in this testbench then finds, for every net, a tree of
// channel segments on one track number through the switch boxes, and writes
// the segment drivers, switch boxes and pin connection boxes.
// The array is then used for one level of a two-dimensional wavelet
// transform of a 128x128 8-bit test image (rows first, then the columns of
// the row result; the transpose is done here, the array computes the
// one-dimensional transforms):
//   1. integer 9/7 mapping: 5 add-subs form the symmetric tap pairs, the
//      5 coefficient multipliers form the five shift-add rows, 4 add-subs and
//      one delay buffer combine them, two buffers normalize by 2**-8 and
//      2**-7. The reference filter taps are derived here from the matrices
//      C*S*L of the integer transform, not from the mapping.
//   2. reconfiguration to the 5/3 lifting mapping (predict, update with the
//      +2 rounding constant, delays), checked against the JPEG2000 reversible
//      5/3 lifting equations with symmetric extension.
//   3. the cluster modes not used by the two transforms: bit-serial and
//      digit-serial addition, 3x8-bit split add-sub, and a narrowed buffer.
// Each output is compared at a fixed latency: the number of cluster hops on
// its path (one clock per cluster). Every mechanism is counted and a
// mechanism that never happened counts as a failure. Runs in about two
// minutes of simulation.
module tb_dwt_ra;
  import dwt_ra_pkg::*;

  localparam int unsigned ROWS = 5, NTRK = 24, NCTRL = 24, NIN = 9, NOUT = 2;
  localparam int unsigned NCL = ROWS * NCOL;
  localparam int IMG = 128;

  logic                    clk = 0;
  logic                    rst_n = 0;
  logic                    cfg_we;
  logic [CFG_AW-1:0]       cfg_addr;
  logic [CFG_W-1:0]        cfg_wdata;
  logic [NIN-1:0][DW-1:0]  din;
  logic [NCTRL-1:0]        ctrl_in;
  logic [NOUT-1:0][DW-1:0] dout;

  int checks = 0, failures = 0;
  int n_mode_switch = 0, n_norm = 0, n_delay = 0, n_three_term = 0, n_const = 0;
  int n_bit_serial = 0, n_digit_serial = 0, n_split = 0, n_narrow = 0;

  dwt_ra dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .din, .ctrl_in, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ helpers
  function automatic int cl(int r, int c);
    return r * NCOL + c;
  endfunction

  function automatic int fdiv(longint v, int k);
    longint p, q;
    p = longint'(1) << k;
    q = v / p;
    if (v < 0 && q * p != v) q = q - 1;
    return int'(q);
  endfunction

  function automatic int sx(logic [DW-1:0] v);
    return int'($signed(v));
  endfunction

  task automatic cfg_write(logic [3:0] page, int idx, logic [CFG_W-1:0] data);
    @(negedge clk);
    cfg_we    = 1'b1;
    cfg_addr  = '0;
    cfg_addr[CFG_AW-1 -: 4] = page;
    cfg_addr[7:0] = 8'(idx);
    cfg_wdata = data;
    @(negedge clk);
    cfg_we    = 1'b0;
  endtask

  // ------------------------------------------------------------ nets
  // A mapping names nets 0..NNET-1: track(n, cluster) makes a cluster the
  // driver of net n, pin(c, p, n) makes pin p of cluster c a sink of it, and
  // pin(c, p, NNET + j) connects the pin straight to array input j.
  // route_all() then routes every net through the mesh and writes the
  // routing configuration.
  localparam int NNET = 24;
  int net_src [NNET];
  int net_snk_cl [NNET][$];
  int net_snk_p  [NNET][$];

  task automatic clear_nets();
    for (int n = 0; n < NNET; n++) begin
      net_src[n] = -1;
      net_snk_cl[n].delete();
      net_snk_p[n].delete();
    end
  endtask
  task automatic pin(int c, int p, int src);
    if (src >= NNET) cfg_write(A_PIN, 3 * c + p, CFG_W'(4 * NTRK + src - NNET));
    else begin
      net_snk_cl[src].push_back(c);
      net_snk_p[src].push_back(p);
    end
  endtask
  task automatic track(int n, int src);
    net_src[n] = src;
  endtask
  task automatic outp(int o, int n);
    cfg_write(A_OUT, o, CFG_W'(net_src[n]));
  endtask

  // ------------------------------------------------------------ router
  // Mesh geometry as documented in the array: segment, switch box and side
  // numbering. A net keeps one track number (disjoint switch boxes) and is
  // routed as a tree by breadth-first search from the tree built so far.
  localparam int NH   = (ROWS + 1) * NCOL;
  localparam int NSEG = NH + (NCOL + 1) * ROWS;
  localparam int NSB  = (ROWS + 1) * (NCOL + 1);
  localparam int HALF = (NNET + 1) / 2;

  int owner [NSEG][NTRK];
  int drv   [NSEG][NTRK];
  int sbsel [NSB][4][NTRK];
  int n_sbox_hop = 0;
  typedef struct { int addr; int val; } pend_t;
  pend_t pend_pin [$];


  function automatic int hseg(int h, int c); return h * NCOL + c; endfunction
  function automatic int vseg(int v, int r); return NH + v * ROWS + r; endfunction
  function automatic int sbi(int h, int v);  return h * (NCOL + 1) + v; endfunction

  function automatic int end_sb(int s, int e);
    if (s < NH) return (e == 0) ? sbi(s / NCOL, s % NCOL) : sbi(s / NCOL, s % NCOL + 1);
    return (e == 0) ? sbi((s - NH) % ROWS, (s - NH) / ROWS) : sbi((s - NH) % ROWS + 1, (s - NH) / ROWS);
  endfunction
  function automatic int end_side(int s, int e);
    if (s < NH) return (e == 0) ? SIDE_E : SIDE_W;
    return (e == 0) ? SIDE_S : SIDE_N;
  endfunction
  function automatic int sb_seg(int b, int side);
    int h, v;
    h = b / (NCOL + 1);
    v = b % (NCOL + 1);
    case (side)
      SIDE_N:  return (h > 0) ? vseg(v, h - 1) : -1;
      SIDE_E:  return (v < NCOL) ? hseg(h, v) : -1;
      SIDE_S:  return (h < ROWS) ? vseg(v, h) : -1;
      default: return (v > 0) ? hseg(h, v - 1) : -1;
    endcase
  endfunction
  function automatic int cl_seg(int c, int side);
    int r, k;
    r = c / NCOL;
    k = c % NCOL;
    case (side)
      SIDE_N:  return hseg(r, k);
      SIDE_E:  return vseg(k + 1, r);
      SIDE_S:  return hseg(r + 1, k);
      default: return vseg(k, r);
    endcase
  endfunction

  function automatic void unroute(int s, int k);
    drv[s][k] = 0;
    for (int e = 0; e < 2; e++) sbsel[end_sb(s, e)][end_side(s, e)][k] = 0;
  endfunction

  // Returns 1 when every sink of net n was reached on one track number.
  function automatic bit route_net(int n);
    for (int kk = 0; kk < NTRK; kk++) begin
      int k;
      bit ok;
      bit in_tree [NSEG];
      int tree [$];
      int psel [$];
      k  = (kk + 5 * n) % NTRK;
      ok = 1'b1;
      for (int s = 0; s < NSEG; s++) in_tree[s] = 1'b0;
      for (int i = 0; i < net_snk_cl[n].size() && ok; i++) begin
        int d, tgt, tside;
        int prev [NSEG];
        int psb [NSEG];
        int pin_side [NSEG];
        int pout [NSEG];
        int q [$];
        d = net_snk_cl[n][i];
        for (int s = 0; s < NSEG; s++) prev[s] = -2;   // -2 unvisited
        if (tree.size() == 0) begin
          for (int sd = 0; sd < 4; sd++) begin
            int s0;
            s0 = cl_seg(net_src[n], sd);
            if (owner[s0][k] < 0 && prev[s0] == -2) begin
              prev[s0] = -1;                              // -1 driven by the source cluster
              pout[s0] = sd;
              q.push_back(s0);
            end
          end
        end else
          foreach (tree[j]) begin prev[tree[j]] = -3; q.push_back(tree[j]); end  // -3 in tree
        while (q.size() > 0) begin
          int s;
          s = q.pop_front();
          for (int e = 0; e < 2; e++) begin
            int b, sd;
            b  = end_sb(s, e);
            sd = end_side(s, e);
            for (int o = 0; o < 4; o++) begin
              int s2;
              if (o == sd) continue;
              s2 = sb_seg(b, o);
              if (s2 < 0 || prev[s2] != -2 || owner[s2][k] >= 0) continue;
              prev[s2] = s; psb[s2] = b; pin_side[s2] = sd; pout[s2] = o;
              q.push_back(s2);
            end
          end
        end
        tgt = -1;
        tside = 0;
        for (int sd = 0; sd < 4 && tgt < 0; sd++)
          if (prev[cl_seg(d, sd)] != -2) begin tgt = cl_seg(d, sd); tside = sd; end
        if (tgt < 0) begin ok = 1'b0; break; end
        psel.push_back(tside * NTRK + k);
        // walk back to the tree or the source, setting drivers and switches
        begin
          int cur;
          cur = tgt;
          while (prev[cur] != -3) begin
            tree.push_back(cur);
            in_tree[cur] = 1'b1;
            if (prev[cur] == -1) begin
              drv[cur][k] = (pout[cur] == SIDE_N || pout[cur] == SIDE_W) ? int'(DRV_CLB) : int'(DRV_CLA);
              break;
            end
            drv[cur][k] = (pout[cur] == SIDE_E || pout[cur] == SIDE_S) ? int'(DRV_END0) : int'(DRV_END1);
            sbsel[psb[cur]][pout[cur]][k] = (pin_side[cur] - pout[cur] + 4) % 4;
            cur = prev[cur];
          end
        end
        // later searches start from the whole tree
      end
      if (ok) begin
        foreach (tree[j]) begin
          owner[tree[j]][k] = n;
          if (drv[tree[j]][k] == int'(DRV_END0) || drv[tree[j]][k] == int'(DRV_END1)) n_sbox_hop++;
        end
        for (int i = 0; i < net_snk_cl[n].size(); i++)
          pend_pin.push_back('{3 * net_snk_cl[n][i] + net_snk_p[n][i], psel[i]});
        return 1'b1;
      end
      foreach (tree[j]) unroute(tree[j], k);
    end
    return 1'b0;
  endfunction

  task automatic route_all();
    for (int s = 0; s < NSEG; s++)
      for (int k = 0; k < NTRK; k++) begin owner[s][k] = -1; drv[s][k] = 0; end
    for (int b = 0; b < NSB; b++)
      for (int sd = 0; sd < 4; sd++)
        for (int k = 0; k < NTRK; k++) sbsel[b][sd][k] = 0;
    pend_pin.delete();
    for (int n = 0; n < NNET; n++)
      if (net_src[n] >= 0 && net_snk_cl[n].size() > 0) begin
        checks++;
        if (!route_net(n)) begin
          failures++;
          $display("FAIL net %0d could not be routed", n);
        end
      end
    foreach (pend_pin[i]) cfg_write(A_PIN, pend_pin[i].addr, CFG_W'(pend_pin[i].val));
    for (int s = 0; s < NSEG; s++)
      for (int hf = 0; hf < 2; hf++) begin
        logic [CFG_W-1:0] w;
        w = '0;
        for (int t = 0; t < HALF; t++)
          if (hf * HALF + t < int'(NTRK)) w[3*t +: 3] = 3'(drv[s][hf * HALF + t]);
        cfg_write(A_SEG, 2 * s + hf, w);
      end
    for (int b = 0; b < NSB; b++)
      for (int sd = 0; sd < 4; sd++) begin
        logic [CFG_W-1:0] w;
        w = '0;
        for (int k = 0; k < int'(NTRK); k++) w[2*k +: 2] = 2'(sbsel[b][sd][k]);
        cfg_write(A_SBOX, 4 * b + sd, w);
      end
  endtask

  task automatic as_cl(int c, as_op_e op, ser_mode_e ser = SER_PARALLEL,
                       logic c01 = 1'b1, logic c12 = 1'b1);
    as_cfg_t a;
    a = '{ser: ser, casc12: c12, casc01: c01, op: op};
    cfg_write(A_CLUSTER, c, CFG_W'(a));
  endtask
  task automatic buf_cl(int c, int depth, int norm, int nib = 6);
    buf_cfg_t b;
    b = '{depth: 3'(depth), nibbles: 3'(nib), norm: 4'(norm)};
    cfg_write(A_CLUSTER, c, CFG_W'(b));
  endtask

  // One input term of a coefficient multiplier: coefficient 0, +-2**k
  // (k <= 5) or 64 (= 32 + 32 on the shifter pair).
  function automatic void cm_term(ref cm_cfg_t c, input int i, input int coef);
    int m, k;
    c.op[i] = OP_ADD;
    if (coef == 0) begin
      c.sh[2*i] = '{mode: SH_OFF, amt: 3'd0};
      c.sh[2*i+1] = '{mode: SH_OFF, amt: 3'd0};
      return;
    end
    if (coef == 64) begin
      c.sh[2*i] = '{mode: SH_MUL, amt: 3'd5};
      c.sh[2*i+1] = '{mode: SH_MUL, amt: 3'd5};
      return;
    end
    m = (coef < 0) ? -coef : coef;
    k = 0;
    while ((1 << k) < m) k++;
    c.sh[2*i] = '{mode: SH_MUL, amt: 3'(k)};
    c.sh[2*i+1] = '{mode: SH_OFF, amt: 3'd0};
    if (coef < 0) c.op[i] = OP_BMA;   // 0 - (x << k)
  endfunction

  // Cluster computing c1*in1 + c2*in2 + c3*in3 (all three summed by add-sub 4).
  task automatic cm_cl(int cidx, int c1, int c2, int c3);
    cm_cfg_t c;
    c = '0;
    cm_term(c, 0, c1);
    cm_term(c, 1, c2);
    cm_term(c, 2, c3);
    c.op[3] = OP_ADD;
    c.op[4] = OP_ADD;
    c.as4_from_as3 = 1'b1;
    c.mux_sel = 3'd4;
    cfg_write(A_CLUSTER, cidx, CFG_W'(c));
  endtask

  // Cluster dividing in1 by 2**k.
  task automatic cm_div(int cidx, int k);
    cm_cfg_t c;
    c = '0;
    c.sh[0] = '{mode: SH_DIV, amt: 3'(k)};
    c.op[0] = OP_ADD;
    c.mux_sel = 3'd0;
    cfg_write(A_CLUSTER, cidx, CFG_W'(c));
  endtask

  // ------------------------------------------------------------ streaming
  // Applies the input windows, one per clock (the last one is held while the
  // pipeline drains), and records both outputs after
  // every clock edge; out_q[o][t] is the value after edge t (edge 0 follows
  // the first window).
  int win [$][NIN];
  int out_q [NOUT][$];

  task automatic stream(int extra);
    for (int o = 0; o < int'(NOUT); o++) out_q[o].delete();
    for (int t = 0; t < win.size() + extra; t++) begin
      for (int j = 0; j < int'(NIN); j++)
        din[j] = DW'(win[(t < win.size()) ? t : win.size() - 1][j]);
      @(posedge clk); #1;
      for (int o = 0; o < int'(NOUT); o++) out_q[o].push_back(sx(dout[o]));
      @(negedge clk);
    end
  endtask

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ 9/7 integer
  // Filter taps from A = N * C * S * L * I^T. S rows are s4, s3, s2, s1, s0;
  // L pairs I[j] with I[8-j] and passes I[4] alone.
  int S [5][5] = '{'{ 0, -4,   0,  4, 16},
                   '{ 0,  0,   0, 64, 128},
                   '{ 8,  0, -16,  0,  8},
                   '{-1,  0,  -4,  0,  2},
                   '{ 0, -8,  -8,  8,  0}};
  int C [2][5] = '{'{1, 1, 1, 1, 0},
                   '{1, 1, 0, 0, 1}};
  int NSH [2] = '{8, 7};
  int h [2][9];

  function automatic void make_taps();
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 9; j++) begin
        int r;
        r = (j <= 4) ? j : 8 - j;
        h[i][j] = 0;
        for (int k = 0; k < 5; k++) h[i][j] += C[i][k] * S[k][r];
      end
  endfunction

  function automatic int ext(const ref int x[], input int i);
    int n;
    n = x.size();
    while (i < 0 || i > n - 1) begin
      if (i < 0) i = -i;
      if (i > n - 1) i = 2 * (n - 1) - i;
    end
    return x[i];
  endfunction

  function automatic void ref97(const ref int x[], ref int y[]);
    int n;
    n = x.size();
    y = new[n];
    for (int k = 0; k < n; k++) begin
      longint acc;
      int     ch;
      ch = k % 2;
      acc = 0;
      for (int j = 0; j < 9; j++) acc += longint'(h[ch][j]) * ext(x, k - 4 + j);
      y[k / 2 + ch * (n / 2)] = fdiv(acc, NSH[ch]);
    end
  endfunction

  task automatic map97();
    clear_nets();
    // tap pairs p0..p3 = I[r] + I[8-r], p4' = 2 * I[4]  -> nets 0..4
    for (int r = 0; r < 5; r++) begin
      as_cl(cl(r, 0), OP_ADD);
      pin(cl(r, 0), 0, NNET + r);
      pin(cl(r, 0), 1, NNET + 8 - r);
      track(r, cl(r, 0));
    end
    // rows of S on the five coefficient multipliers -> nets 5..9
    // (p4' = 2*p4, so p4 coefficients are halved)
    cm_cl(cl(0, 1), -4,  4,  8); pin(cl(0, 1), 0, 1); pin(cl(0, 1), 1, 3); pin(cl(0, 1), 2, 4); // s4
    cm_cl(cl(1, 1), 64, 64,  0); pin(cl(1, 1), 0, 3); pin(cl(1, 1), 1, 4); pin(cl(1, 1), 2, 4); // s3
    cm_cl(cl(2, 1),  8,-16,  4); pin(cl(2, 1), 0, 0); pin(cl(2, 1), 1, 2); pin(cl(2, 1), 2, 4); // s2
    cm_cl(cl(3, 1), -1, -4,  1); pin(cl(3, 1), 0, 0); pin(cl(3, 1), 1, 2); pin(cl(3, 1), 2, 4); // s1
    cm_cl(cl(4, 1), -8, -8,  8); pin(cl(4, 1), 0, 1); pin(cl(4, 1), 1, 2); pin(cl(4, 1), 2, 3); // s0
    for (int r = 0; r < 5; r++) track(5 + r, cl(r, 1));
    // s4 + s3 -> net 10, s2 + s1 -> net 11, s0 delayed one clock -> net 12
    as_cl(cl(0, 2), OP_ADD); pin(cl(0, 2), 0, 5); pin(cl(0, 2), 1, 6); track(10, cl(0, 2));
    as_cl(cl(1, 2), OP_ADD); pin(cl(1, 2), 0, 7); pin(cl(1, 2), 1, 8); track(11, cl(1, 2));
    buf_cl(cl(0, 4), 1, 0);  pin(cl(0, 4), 0, 9); track(12, cl(0, 4));
    // a0 = s4+s3+s2+s1 -> net 13, a1 = s4+s3+s0 -> net 14
    as_cl(cl(0, 3), OP_ADD); pin(cl(0, 3), 0, 10); pin(cl(0, 3), 1, 11); track(13, cl(0, 3));
    as_cl(cl(1, 3), OP_ADD); pin(cl(1, 3), 0, 10); pin(cl(1, 3), 1, 12); track(14, cl(1, 3));
    // normalizing buffers 2**-8 and 2**-7 -> net 15, net 16
    buf_cl(cl(0, 6), 1, 8); pin(cl(0, 6), 0, 13); track(15, cl(0, 6));
    buf_cl(cl(1, 6), 1, 7); pin(cl(1, 6), 0, 14); track(16, cl(1, 6));
    route_all();
    outp(0, 15);
    outp(1, 16);
  endtask

  localparam int LAT97 = 5;   // cluster hops: pair, multiplier, add, add, normalize

  task automatic run97_line(const ref int x[], ref int y[]);
    int n;
    n = x.size();
    win.delete();
    for (int k = 0; k < n; k++) begin
      int w [NIN];
      for (int j = 0; j < 9; j++) w[j] = ext(x, k - 4 + j);
      win.push_back(w);
    end
    stream(LAT97);
    y = new[n];
    for (int k = 0; k < n; k++) begin
      int ch;
      ch = k % 2;
      y[k / 2 + ch * (n / 2)] = out_q[ch][k + LAT97 - 1];
    end
    n_norm += n;
    n_delay += n;
    n_three_term += n;
  endtask

  // ------------------------------------------------------------ 5/3 lifting
  function automatic void ref53(const ref int x[], ref int y[]);
    int n, m;
    int d [];
    n = x.size();
    m = n / 2;
    d = new[m + 1];
    y = new[n];
    // d[k+1] = Y(2k+1), d[0] = Y(-1)
    for (int k = -1; k < m; k++)
      d[k + 1] = ext(x, 2 * k + 1) - fdiv(ext(x, 2 * k) + ext(x, 2 * k + 2), 1);
    for (int k = 0; k < m; k++) begin
      y[k]     = x[2 * k] + fdiv(d[k] + d[k + 1] + 2, 2);
      y[m + k] = d[k + 1];
    end
  endfunction

  task automatic map53();
    clear_nets();
    // predict: P = X(2n) + X(2n+2) -> net 0; P/2 -> net 1; X(2n+1) delayed 2 -> net 2
    as_cl(cl(0, 0), OP_ADD); pin(cl(0, 0), 0, NNET + 0); pin(cl(0, 0), 1, NNET + 2); track(0, cl(0, 0));
    cm_div(cl(0, 1), 1);     pin(cl(0, 1), 0, 0);        track(1, cl(0, 1));
    buf_cl(cl(0, 4), 2, 0);  pin(cl(0, 4), 0, NNET + 1); track(2, cl(0, 4));
    // Y(2n+1) = X(2n+1) - P/2 -> net 3; Y(2n-1) -> net 4
    as_cl(cl(0, 2), OP_AMB); pin(cl(0, 2), 0, 2); pin(cl(0, 2), 1, 1); track(3, cl(0, 2));
    buf_cl(cl(1, 4), 1, 0);  pin(cl(1, 4), 0, 3);        track(4, cl(1, 4));
    // update: (Y(2n-1) + Y(2n+1) + 2) / 4 -> net 8; the constant 2 comes in on din[8]
    as_cl(cl(0, 3), OP_ADD); pin(cl(0, 3), 0, 3); pin(cl(0, 3), 1, 4); track(5, cl(0, 3));
    as_cl(cl(0, 5), OP_ADD); pin(cl(0, 5), 0, 5); pin(cl(0, 5), 1, NNET + 8); track(7, cl(0, 5));
    cm_div(cl(1, 1), 2);     pin(cl(1, 1), 0, 7);        track(8, cl(1, 1));
    // X(2n) delayed 4 + 2 -> net 10; Y(2n) = X(2n) + update -> net 11
    buf_cl(cl(2, 4), 4, 0);  pin(cl(2, 4), 0, NNET + 0); track(9, cl(2, 4));
    buf_cl(cl(3, 4), 2, 0);  pin(cl(3, 4), 0, 9);        track(10, cl(3, 4));
    as_cl(cl(1, 0), OP_ADD); pin(cl(1, 0), 0, 10); pin(cl(1, 0), 1, 8); track(11, cl(1, 0));
    route_all();
    outp(0, 11);
    outp(1, 3);
  endtask

  localparam int LAT53_H = 3;  // add, divide, subtract
  localparam int LAT53_L = 7;  // ... add, add constant, divide, add

  task automatic run53_line(const ref int x[], ref int y[]);
    int n, m;
    n = x.size();
    m = n / 2;
    win.delete();
    // window j carries X(2n), X(2n+1), X(2n+2) for n = j - 1
    for (int j = 0; j <= m; j++) begin
      int w [NIN];
      for (int i = 0; i < int'(NIN); i++) w[i] = 0;
      w[0] = ext(x, 2 * (j - 1));
      w[1] = ext(x, 2 * (j - 1) + 1);
      w[2] = ext(x, 2 * (j - 1) + 2);
      w[8] = 2;
      win.push_back(w);
    end
    stream(LAT53_L);
    y = new[n];
    for (int k = 0; k < m; k++) begin
      y[k]     = out_q[0][(k + 1) + LAT53_L - 1];
      y[m + k] = out_q[1][(k + 1) + LAT53_H - 1];
    end
    n_delay += m;
    n_const += m;
  endtask

  // ------------------------------------------------------------ 2-D frame
  int img [IMG][IMG];

  task automatic frame(bit is97);
    int mid [IMG][IMG];
    int ref_mid [IMG][IMG];
    int x [], y [], yr [];
    x = new[IMG];
    // rows
    for (int r = 0; r < IMG; r++) begin
      for (int c = 0; c < IMG; c++) x[c] = img[r][c];
      if (is97) begin run97_line(x, y); ref97(x, yr); end
      else      begin run53_line(x, y); ref53(x, yr); end
      for (int c = 0; c < IMG; c++) begin
        mid[r][c] = y[c];
        ref_mid[r][c] = yr[c];
        check(y[c], yr[c], $sformatf("%s row %0d col %0d", is97 ? "9/7" : "5/3", r, c));
      end
    end
    // columns of the row result
    for (int c = 0; c < IMG; c++) begin
      for (int r = 0; r < IMG; r++) x[r] = mid[r][c];
      if (is97) run97_line(x, y);
      else      run53_line(x, y);
      for (int r = 0; r < IMG; r++) x[r] = ref_mid[r][c];
      if (is97) ref97(x, yr);
      else      ref53(x, yr);
      for (int r = 0; r < IMG; r++)
        check(y[r], yr[r], $sformatf("%s col %0d row %0d", is97 ? "9/7" : "5/3", c, r));
    end
  endtask

  // ------------------------------------------------------------ other modes
  task automatic serial_and_split();
    logic [DW-1:0] xa, xb, got, e;
    // bit-serial A - B on cluster (2,0), first marker on control track 3
    as_cl(cl(2, 0), OP_AMB, SER_BIT);
    pin(cl(2, 0), 0, NNET + 0); pin(cl(2, 0), 1, NNET + 1);
    cfg_write(A_CTRL, cl(2, 0), CFG_W'(3));
    track(20, cl(2, 0));
    outp(0, 20);
    for (int n = 0; n < 4; n++) begin
      xa = DW'($urandom); xb = DW'($urandom); e = xa - xb;
      for (int i = 0; i < int'(DW); i++) begin
        din[0] = DW'(xa[i]); din[1] = DW'(xb[i]);
        ctrl_in = '0; ctrl_in[3] = (i == 0);
        @(posedge clk); #1;
        got[i] = dout[0][0];
        @(negedge clk);
      end
      check(int'(got), int'(e), "bit-serial A-B");
      n_bit_serial++;
    end
    // digit-serial A + B on cluster (3,0), first marker on control track 5
    as_cl(cl(3, 0), OP_ADD, SER_DIGIT);
    pin(cl(3, 0), 0, NNET + 0); pin(cl(3, 0), 1, NNET + 1);
    cfg_write(A_CTRL, cl(3, 0), CFG_W'(5));
    track(20, cl(3, 0));
    outp(0, 20);
    for (int n = 0; n < 4; n++) begin
      xa = DW'($urandom); xb = DW'($urandom); e = xa + xb;
      for (int d = 0; d < 3; d++) begin
        din[0] = DW'(xa[8*d +: 8]); din[1] = DW'(xb[8*d +: 8]);
        ctrl_in = '0; ctrl_in[5] = (d == 0);
        @(posedge clk); #1;
        got[8*d +: 8] = dout[0][7:0];
        @(negedge clk);
      end
      check(int'(got), int'(e), "digit-serial A+B");
      n_digit_serial++;
    end
    // three separate 8-bit subtractions B - A on cluster (4,0)
    as_cl(cl(4, 0), OP_BMA, SER_PARALLEL, 1'b0, 1'b0);
    pin(cl(4, 0), 0, NNET + 0); pin(cl(4, 0), 1, NNET + 1);
    track(20, cl(4, 0));
    outp(0, 20);
    for (int n = 0; n < 4; n++) begin
      xa = DW'($urandom); xb = DW'($urandom);
      for (int k = 0; k < 3; k++) e[8*k +: 8] = xb[8*k +: 8] - xa[8*k +: 8];
      din[0] = xa; din[1] = xb;
      @(posedge clk); #1;
      check(int'(dout[0]), int'(e), "3x8-bit B-A");
      n_split++;
      @(negedge clk);
    end
    // 8-bit buffer (4,4): keeps the low byte, sign-extended
    buf_cl(cl(4, 4), 1, 0, 2);
    pin(cl(4, 4), 0, NNET + 0);
    track(21, cl(4, 4));
    outp(1, 21);
    for (int n = 0; n < 4; n++) begin
      xa = DW'($urandom);
      din[0] = xa;
      @(posedge clk); #1;
      check(sx(dout[1]), int'($signed(xa[7:0])), "8-bit buffer");
      n_narrow++;
      @(negedge clk);
    end
  endtask

  // ------------------------------------------------------------ main
  task automatic need(int count, string what);
    $display("  %-28s %0d", what, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    cfg_we = 0; cfg_addr = '0; cfg_wdata = '0; din = '0; ctrl_in = '0;
    make_taps();
    // Synthetic 8-bit test image: smooth gradient plus a disc plus noise.
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++) begin
        int v;
        v = (r + 2 * c) % 200 + int'($urandom_range(0, 40));
        if ((r - 64) * (r - 64) + (c - 60) * (c - 60) < 900) v = 255 - v / 2;
        img[r][c] = (v > 255) ? 255 : v;
      end
    repeat (3) @(negedge clk);
    rst_n = 1;

    map97();
    $display("9/7 mapping routed, %0d switch box hops so far", n_sbox_hop);
    frame(1'b1);
    $display("9/7 integer frame done, checks=%0d failures=%0d", checks, failures);

    map53();
    n_mode_switch++;
    frame(1'b0);
    $display("5/3 lifting frame done, checks=%0d failures=%0d", checks, failures);

    serial_and_split();

    $display("mechanisms exercised:");
    need(n_mode_switch,  "reconfiguration 9/7 -> 5/3");
    need(n_three_term,   "three-term coefficient sum");
    need(n_norm,         "normalizing buffer");
    need(n_delay,        "delay buffer");
    need(n_const,        "constant from an array input");
    need(n_sbox_hop,     "switch box hops");
    need(n_bit_serial,   "bit-serial add-sub");
    need(n_digit_serial, "digit-serial add-sub");
    need(n_split,        "3x8-bit split add-sub");
    need(n_narrow,       "narrow buffer width");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
