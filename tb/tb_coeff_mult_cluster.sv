// tb_coeff_mult_cluster: self-checking test of the coefficient multiplier.
// Random shifter, add-sub, switch and multiplexer settings are applied with
// random inputs; the expected result is computed here as the integer sum of
// the scaled inputs that the chosen path forms, reduced to 24 bits. Also
// checks two fixed coefficient settings used by the integer 9/7 mapping
// (-4*x1 + 4*x2 + 8*x3, and 64*x1 + 64*x2) and the one-clock latency.
module tb_coeff_mult_cluster;
  import dwt_ra_pkg::*;

  logic          clk = 0;
  logic          rst_n = 0;
  cm_cfg_t       cfg;
  logic [DW-1:0] in1, in2, in3, y;
  int            checks = 0, failures = 0;

  coeff_mult_cluster dut (.clk, .rst_n, .cfg, .in1, .in2, .in3, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint fdiv(longint v, int k);
    longint p, r;
    p = longint'(1) << k;
    r = v / p;
    if (v < 0 && r * p != v) r = r - 1;
    return r;
  endfunction

  function automatic longint sh(sh_cfg_t c, longint v);
    int k;
    k = (c.amt > 5) ? 5 : int'(c.amt);
    case (c.mode)
      SH_MUL:  return v * (longint'(1) << k);
      SH_DIV:  return fdiv(v, k);
      default: return 0;
    endcase
  endfunction

  function automatic longint aop(as_op_e op, longint x, longint z);
    case (op)
      OP_AMB:  return x - z;
      OP_BMA:  return z - x;
      default: return x + z;
    endcase
  endfunction

  // Values are kept small enough that no intermediate exceeds 24 bits, so
  // the plain integer result reduced to 24 bits is exact.
  function automatic logic [DW-1:0] model(cm_cfg_t c, longint x1, longint x2, longint x3);
    longint s [6];
    longint r [5];
    s[0] = sh(c.sh[0], x1); s[1] = sh(c.sh[1], x1);
    s[2] = sh(c.sh[2], x2); s[3] = sh(c.sh[3], x2);
    s[4] = sh(c.sh[4], x3); s[5] = sh(c.sh[5], x3);
    r[0] = aop(c.op[0], s[0], s[1]);
    r[1] = aop(c.op[1], s[2], s[3]);
    r[2] = aop(c.op[2], s[4], s[5]);
    r[3] = aop(c.op[3], r[0], r[1]);
    r[4] = aop(c.op[4], c.as4_from_as3 ? r[3] : r[1], r[2]);
    return (c.mux_sel <= 4) ? DW'(r[c.mux_sel]) : '0;
  endfunction

  task automatic apply_check(cm_cfg_t c, int x1, int x2, int x3, string what);
    logic [DW-1:0] e;
    cfg = c;
    in1 = DW'(x1); in2 = DW'(x2); in3 = DW'(x3);
    e = model(c, x1, x2, x3);
    @(posedge clk); #1;
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, y, e);
    end
    @(negedge clk);
  endtask

  function automatic int rsmall();
    return int'($urandom_range(0, 8000)) - 4000;
  endfunction

  initial begin
    cm_cfg_t c;
    cfg = '0; in1 = '0; in2 = '0; in3 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    for (int n = 0; n < 600; n++) begin
      c = cm_cfg_t'({$urandom, $urandom});
      apply_check(c, rsmall(), rsmall(), rsmall(), "random setting");
    end

    // -4*x1 + 4*x2 + 8*x3: each pair gives one term, add-sub 4 sums all three.
    c = '0;
    c.sh[0] = '{mode: SH_MUL, amt: 3'd2};  c.sh[1] = '{mode: SH_OFF, amt: 3'd0};
    c.sh[2] = '{mode: SH_MUL, amt: 3'd2};  c.sh[3] = '{mode: SH_OFF, amt: 3'd0};
    c.sh[4] = '{mode: SH_MUL, amt: 3'd3};  c.sh[5] = '{mode: SH_OFF, amt: 3'd0};
    c.op[0] = OP_BMA; c.op[1] = OP_ADD; c.op[2] = OP_ADD; c.op[3] = OP_ADD; c.op[4] = OP_ADD;
    c.as4_from_as3 = 1'b1;
    c.mux_sel = 3'd4;
    for (int n = 0; n < 50; n++) begin
      int x1, x2, x3;
      logic [DW-1:0] e;
      x1 = rsmall(); x2 = rsmall(); x3 = rsmall();
      e = DW'(-4 * x1 + 4 * x2 + 8 * x3);
      cfg = c; in1 = DW'(x1); in2 = DW'(x2); in3 = DW'(x3);
      @(posedge clk); #1;
      checks++;
      if (y !== e) begin failures++; $display("FAIL 3-term: got %h expected %h", y, e); end
      @(negedge clk);
    end

    // 64*x1 + 64*x2 using shifter pairs 32+32.
    c = '0;
    for (int i = 0; i < 4; i++) c.sh[i] = '{mode: SH_MUL, amt: 3'd5};
    c.mux_sel = 3'd3;
    for (int n = 0; n < 50; n++) begin
      int x1, x2;
      logic [DW-1:0] e;
      x1 = rsmall(); x2 = rsmall();
      e = DW'(64 * x1 + 64 * x2);
      cfg = c; in1 = DW'(x1); in2 = DW'(x2); in3 = DW'($urandom);
      @(posedge clk); #1;
      checks++;
      if (y !== e) begin failures++; $display("FAIL 64-term: got %h expected %h", y, e); end
      @(negedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
