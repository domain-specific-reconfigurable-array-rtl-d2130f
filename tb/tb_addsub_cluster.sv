// tb_addsub_cluster: self-checking test of the add-subtract cluster.
// Checks A+B, A-B and B-A in the 24-bit, 16+8-bit and 3x8-bit cascade
// settings, a word computed digit-serially (three 8-bit digits) and one
// computed bit-serially (24 bits), against integer arithmetic done here.
// The result must appear exactly one clock after the operands.
module tb_addsub_cluster;
  import dwt_ra_pkg::*;

  logic          clk = 0;
  logic          rst_n = 0;
  as_cfg_t       cfg;
  logic [DW-1:0] a, b, y;
  logic          first;
  int            checks = 0, failures = 0;

  addsub_cluster dut (.clk, .rst_n, .cfg, .a, .b, .first, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_op(as_op_e op, logic [31:0] x, logic [31:0] z);
    case (op)
      OP_AMB:  return x - z;
      OP_BMA:  return z - x;
      default: return x + z;
    endcase
  endfunction

  // lanes: width in bits of each lane, low lane first
  function automatic logic [DW-1:0] ref_word(as_op_e op, logic c01, logic c12,
                                             logic [DW-1:0] x, logic [DW-1:0] z);
    logic [DW-1:0] r;
    logic [31:0]   t;
    if (c01 && c12) begin
      t = ref_op(op, {8'd0, x}, {8'd0, z});
      r = t[23:0];
    end else if (c01) begin
      t = ref_op(op, {16'd0, x[15:0]}, {16'd0, z[15:0]}); r[15:0] = t[15:0];
      t = ref_op(op, {24'd0, x[23:16]}, {24'd0, z[23:16]}); r[23:16] = t[7:0];
    end else if (c12) begin
      t = ref_op(op, {24'd0, x[7:0]}, {24'd0, z[7:0]}); r[7:0] = t[7:0];
      t = ref_op(op, {16'd0, x[23:8]}, {16'd0, z[23:8]}); r[23:8] = t[15:0];
    end else begin
      for (int k = 0; k < 3; k++) begin
        t = ref_op(op, {24'd0, x[8*k +: 8]}, {24'd0, z[8*k +: 8]});
        r[8*k +: 8] = t[7:0];
      end
    end
    return r;
  endfunction

  task automatic check(logic [DW-1:0] got, logic [DW-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    cfg   = '0;
    a     = '0;
    b     = '0;
    first = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // Parallel modes: operands applied at a negedge, result checked one clock later.
    for (int n = 0; n < 300; n++) begin
      logic [DW-1:0] x, z, e;
      as_op_e        op;
      x  = DW'($urandom);
      z  = DW'($urandom);
      op = as_op_e'(n % 4);
      cfg = '{ser: SER_PARALLEL, casc12: n[3], casc01: n[2], op: op};
      if (n < 150) begin cfg.casc01 = 1; cfg.casc12 = 1; end
      a = x; b = z;
      e = ref_word(op, cfg.casc01, cfg.casc12, x, z);
      @(posedge clk); #1;
      check(y, e, $sformatf("parallel op=%0d c01=%0b c12=%0b", op, cfg.casc01, cfg.casc12));
      @(negedge clk);
    end

    // Digit-serial: three 8-bit digits per word, least significant first.
    for (int n = 0; n < 40; n++) begin
      logic [DW-1:0] x, z, e, got;
      as_op_e        op;
      x  = DW'($urandom);
      z  = DW'($urandom);
      op = as_op_e'(n % 3);
      cfg = '{ser: SER_DIGIT, casc12: 1'b1, casc01: 1'b1, op: op};
      e = ref_word(op, 1'b1, 1'b1, x, z);
      for (int d = 0; d < 3; d++) begin
        a = {16'h0, x[8*d +: 8]};
        b = {16'h0, z[8*d +: 8]};
        first = (d == 0);
        @(posedge clk); #1;
        got[8*d +: 8] = y[7:0];
        check({16'h0, y[23:8]}, '0, "digit-serial upper bits zero");
        @(negedge clk);
      end
      check(got, e, $sformatf("digit-serial op=%0d", op));
    end

    // Bit-serial: 24 bits, least significant first.
    for (int n = 0; n < 20; n++) begin
      logic [DW-1:0] x, z, e, got;
      as_op_e        op;
      x  = DW'($urandom);
      z  = DW'($urandom);
      op = as_op_e'(n % 3);
      cfg = '{ser: SER_BIT, casc12: 1'b1, casc01: 1'b1, op: op};
      e = ref_word(op, 1'b1, 1'b1, x, z);
      for (int i = 0; i < DW; i++) begin
        a = {23'h0, x[i]};
        b = {23'h0, z[i]};
        first = (i == 0);
        @(posedge clk); #1;
        got[i] = y[0];
        @(negedge clk);
      end
      check(got, e, $sformatf("bit-serial op=%0d", op));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
