// tb_buffer_cluster: self-checking test of the buffer cluster.
// A random word stream passes through the cluster under changing settings of
// width (4..24 bits), normalizing shift (0..15) and delay (1..4). The
// expected output is worked out here: the input's low 4*nibbles bits read as
// a signed number, divided by 2**norm with rounding towards minus infinity,
// seen `depth` clocks after it was applied.
module tb_buffer_cluster;
  import dwt_ra_pkg::*;

  localparam int unsigned DEPTH = 4;

  logic          clk = 0;
  logic          rst_n = 0;
  buf_cfg_t      cfg;
  logic [DW-1:0] d, q;
  int            checks = 0, failures = 0;
  logic [DW-1:0] hist [$];

  buffer_cluster #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .cfg, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] model(logic [DW-1:0] x, int nib, int norm);
    longint v, p, r;
    int     w;
    w = 4 * nib;
    v = longint'(x) & ((longint'(1) << w) - 1);
    if (v >= (longint'(1) << (w - 1))) v = v - (longint'(1) << w);
    p = longint'(1) << norm;
    r = v / p;
    if (v < 0 && r * p != v) r = r - 1;
    return DW'(r);
  endfunction

  initial begin
    int t;
    cfg   = '{depth: 3'd1, nibbles: 3'd6, norm: 4'd0};
    d     = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    t = 0;
    for (int seg = 0; seg < 60; seg++) begin
      int nib, norm, dep;
      nib  = 1 + (seg % 6);
      norm = (seg * 7) % 16;
      dep  = 1 + (seg % int'(DEPTH));
      for (int n = 0; n < 12; n++) begin
        cfg = '{depth: 3'(dep), nibbles: 3'(nib), norm: 4'(norm)};
        d   = DW'($urandom);
        hist.push_back(model(d, nib, norm));
        @(posedge clk); #1;
        // Only the words pushed under the current setting are compared.
        if (n >= dep - 1) begin
          checks++;
          if (q !== hist[t - dep + 1]) begin
            failures++;
            $display("FAIL seg=%0d n=%0d got %h expected %h", seg, n, q, hist[t - dep + 1]);
          end
        end
        t++;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
