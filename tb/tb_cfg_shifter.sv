// tb_cfg_shifter: self-checking test of the configurable shifter.
// For every mode and shift code, random signed inputs are compared with
// multiplication by 2**k and floor division by 2**k computed here with
// integer arithmetic (k clamped to 5).
module tb_cfg_shifter;
  import dwt_ra_pkg::*;

  sh_cfg_t       cfg;
  logic [DW-1:0] d, y;
  int            checks = 0, failures = 0;

  cfg_shifter dut (.cfg, .d, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++)
      for (int s = 0; s < 8; s++)
        for (int n = 0; n < 40; n++) begin
          int    v, k, p, q;
          logic [DW-1:0] e;
          v   = int'($signed(DW'($urandom)));
          k   = (s > 5) ? 5 : s;
          p   = 1 << k;
          cfg = '{mode: sh_mode_e'(m), amt: 3'(s)};
          d   = DW'(v);
          case (m)
            1: e = DW'(v * p);
            2: begin
                 q = v / p;
                 if (v < 0 && q * p != v) q = q - 1;  // floor
                 e = DW'(q);
               end
            default: e = '0;
          endcase
          #1;
          checks++;
          if (y !== e) begin
            failures++;
            $display("FAIL mode=%0d amt=%0d d=%0d got %h expected %h", m, s, v, y, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
