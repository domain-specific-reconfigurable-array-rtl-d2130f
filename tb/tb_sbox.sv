// tb_sbox: self-checking test of the switch box. Every side and track is
// tried with every select code on random data: code 0 must give zero and
// codes 1..3 the same track of the side 1..3 places further round.
module tb_sbox;
  localparam int unsigned W = 24, NT = 24;

  logic [3:0][NT-1:0][W-1:0] side_in, side_out;
  logic [3:0][NT-1:0][1:0]   sel;
  int                        checks = 0, failures = 0;

  sbox #(.W(W), .NT(NT)) dut (.side_in, .sel, .side_out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20; n++) begin
      for (int s = 0; s < 4; s++)
        for (int t = 0; t < int'(NT); t++) begin
          side_in[s][t] = W'($urandom);
          sel[s][t]     = 2'($urandom);
        end
      #1;
      for (int s = 0; s < 4; s++)
        for (int t = 0; t < int'(NT); t++) begin
          logic [W-1:0] e;
          e = (sel[s][t] == 0) ? '0 : side_in[(s + int'(sel[s][t])) % 4][t];
          checks++;
          if (side_out[s][t] !== e) begin
            failures++;
            $display("FAIL side %0d track %0d sel %0d: got %h expected %h",
                     s, t, sel[s][t], side_out[s][t], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
