// tb_cbox: self-checking test of the connection box: with 24 sources of 24
// bits, every select picks its own source and every select past the last
// source leaves the pin at zero.
module tb_cbox;
  localparam int unsigned W = 24, N = 24, SW = $clog2(N + 1);

  logic [N-1:0][W-1:0] src;
  logic [SW-1:0]       sel;
  logic [W-1:0]        y;
  int                  checks = 0, failures = 0;

  cbox #(.W(W), .N(N)) dut (.src, .sel, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 10; n++) begin
      for (int i = 0; i < N; i++) src[i] = W'($urandom);
      for (int s = 0; s < (1 << SW); s++) begin
        logic [W-1:0] e;
        sel = SW'(s);
        e   = (s < N) ? src[s] : '0;
        #1;
        checks++;
        if (y !== e) begin
          failures++;
          $display("FAIL sel=%0d got %h expected %h", s, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
