// tb_word_mux: self-checking test of the N:1 word multiplexer.
//
// Uses N = 5 (not a power of two) so that both the normal selects 0..4 and
// the out-of-range selects 5..7, which must give zero, are exercised. Each
// round loads distinct random words and tries every select value.
module tb_word_mux;
  localparam int unsigned N = 5;
  localparam int unsigned W = 16;
  logic [W-1:0] d [N];
  logic [2:0]   sel;
  logic [W-1:0] y;
  int checks = 0, failures = 0;

  word_mux #(.N(N), .WIDTH(W)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    for (int r = 0; r < 100; r++) begin
      for (int i = 0; i < int'(N); i++) d[i] = W'($urandom) ^ W'(i << 12);
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s);
        #1;
        exp = (s < int'(N)) ? d[s] : '0;
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL sel=%0d y=%h exp=%h", s, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
