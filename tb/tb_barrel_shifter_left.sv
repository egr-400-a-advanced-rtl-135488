// tb_barrel_shifter_left: self-checking test of the left rotator.
//
// Three instances are checked against a bit-by-bit reference model
// (y[(i+n) mod W] = a[i]) that shares nothing with the staged structure of
// the design: the default 8-bit rotator exhaustively (all 256 words x 8
// amounts), a 5-bit one exhaustively (amount wraps modulo 5) and a 16-bit
// one with random words and every amount. The rotator is combinational, so
// each vector is applied and read back 1 ns later. A watchdog ends the run
// with a failure if it has not finished in time.
`timescale 1ns / 1ps
module tb_barrel_shifter_left;

  int checks   = 0;
  int failures = 0;

  // reference: rotate the low w bits of a left by n
  function automatic logic [31:0] ref_rotl(logic [31:0] a, int n, int w);
    logic [31:0] y = '0;
    for (int i = 0; i < w; i++) y[(i + n) % w] = a[i];
    return y;
  endfunction

  logic [7:0]  a8,  y8;
  logic [2:0]  n8;
  logic [4:0]  a5,  y5;
  logic [2:0]  n5;
  logic [15:0] a16, y16;
  logic [3:0]  n16;

  barrel_shifter_left                dut8  (.a(a8),  .amt(n8),  .y(y8));
  barrel_shifter_left #(.WIDTH(5))   dut5  (.a(a5),  .amt(n5),  .y(y5));
  barrel_shifter_left #(.WIDTH(16))  dut16 (.a(a16), .amt(n16), .y(y16));

  task automatic check(string tag, logic [31:0] got, logic [31:0] exp, logic [31:0] a, int n);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s a=%h amt=%0d got=%h expected=%h", tag, a, n, got, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++)
      for (int n = 0; n < 8; n++) begin
        a8 = 8'(a); n8 = 3'(n);
        #1 check("w8", 32'(y8), ref_rotl(32'(a), n, 8), 32'(a), n);
      end
    for (int a = 0; a < 32; a++)
      for (int n = 0; n < 8; n++) begin
        a5 = 5'(a); n5 = 3'(n);
        #1 check("w5", 32'(y5), ref_rotl(32'(a), n, 5), 32'(a), n);
      end
    for (int t = 0; t < 200; t++)
      for (int n = 0; n < 16; n++) begin
        a16 = 16'($urandom); n16 = 4'(n);
        #1 check("w16", 32'(y16), ref_rotl(32'(a16), n, 16), 32'(a16), n);
      end
    // the single-one pattern must land exactly n places higher
    for (int n = 0; n < 8; n++) begin
      a8 = 8'h01; n8 = 3'(n);
      #1 check("onehot", 32'(y8), 32'(1 << n), 32'h01, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_barrel_shifter_left
