// tb_mux2: self-checking test of the 2-to-1 multiplexer.
//
// Drives random data on both inputs with each value of sel, plus the
// corner patterns all-zeros/all-ones, and checks that y equals d1 when sel
// is 1 and d0 when sel is 0. Both the default 8-bit instance and a 3-bit
// one are tested. A watchdog ends the run with a failure if it stalls.
`timescale 1ns / 1ps
module tb_mux2;

  int checks   = 0;
  int failures = 0;

  logic [7:0] d0, d1, y;
  logic       sel;
  logic [2:0] e0, e1, ey;
  logic       esel;

  mux2             dut  (.d0(d0), .d1(d1), .sel(sel),  .y(y));
  mux2 #(.WIDTH(3)) dut3 (.d0(e0), .d1(e1), .sel(esel), .y(ey));

  task automatic apply(logic [7:0] a0, logic [7:0] a1, logic s);
    d0 = a0; d1 = a1; sel = s;
    e0 = a0[2:0]; e1 = a1[2:0]; esel = s;
    #1;
    checks += 2;
    if (y !== (s ? a1 : a0)) begin
      failures++;
      $display("FAIL w8 d0=%h d1=%h sel=%b y=%h", a0, a1, s, y);
    end
    if (ey !== (s ? a1[2:0] : a0[2:0])) begin
      failures++;
      $display("FAIL w3 d0=%h d1=%h sel=%b y=%h", a0[2:0], a1[2:0], s, ey);
    end
  endtask

  initial begin
    apply(8'h00, 8'hFF, 1'b0);
    apply(8'h00, 8'hFF, 1'b1);
    apply(8'hFF, 8'h00, 1'b0);
    apply(8'hFF, 8'h00, 1'b1);
    for (int t = 0; t < 500; t++)
      apply(8'($urandom), 8'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_mux2
