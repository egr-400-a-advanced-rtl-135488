// tb_multifunctional_shifter_fpga: end-to-end test of the board-level
// multifunction barrel shifter at its default sizes (8 LEDs, 4 switches,
// 3 buttons).
//
// Part 1 replays the bench sequence of the original design: all four
// switches on, the buttons stepping through amounts 0..7, first rotating
// left (lr = 0) and then right (lr = 1), one vector every 50 ns. The expected
// LED patterns are written out by hand (0x0F travelling around the ring of 8).
// Part 2 sweeps every switch, button and direction combination (256 vectors)
// against a bit-level reference model.
//
// The testbench counts how often each mechanism of the design was exercised:
// left rotation, right rotation, zero amount (pass-through), each of the
// three rotator stages (amount bits 1, 2, 4), and wrap-around, where a lit
// switch bit leaves one end of the 8-bit word and re-enters at the other.
// A mechanism never seen counts as a failure. A watchdog ends the run with
// a failure if it stalls.
`timescale 1ns / 1ps
module tb_multifunctional_shifter_fpga;

  int checks   = 0;
  int failures = 0;

  int n_left = 0, n_right = 0, n_zero = 0, n_wrap = 0;
  int n_stage[3] = '{0, 0, 0};

  logic [2:0] btn;
  logic [3:0] sw;
  logic       lr;
  logic [7:0] led;

  multifunctional_shifter_fpga dut (
    .btn (btn),
    .sw  (sw),
    .lr  (lr),
    .led (led)
  );

  // reference: zero-extend sw to 8 bits, rotate by n, left (r=0) or right (r=1)
  function automatic logic [7:0] ref_led(logic [3:0] s, int n, logic r);
    logic [7:0] w = {4'b0000, s};
    logic [7:0] y = '0;
    for (int i = 0; i < 8; i++)
      if (r) y[i] = w[(i + n) % 8];
      else   y[(i + n) % 8] = w[i];
    return y;
  endfunction

  // does a lit switch bit cross the end of the word?
  function automatic bit wraps(logic [3:0] s, int n, logic r);
    for (int i = 0; i < 4; i++)
      if (s[i] && (r ? (i - n < 0) : (i + n > 7))) return 1'b1;
    return 1'b0;
  endfunction

  task automatic apply(logic [3:0] s, logic [2:0] b, logic r, logic [7:0] exp, int hold);
    sw = s; btn = b; lr = r;
    repeat (hold / 2) #1;
    checks++;
    if (led !== exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL sw=%b btn=%b lr=%b led=%b expected=%b", s, b, r, led, exp);
    end
    if (r) n_right++; else n_left++;
    if (b == 3'd0) n_zero++;
    for (int k = 0; k < 3; k++) if (b[k]) n_stage[k]++;
    if (wraps(s, int'(b), r)) n_wrap++;
    repeat (hold - hold / 2) #1;
  endtask

  // Part 1 expected LED values for sw = 1111
  localparam logic [7:0] EXP_LEFT [8]  = '{8'h0F, 8'h1E, 8'h3C, 8'h78, 8'hF0, 8'hE1, 8'hC3, 8'h87};
  localparam logic [7:0] EXP_RIGHT [8] = '{8'h0F, 8'h87, 8'hC3, 8'hE1, 8'hF0, 8'h78, 8'h3C, 8'h1E};

  initial begin
    // Part 1: bench sequence
    apply(4'b0000, 3'd0, 1'b0, 8'h00, 50);
    for (int b = 0; b < 8; b++)
      apply(4'b1111, 3'(b), 1'b0, EXP_LEFT[b], (b == 6) ? 100 : 50);
    for (int b = 0; b < 8; b++)
      apply(4'b1111, 3'(b), 1'b1, EXP_RIGHT[b], (b == 6) ? 100 : 50);

    // Part 2: every input combination
    for (int r = 0; r < 2; r++)
      for (int s = 0; s < 16; s++)
        for (int b = 0; b < 8; b++)
          apply(4'(s), 3'(b), 1'(r), ref_led(4'(s), b, 1'(r)), 10);

    $display("mechanisms: left=%0d right=%0d zero_amount=%0d stage1=%0d stage2=%0d stage4=%0d wrap=%0d",
             n_left, n_right, n_zero, n_stage[0], n_stage[1], n_stage[2], n_wrap);
    if (n_left == 0)     begin failures++; $display("FAIL left rotation never exercised");  end
    if (n_right == 0)    begin failures++; $display("FAIL right rotation never exercised"); end
    if (n_zero == 0)     begin failures++; $display("FAIL zero amount never exercised");    end
    for (int k = 0; k < 3; k++)
      if (n_stage[k] == 0) begin failures++; $display("FAIL stage %0d never exercised", k); end
    if (n_wrap == 0)     begin failures++; $display("FAIL wrap-around never exercised");    end

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

endmodule : tb_multifunctional_shifter_fpga
