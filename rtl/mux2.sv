// mux2: WIDTH-bit 2-to-1 multiplexer.
//
// y follows d1 while sel is 1 and d0 while sel is 0. In the multifunction
// shifter it picks between the rotate-left result (d0) and the rotate-right
// result (d1), with the direction input as sel.
//
// Interface: d0, d1 (data), sel (select), y (result).
// Timing: purely combinational.
//
// The original design names the multiplexer as one of its three parts but
// writes it inline; giving it a module of its own is this implementation's
// choice.
module mux2 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    if (sel) y = d1;
    else     y = d0;
  end

endmodule : mux2
