// dcdl: behavioural model (not synthesizable) of a digitally controlled delay
// line, the element MemCorrect uses to place early and late copies of the
// internal clock around its nominal edge.
//
// The output follows the input after code * UNIT_NS nanoseconds (transport
// delay: every input edge is reproduced). A real delay line is a chain of
// tuned inverter or buffer stages; only its delay-versus-code behaviour is
// modelled here. The step size and code width are this design's own choices.
`timescale 1ns / 1ps
module dcdl #(
  parameter int unsigned CODE_W  = 6,
  parameter real         UNIT_NS = 0.010
) (
  input  logic              din,
  input  logic [CODE_W-1:0] code,
  output logic              dout
);
  initial dout = 1'b0;
  always @(din) begin : transport
    automatic logic v = din;
    dout <= #(real'(code) * UNIT_NS) v;
  end
endmodule
