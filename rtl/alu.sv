// alu -- multi-operation functional block with a zero flag.
//
// A purely combinational W-bit ALU of the kind the synthesis method assumes
// to be pre-designed: the controller selects the operation with a 2-bit
// operation code {c_alu1, c_alu0} and the block reports whether the result
// is zero.  Addition on code c_alu0 = 0, c_alu1 = 1 follows the composition
// example; the other three operations (pass B, subtract, increment) and the
// zero flag's exact meaning are this design's choice.  All arithmetic wraps
// modulo 2**W.
//
// Interface: a, b (W bits), op (sdl_hls_pkg::alu_op_t) -> y (W bits), zero.
// Timing: combinational, no clock.
module alu
  import sdl_hls_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_op_t      op,
  output logic [W-1:0] y,
  output logic         zero
);

  always_comb begin
    unique case (op)
      ALU_PASS_B: y = b;
      ALU_SUB:    y = a - b;
      ALU_ADD:    y = a + b;
      ALU_INC:    y = a + W'(1);
      default:    y = b;
    endcase
  end

  assign zero = (y == '0);

endmodule
