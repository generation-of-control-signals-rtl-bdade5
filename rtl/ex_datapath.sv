// ex_datapath -- datapath allocated for the example transition z := x*y + z.
//
// Registers x, y, tmp and z; one multiplier and one ALU; multiplexers m1 and
// m2 in front of the multiplier inputs and m3 in front of the ALU's second
// input.  The multiplier writes tmp, the ALU adds tmp and the output of m3
// and writes z.  This structure, the register and mux names, and the rule
// that tmp feeds the ALU directly follow the allocation example.  The
// inputs of each mux that the allocation does not name are this design's
// choice: m1 and m2 select x (0) or y (1), m3 selects x (0) or z (1).  x and
// y load from the data ports of the SDL signal that starts the transition.
// All registers reset to 0 (z is the process variable and starts at 0).
//
// Interface: ctrl (sdl_hls_pkg::ex_ctrl_t) from the local FSM, in_x and in_y
// (data ports of signal s) -> the four register values.  Timing: each
// register loads on the rising clock edge when its ld_* bit is 1; the muxes,
// the multiplier and the ALU are combinational.
module ex_datapath
  import sdl_hls_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ex_ctrl_t     ctrl,
  input  logic [W-1:0] in_x,
  input  logic [W-1:0] in_y,
  output logic [W-1:0] x,
  output logic [W-1:0] y,
  output logic [W-1:0] tmp,
  output logic [W-1:0] z
);

  logic [W-1:0] m1_out, m2_out, m3_out;
  logic [W-1:0] mul_out, alu_out;
  logic         alu_zero;

  assign m1_out = ctrl.c_m1 ? y : x;
  assign m2_out = ctrl.c_m2 ? y : x;
  assign m3_out = ctrl.c_m3 ? z : x;

  multiplier #(.W(W)) u_mul (
    .a (m1_out),
    .b (m2_out),
    .p (mul_out)
  );

  alu #(.W(W)) u_alu (
    .a    (tmp),
    .b    (m3_out),
    .op   (ctrl.c_alu),
    .y    (alu_out),
    .zero (alu_zero)
  );

  // The zero flag is not needed by this transition.
  logic unused_ok;
  assign unused_ok = alu_zero;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x   <= '0;
      y   <= '0;
      tmp <= '0;
      z   <= '0;
    end else begin
      if (ctrl.ld_x)   x   <= in_x;
      if (ctrl.ld_y)   y   <= in_y;
      if (ctrl.ld_tmp) tmp <= mul_out;
      if (ctrl.ld_z)   z   <= alu_out;
    end
  end

endmodule
