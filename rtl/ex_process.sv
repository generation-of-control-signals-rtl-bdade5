// ex_process -- the example SDL process as synthesized hardware.
//
// The process waits in state st1 for SDL signal s(x, y), then computes
// z := x*y + z in two clock steps and ends in state st2.  It is the local
// controller (ex_local_fsm) port-mapped onto the allocated datapath
// (ex_datapath), the way the method unifies control and datapath.
//
// Port organization follows the method's rules for SDL signals: one 1-bit
// port per input signal, which is 1 while the signal is present, and extra
// ports for the data values it carries, which must be stable no later than
// the clock edge at which the signal port is sampled 1.  The signal need be
// present for only one rising edge.
//
// Interface: s, s_x, s_y -> z, state, in_st2.  Timing: if s is 1 at rising
// edge k (in st1), x and y load at edge k, tmp at k+1 and z at k+2, and
// in_st2 is 1 from just after edge k+2.
module ex_process
  import sdl_hls_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         s,
  input  logic [W-1:0] s_x,
  input  logic [W-1:0] s_y,
  output logic [W-1:0] z,
  output ex_state_t    state,
  output logic         in_st2
);

  ex_ctrl_t     ctrl;
  logic [W-1:0] x_q, y_q, tmp_q;

  ex_local_fsm u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .s     (s),
    .ctrl  (ctrl),
    .state (state)
  );

  ex_datapath #(.W(W)) u_dp (
    .clk   (clk),
    .rst_n (rst_n),
    .ctrl  (ctrl),
    .in_x  (s_x),
    .in_y  (s_y),
    .x     (x_q),
    .y     (y_q),
    .tmp   (tmp_q),
    .z     (z)
  );

  assign in_st2 = (state == ST2);

  // x, y and tmp are internal to the process; only z is observed.
  logic unused_ok;
  assign unused_ok = ^{x_q, y_q, tmp_q};

endmodule
