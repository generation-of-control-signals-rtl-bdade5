// ex_local_fsm -- local controller of the example SDL process.
//
// The abstract FSM of the process has two states, st1 and st2, and one
// transition between them, taken when SDL signal s arrives; its data work is
// z := x*y + z, scheduled over two time steps.  Composing the abstract FSM
// with the control signals of those steps inserts one state per step:
//
//   st1 --s--> st1_1 --*--> st1_2 --*--> st2
//
//   st1   (s = 1): ld_x, ld_y           take the parameters of s
//   st1_1        : c_m1=0, c_m2=1, ld_tmp          tmp := x * y
//   st1_2        : c_m1=0, c_m3=1, c_alu0=0, c_alu1=1, ld_z
//                                                    z := tmp + z
//
// Inserted states ignore the input ("don't care") and always advance.  The
// state list, the step-by-step control values and the don't-care rule follow
// the composition method.  This design's own choices: outputs are decoded
// from the current state (equal to the method's transition outputs, since
// the inserted transitions have don't-care inputs); loading x and y when s is
// taken, which the method leaves implicit; every control not named in a step
// is 0; st2 is final because the process description ends there, so the FSM
// stays in st2 until reset.
//
// Interface: s (1 while the signal is present) -> ctrl (sdl_hls_pkg::ex_ctrl_t),
// state.  Timing: all transitions on the rising clock edge; z is written on
// the second edge after the one that samples s = 1.  rst_n is asynchronous,
// active low, and returns the FSM to st1.
module ex_local_fsm
  import sdl_hls_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      s,
  output ex_ctrl_t  ctrl,
  output ex_state_t state
);

  ex_state_t state_q, state_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= ST1;
    else        state_q <= state_d;
  end

  always_comb begin
    state_d = state_q;
    ctrl    = '{c_alu: ALU_PASS_B, default: 1'b0};
    unique case (state_q)
      ST1: begin
        if (s) begin
          ctrl.ld_x = 1'b1;
          ctrl.ld_y = 1'b1;
          state_d   = ST1_1;
        end
      end
      ST1_1: begin            // time step 1: tmp := x * y
        ctrl.c_m1   = 1'b0;
        ctrl.c_m2   = 1'b1;
        ctrl.ld_tmp = 1'b1;
        state_d     = ST1_2;
      end
      ST1_2: begin            // time step 2: z := tmp + z
        ctrl.c_m1  = 1'b0;
        ctrl.c_m3  = 1'b1;
        ctrl.c_alu = ALU_ADD;
        ctrl.ld_z  = 1'b1;
        state_d    = ST2;
      end
      ST2: state_d = ST2;
      default: state_d = ST1;
    endcase
  end

  assign state = state_q;

endmodule
