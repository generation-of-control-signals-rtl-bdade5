// sdl_hls_pkg -- types and constants shared by the functional blocks,
// datapaths and controllers of this design.
//
// The ALU operation code is two control bits, c_alu0 and c_alu1, as named in
// the composition example.  That example gives one code, addition, as
// c_alu0 = 0 and c_alu1 = 1 (written there as the bit string "01", c_alu0
// first).  As a vector {c_alu1, c_alu0} addition is therefore 2'b10.  The
// other three codes are this design's own choice, picked so that the
// barcode reader can count (increment) and compare (subtract, zero flag).
package sdl_hls_pkg;

  // ALU operation code, {c_alu1, c_alu0}.
  typedef enum logic [1:0] {
    ALU_PASS_B = 2'b00,  // y = b
    ALU_SUB    = 2'b01,  // y = a - b
    ALU_ADD    = 2'b10,  // y = a + b   (c_alu0 = 0, c_alu1 = 1)
    ALU_INC    = 2'b11   // y = a + 1
  } alu_op_t;

  // States of the local FSM of the example process.  st1 and st2 come from
  // the abstract FSM; st1_1 and st1_2 are inserted, one per time step of the
  // scheduled data-flow graph of the st1 -> st2 transition.
  typedef enum logic [1:0] {
    ST1   = 2'd0,
    ST1_1 = 2'd1,
    ST1_2 = 2'd2,
    ST2   = 2'd3
  } ex_state_t;

  // Control word from the example's local FSM to its datapath.
  typedef struct packed {
    logic    c_m1;    // mux m1 (multiplier operand A): 0 = x, 1 = y
    logic    c_m2;    // mux m2 (multiplier operand B): 0 = x, 1 = y
    logic    c_m3;    // mux m3 (ALU operand B):        0 = x, 1 = z
    alu_op_t c_alu;   // {c_alu1, c_alu0}
    logic    ld_x;    // load x from the data port of signal s
    logic    ld_y;    // load y from the data port of signal s
    logic    ld_tmp;  // load tmp from the multiplier
    logic    ld_z;    // load z from the ALU
  } ex_ctrl_t;

endpackage
