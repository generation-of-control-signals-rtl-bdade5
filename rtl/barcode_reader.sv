// barcode_reader -- controller of a barcode reader: measures stripe widths.
//
// An optical scanner delivers one video bit (black or white) each time it
// pulses newbit.  After start, the reader counts how many consecutive bits
// have the same colour, the width of a stripe.  When the colour changes it
// publishes the width of the stripe just ended on out_data with a one-cycle
// out_valid pulse and counts one more transition.  When the number of
// transitions reaches maxtrans it stops and raises done.  A stripe wider than
// the counter can hold (2**W - 1 bits) stops the reader with error.  A new
// start pulse restarts it from done, error or idle.
//
// What follows the example it is modelled on: the task (read scanner bits,
// record black and white stripe widths), the port names start, video,
// newbit, maxtrans and error, a 4-bit state vector, three load-enabled
// registers r1..r3, and one shared ALU with a select code and a zero flag.
// Everything else is this design's own: the state sequence, the register
// roles (r1 stripe width, r2 transition count, r3 published width), the ALU
// codes used (increment for counting, subtract plus zero flag for the
// maxtrans compare and for width overflow), and the out_valid and done
// outputs.  The published width of the last stripe is the one that ends at
// transition maxtrans; the stripe after it is not measured.
//
// Datapath and controller are written the way the synthesis method builds
// them: the FSM drives mux selects (c_ma for the ALU operand A, c_mb for the
// ALU operand B, c_m1 for r1's input) and register loads (ld_r1..ld_r3).
//
// Interface: start, video, newbit, maxtrans (W bits, must be >= 1) ->
// out_data (W bits), out_valid, done, error, state.  Timing: each newbit
// pulse lasts one clock and is followed by at least two clocks without
// newbit; video is stable in the cycle newbit is 1.  out_valid comes on the
// edge after the newbit that showed the colour change; done two edges after
// that newbit.  rst_n is asynchronous, active low.
module barcode_reader
  import sdl_hls_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         video,
  input  logic         newbit,
  input  logic [W-1:0] maxtrans,
  output logic [W-1:0] out_data,
  output logic         out_valid,
  output logic         done,
  output logic         error,
  output logic [3:0]   state
);

  typedef enum logic [3:0] {
    S_IDLE  = 4'd0,  // wait for start
    S_INIT  = 4'd1,  // clear the transition count
    S_FIRST = 4'd2,  // wait for the first bit of the first stripe
    S_WAIT  = 4'd3,  // wait for the next bit
    S_INC   = 4'd4,  // same colour: width := width + 1
    S_EMIT  = 4'd5,  // colour change: publish width, count transition
    S_CMP   = 4'd6,  // compare transition count with maxtrans
    S_DONE  = 4'd7,  // maxtrans transitions recorded
    S_ERR   = 4'd8   // stripe too wide
  } bc_state_t;

  bc_state_t state_q, state_d;

  // Datapath registers.
  logic [W-1:0] r1, r2, r3;       // width, transition count, published width
  logic         prev_q, cur_q;    // colour of current stripe, last bit read

  // Control signals.
  logic    ld_r1, ld_r2, ld_r3, ld_prev, ld_cur;
  logic    c_ma;    // ALU A: 0 = r1, 1 = r2
  logic    c_mb;    // ALU B: 0 = 0,  1 = maxtrans
  logic    c_m1;    // r1 input: 0 = ALU, 1 = constant 1
  logic    c_m2;    // r2 input: 0 = ALU, 1 = constant 0
  alu_op_t sel_code;

  logic [W-1:0] alu_a, alu_b, alu_out;
  logic         alu_zero_flag;

  assign alu_a = c_ma ? r2 : r1;
  assign alu_b = c_mb ? maxtrans : '0;

  alu #(.W(W)) u_alu (
    .a    (alu_a),
    .b    (alu_b),
    .op   (sel_code),
    .y    (alu_out),
    .zero (alu_zero_flag)
  );

  // Controller.
  always_comb begin
    state_d   = state_q;
    ld_r1     = 1'b0;
    ld_r2     = 1'b0;
    ld_r3     = 1'b0;
    ld_prev   = 1'b0;
    ld_cur    = 1'b0;
    c_ma      = 1'b0;
    c_mb      = 1'b0;
    c_m1      = 1'b0;
    c_m2      = 1'b0;
    sel_code  = ALU_PASS_B;
    out_valid = 1'b0;
    unique case (state_q)
      S_IDLE, S_DONE, S_ERR: begin
        if (start) state_d = S_INIT;
      end
      S_INIT: begin
        c_m2    = 1'b1;
        ld_r2   = 1'b1;
        state_d = S_FIRST;
      end
      S_FIRST: begin
        if (newbit) begin
          ld_prev = 1'b1;
          c_m1    = 1'b1;
          ld_r1   = 1'b1;
          state_d = S_WAIT;
        end
      end
      S_WAIT: begin
        if (newbit) begin
          ld_cur  = 1'b1;
          state_d = (video == prev_q) ? S_INC : S_EMIT;
        end
      end
      S_INC: begin
        c_ma     = 1'b0;
        sel_code = ALU_INC;
        ld_r1    = 1'b1;
        state_d  = alu_zero_flag ? S_ERR : S_WAIT;
      end
      S_EMIT: begin
        ld_r3    = 1'b1;          // publish r1
        c_m1     = 1'b1;          // new stripe is one bit wide
        ld_r1    = 1'b1;
        c_ma     = 1'b1;
        sel_code = ALU_INC;       // one more transition
        ld_r2    = 1'b1;
        ld_prev  = 1'b1;
        state_d  = S_CMP;
      end
      S_CMP: begin
        out_valid = 1'b1;
        c_ma      = 1'b1;
        c_mb      = 1'b1;
        sel_code  = ALU_SUB;
        state_d   = alu_zero_flag ? S_DONE : S_WAIT;
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      r1      <= '0;
      r2      <= '0;
      r3      <= '0;
      prev_q  <= 1'b0;
      cur_q   <= 1'b0;
    end else begin
      state_q <= state_d;
      if (ld_r1)   r1     <= c_m1 ? W'(1) : alu_out;
      if (ld_r2)   r2     <= c_m2 ? '0 : alu_out;
      if (ld_r3)   r3     <= r1;
      if (ld_prev) prev_q <= (state_q == S_FIRST) ? video : cur_q;
      if (ld_cur)  cur_q  <= video;
    end
  end

  // A newbit pulse is only read in S_FIRST and S_WAIT; one that arrives while
  // the reader is busy would be lost.  (In reset the state is S_IDLE, so the
  // check needs no reset term.)
  always_ff @(posedge clk) begin
    if (newbit) begin
      assert (!(state_q inside {S_INC, S_EMIT, S_CMP}))
        else $error("barcode_reader: newbit while busy");
    end
  end

  assign out_data = r3;
  assign done     = (state_q == S_DONE);
  assign error    = (state_q == S_ERR);
  assign state    = state_q;

endmodule
