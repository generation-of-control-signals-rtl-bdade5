// arch_datapath -- the generic architecture model for one SDL process.
//
// N registers and N functional blocks.  A multiplexer sits on every input
// port of every register and every functional block, so any resource can
// take its input from several sources and be shared between operations; the
// controller of the process drives every mux select, every operation code and
// every register enable, all sampled on the rising clock edge.  This is the
// structure the synthesis method allocates into.
//
// Following the model: register i has an input mux (Mux1,i) over the outputs
// of all functional blocks; functional block i has input muxes (Mux2,i) over
// all registers.  This design's choices: every functional block is the
// two-operand ALU, so each has two input muxes (one per input port); the
// register input mux has one extra input, ext_in[i], through which data from
// the process's signal ports enters; W and N are free parameters.
//
// Select encodings: reg_sel[i] = k < N takes the output of functional block
// k, reg_sel[i] = N takes ext_in[i]; fb_sel_a[i] / fb_sel_b[i] = k takes
// register k.  Registers reset to 0.
//
// Interface: control inputs (reg_sel, reg_ld, fb_sel_a, fb_sel_b, fb_op),
// ext_in -> reg_q (register values), fb_y (functional block outputs) and
// fb_zero (their zero flags).  Timing: the mux/ALU paths are combinational;
// registers load on the rising clock edge when reg_ld[i] is 1.
module arch_datapath
  import sdl_hls_pkg::*;
#(
  parameter int unsigned N  = 4,
  parameter int unsigned W  = 8,
  localparam int unsigned RS = $clog2(N + 1),           // register-mux select width
  localparam int unsigned FS = (N > 1) ? $clog2(N) : 1  // FB-mux select width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0][W-1:0]  ext_in,
  input  logic [N-1:0][RS-1:0] reg_sel,
  input  logic [N-1:0]         reg_ld,
  input  logic [N-1:0][FS-1:0] fb_sel_a,
  input  logic [N-1:0][FS-1:0] fb_sel_b,
  input  alu_op_t [N-1:0]      fb_op,
  output logic [N-1:0][W-1:0]  reg_q,
  output logic [N-1:0][W-1:0]  fb_y,
  output logic [N-1:0]         fb_zero
);

  logic [N-1:0][W-1:0] fb_a, fb_b, reg_d;

  for (genvar i = 0; i < N; i++) begin : g_slice
    // Mux2,i: operand selection for functional block i.  An out-of-range
    // select reads register 0.
    always_comb begin
      fb_a[i] = reg_q[0];
      fb_b[i] = reg_q[0];
      for (int k = 0; k < N; k++) begin
        if (fb_sel_a[i] == FS'(k)) fb_a[i] = reg_q[k];
        if (fb_sel_b[i] == FS'(k)) fb_b[i] = reg_q[k];
      end
    end

    alu #(.W(W)) u_fb (
      .a    (fb_a[i]),
      .b    (fb_b[i]),
      .op   (fb_op[i]),
      .y    (fb_y[i]),
      .zero (fb_zero[i])
    );

    // Mux1,i: input selection for register i.  Selects above N read ext_in.
    always_comb begin
      reg_d[i] = ext_in[i];
      for (int k = 0; k < N; k++) begin
        if (reg_sel[i] == RS'(k)) reg_d[i] = fb_y[k];
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)         reg_q[i] <= '0;
      else if (reg_ld[i]) reg_q[i] <= reg_d[i];
    end
  end

endmodule
