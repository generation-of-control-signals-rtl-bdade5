// sdl_hls_top -- the hardware of the SDL-to-hardware flow, side by side.
//
// Three independent pieces, each with its own ports:
//   ex_*  the example SDL process: waits in st1 for signal s(x, y), then
//         z := x*y + z over two clock steps, then st2 (ex_process);
//   ad_*  the generic architecture model of one process: N registers, N
//         functional blocks, a mux on every input (arch_datapath).  The
//         controller that would drive it is generated per process, so its
//         control inputs are ports here;
//   bc_*  the barcode reader controller that measures stripe widths
//         (barcode_reader).
// They share only the clock and the asynchronous active-low reset.  Timing
// is that of each piece; see their own headers.
module sdl_hls_top
  import sdl_hls_pkg::*;
#(
  parameter int unsigned W  = 8,
  parameter int unsigned N  = 4,
  localparam int unsigned RS = $clog2(N + 1),
  localparam int unsigned FS = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // example process
  input  logic                 ex_s,
  input  logic [W-1:0]         ex_s_x,
  input  logic [W-1:0]         ex_s_y,
  output logic [W-1:0]         ex_z,
  output ex_state_t            ex_state,
  output logic                 ex_in_st2,
  // architecture-model datapath
  input  logic [N-1:0][W-1:0]  ad_ext_in,
  input  logic [N-1:0][RS-1:0] ad_reg_sel,
  input  logic [N-1:0]         ad_reg_ld,
  input  logic [N-1:0][FS-1:0] ad_fb_sel_a,
  input  logic [N-1:0][FS-1:0] ad_fb_sel_b,
  input  alu_op_t [N-1:0]      ad_fb_op,
  output logic [N-1:0][W-1:0]  ad_reg_q,
  output logic [N-1:0][W-1:0]  ad_fb_y,
  output logic [N-1:0]         ad_fb_zero,
  // barcode reader
  input  logic                 bc_start,
  input  logic                 bc_video,
  input  logic                 bc_newbit,
  input  logic [W-1:0]         bc_maxtrans,
  output logic [W-1:0]         bc_out_data,
  output logic                 bc_out_valid,
  output logic                 bc_done,
  output logic                 bc_error,
  output logic [3:0]           bc_state
);

  ex_process #(.W(W)) u_ex (
    .clk    (clk),
    .rst_n  (rst_n),
    .s      (ex_s),
    .s_x    (ex_s_x),
    .s_y    (ex_s_y),
    .z      (ex_z),
    .state  (ex_state),
    .in_st2 (ex_in_st2)
  );

  arch_datapath #(.N(N), .W(W)) u_ad (
    .clk      (clk),
    .rst_n    (rst_n),
    .ext_in   (ad_ext_in),
    .reg_sel  (ad_reg_sel),
    .reg_ld   (ad_reg_ld),
    .fb_sel_a (ad_fb_sel_a),
    .fb_sel_b (ad_fb_sel_b),
    .fb_op    (ad_fb_op),
    .reg_q    (ad_reg_q),
    .fb_y     (ad_fb_y),
    .fb_zero  (ad_fb_zero)
  );

  barcode_reader #(.W(W)) u_bc (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (bc_start),
    .video     (bc_video),
    .newbit    (bc_newbit),
    .maxtrans  (bc_maxtrans),
    .out_data  (bc_out_data),
    .out_valid (bc_out_valid),
    .done      (bc_done),
    .error     (bc_error),
    .state     (bc_state)
  );

endmodule
