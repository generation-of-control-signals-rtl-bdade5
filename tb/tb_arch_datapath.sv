// tb_arch_datapath -- self-checking test of the architecture-model datapath.
//
// Every clock applies random mux selects, operation codes, load enables and
// external inputs, and compares the registers, functional-block outputs and
// zero flags with a model kept here: FB i computes op(reg[sel_a], reg[sel_b]),
// register i loads FB reg_sel[i] or, for select N, ext_in[i].  Counts how
// often a register was loaded from a functional block and from outside.
module tb_arch_datapath;
  import sdl_hls_pkg::*;

  localparam int unsigned N  = 4;
  localparam int unsigned W  = 8;
  localparam int unsigned RS = $clog2(N + 1);
  localparam int unsigned FS = $clog2(N);

  logic                 clk = 0, rst_n = 0;
  logic [N-1:0][W-1:0]  ext_in, reg_q, fb_y;
  logic [N-1:0][RS-1:0] reg_sel;
  logic [N-1:0]         reg_ld, fb_zero;
  logic [N-1:0][FS-1:0] fb_sel_a, fb_sel_b;
  alu_op_t [N-1:0]      fb_op;
  int unsigned          mreg [N], mfb [N];
  int                   checks = 0, failures = 0, cycles = 0, from_fb = 0, from_ext = 0;

  arch_datapath #(.N(N), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .ext_in(ext_in), .reg_sel(reg_sel), .reg_ld(reg_ld),
    .fb_sel_a(fb_sel_a), .fb_sel_b(fb_sel_b), .fb_op(fb_op),
    .reg_q(reg_q), .fb_y(fb_y), .fb_zero(fb_zero));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned alu_ref(int unsigned a, int unsigned b, logic [1:0] op);
    case (op)
      2'b00:   return b;
      2'b01:   return (a + 256 - b) % 256;
      2'b10:   return (a + b) % 256;
      default: return (a + 1) % 256;
    endcase
  endfunction

  initial begin
    int unsigned nreg [N];
    ext_in = '0; reg_sel = '0; reg_ld = '0; fb_sel_a = '0; fb_sel_b = '0; fb_op = '0;
    foreach (mreg[i]) mreg[i] = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        ext_in[i]   = W'($urandom);
        reg_sel[i]  = RS'($urandom_range(0, N));
        reg_ld[i]   = 1'($urandom);
        fb_sel_a[i] = FS'($urandom);
        fb_sel_b[i] = FS'($urandom);
        fb_op[i]    = alu_op_t'($urandom);
      end
      if (n % 50 == 0) begin          // force a zero result now and then
        fb_sel_b[0] = fb_sel_a[0];
        fb_op[0]    = ALU_SUB;
      end
      #1;
      for (int i = 0; i < N; i++) begin
        mfb[i] = alu_ref(mreg[fb_sel_a[i]], mreg[fb_sel_b[i]], fb_op[i]);
        checks++;
        if (int'(fb_y[i]) != mfb[i] || fb_zero[i] != (mfb[i] == 0)) begin
          failures++;
          $display("FAIL fb%0d y=%0d zero=%b expected %0d", i, fb_y[i], fb_zero[i], mfb[i]);
        end
      end
      for (int i = 0; i < N; i++) begin
        nreg[i] = mreg[i];
        if (reg_ld[i]) begin
          if (reg_sel[i] < N) begin nreg[i] = mfb[reg_sel[i]]; from_fb++; end
          else begin nreg[i] = ext_in[i]; from_ext++; end
        end
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) begin
        mreg[i] = nreg[i];
        checks++;
        if (int'(reg_q[i]) != mreg[i]) begin
          failures++;
          $display("FAIL reg%0d=%0d expected %0d", i, reg_q[i], mreg[i]);
        end
      end
    end
    $display("loads from functional blocks %0d, from outside %0d", from_fb, from_ext);
    checks++;
    if (from_fb == 0 || from_ext == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
