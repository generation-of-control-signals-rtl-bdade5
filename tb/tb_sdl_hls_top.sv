// tb_sdl_hls_top -- end-to-end test of the whole design at default sizes.
//
// Each round resets the design and runs the three pieces at the same time:
//   - the example process waits in st1 for a random time, takes s(x, y) and
//     must hold z = x*y two clocks later in st2;
//   - the architecture-model datapath gets random controls and is compared
//     with a register-level model every clock;
//   - the barcode reader reads a random barcode and must publish every
//     stripe width and stop with done after maxtrans transitions.
// A last round sends an over-wide stripe that must raise the reader's error.
// Every mechanism is counted (waiting in st1, the s transition, register
// loads from a functional block and from outside, a zero flag, a width
// increment, a published width, done, error); one that never happened counts
// as a failure.
module tb_sdl_hls_top;
  import sdl_hls_pkg::*;

  localparam int unsigned W  = 8;
  localparam int unsigned N  = 4;
  localparam int unsigned RS = $clog2(N + 1);
  localparam int unsigned FS = $clog2(N);

  logic                 clk = 0, rst_n = 0;
  logic                 ex_s = 0, ex_in_st2;
  logic [W-1:0]         ex_s_x = '0, ex_s_y = '0, ex_z;
  ex_state_t            ex_state;
  logic [N-1:0][W-1:0]  ad_ext_in = '0, ad_reg_q, ad_fb_y;
  logic [N-1:0][RS-1:0] ad_reg_sel = '0;
  logic [N-1:0]         ad_reg_ld = '0, ad_fb_zero;
  logic [N-1:0][FS-1:0] ad_fb_sel_a = '0, ad_fb_sel_b = '0;
  alu_op_t [N-1:0]      ad_fb_op = '0;
  logic                 bc_start = 0, bc_video = 0, bc_newbit = 0;
  logic [W-1:0]         bc_maxtrans = 8'd1, bc_out_data;
  logic                 bc_out_valid, bc_done, bc_error;
  logic [3:0]           bc_state;

  int checks = 0, failures = 0, cycles = 0;
  int n_ex_wait = 0, n_ex_trans = 0, n_ad_fb = 0, n_ad_ext = 0, n_ad_zero = 0;
  int n_bc_inc = 0, n_bc_emit = 0, n_bc_done = 0, n_bc_error = 0;

  sdl_hls_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  function automatic int unsigned alu_ref(int unsigned a, int unsigned b, logic [1:0] op);
    case (op)
      2'b00:   return b;
      2'b01:   return (a + 256 - b) % 256;
      2'b10:   return (a + b) % 256;
      default: return (a + 1) % 256;
    endcase
  endfunction

  // ---------------- example process ----------------
  task automatic run_ex();
    int unsigned vx, vy, t0;
    vx = $urandom_range(0, 255);
    vy = $urandom_range(0, 255);
    repeat ($urandom_range(1, 6)) begin
      @(negedge clk);
      check(ex_state == ST1 && !ex_in_st2, "example waits in st1");
      n_ex_wait++;
    end
    ex_s_x = W'(vx);
    ex_s_y = W'(vy);
    ex_s   = 1;
    @(negedge clk);
    t0   = cycles;
    ex_s = 0;
    wait (ex_in_st2);
    check(cycles - t0 == 2, "z two clocks after s");
    check(int'(ex_z) == (vx * vy) % 256, "z = x*y + z");
    n_ex_trans++;
  endtask

  // ---------------- architecture-model datapath ----------------
  task automatic run_ad(int ncycles);
    int unsigned mreg [N], mfb [N], nreg [N];
    foreach (mreg[i]) mreg[i] = 0;
    repeat (ncycles) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        ad_ext_in[i]   = W'($urandom);
        ad_reg_sel[i]  = RS'($urandom_range(0, N));
        ad_reg_ld[i]   = 1'($urandom);
        ad_fb_sel_a[i] = FS'($urandom);
        ad_fb_sel_b[i] = FS'($urandom);
        ad_fb_op[i]    = alu_op_t'($urandom);
      end
      #1;
      for (int i = 0; i < N; i++) begin
        mfb[i] = alu_ref(mreg[ad_fb_sel_a[i]], mreg[ad_fb_sel_b[i]], ad_fb_op[i]);
        if (mfb[i] == 0) n_ad_zero++;
        check(int'(ad_fb_y[i]) == mfb[i] && ad_fb_zero[i] == (mfb[i] == 0), "FB output");
      end
      for (int i = 0; i < N; i++) begin
        nreg[i] = mreg[i];
        if (ad_reg_ld[i]) begin
          if (ad_reg_sel[i] < N) begin nreg[i] = mfb[ad_reg_sel[i]]; n_ad_fb++; end
          else begin nreg[i] = ad_ext_in[i]; n_ad_ext++; end
        end
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) begin
        mreg[i] = nreg[i];
        check(int'(ad_reg_q[i]) == mreg[i], $sformatf("register %0d value %0d expected %0d", i, ad_reg_q[i], mreg[i]));
      end
    end
    ad_reg_ld = '0;
  endtask

  // ---------------- barcode reader ----------------
  task automatic bc_bit(logic v, logic change, int expw, logic last);
    @(negedge clk);
    bc_video  = v;
    bc_newbit = 1;
    @(negedge clk);
    bc_newbit = 0;
    @(negedge clk);
    if (change) begin
      check(bc_out_valid && int'(bc_out_data) == expw, "stripe width published");
      n_bc_emit++;
    end else if (!bc_error) begin
      n_bc_inc++;
    end
    @(negedge clk);
    if (last) begin
      check(bc_done, "done after maxtrans transitions");
      n_bc_done++;
    end
  endtask

  task automatic bc_go(int mt);
    bc_maxtrans = W'(mt);
    @(negedge clk);
    bc_start = 1;
    @(negedge clk);
    bc_start = 0;
    @(negedge clk);
  endtask

  task automatic run_bc();
    int   mt, widths [$];
    logic colour;
    mt = $urandom_range(1, 8);
    for (int j = 0; j <= mt; j++) widths.push_back($urandom_range(1, 6));
    colour = $urandom_range(0, 1);
    bc_go(mt);
    for (int j = 0; j <= mt; j++) begin
      for (int k = 0; k < ((j == mt) ? 1 : widths[j]); k++)
        bc_bit(colour, (j > 0 && k == 0), (j > 0) ? widths[j-1] : 0, (j == mt));
      colour = ~colour;
    end
  endtask

  initial begin
    for (int round = 0; round < 30; round++) begin
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      fork
        run_ex();
        run_ad(150);
        run_bc();
      join
      if (round % 10 == 0) $display("round %0d done at cycle %0d", round, cycles);
    end
    // Over-wide stripe: 2**W bits of one colour.
    bc_go(2);
    for (int k = 0; k < 256; k++) bc_bit(1'b1, 1'b0, 0, 1'b0);
    check(bc_error, "error on over-wide stripe");
    if (bc_error) n_bc_error++;

    $display("mechanisms: ex_wait_st1=%0d ex_transition=%0d ad_load_fb=%0d ad_load_ext=%0d ad_zero=%0d",
             n_ex_wait, n_ex_trans, n_ad_fb, n_ad_ext, n_ad_zero);
    $display("mechanisms: bc_width_inc=%0d bc_emit=%0d bc_done=%0d bc_error=%0d",
             n_bc_inc, n_bc_emit, n_bc_done, n_bc_error);
    check(n_ex_wait > 0, "mechanism: wait in st1");
    check(n_ex_trans > 0, "mechanism: s transition");
    check(n_ad_fb > 0, "mechanism: register load from FB");
    check(n_ad_ext > 0, "mechanism: register load from outside");
    check(n_ad_zero > 0, "mechanism: zero flag");
    check(n_bc_inc > 0, "mechanism: width increment");
    check(n_bc_emit > 0, "mechanism: width published");
    check(n_bc_done > 0, "mechanism: done");
    check(n_bc_error > 0, "mechanism: error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
