// tb_ex_datapath -- self-checking test of the example datapath.
//
// Drives random control words straight into the datapath and keeps a
// register-level model here (muxes: m1/m2 pick x or y, m3 picks x or z;
// tmp := m1*m2, z := tmp op m3); the four registers are compared after every
// clock.  Ends with the scheduled two-step sequence z := x*y + z.
module tb_ex_datapath;
  import sdl_hls_pkg::*;

  localparam int unsigned W = 8;

  logic         clk = 0, rst_n = 0;
  ex_ctrl_t     ctrl;
  logic [W-1:0] in_x, in_y, x, y, tmp, z;
  int unsigned  mx, my, mt, mz;
  int           checks = 0, failures = 0, cycles = 0;

  ex_datapath #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .ctrl(ctrl), .in_x(in_x), .in_y(in_y),
                            .x(x), .y(y), .tmp(tmp), .z(z));

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

  task automatic step();
    int unsigned a1, a2, b3, nx, ny, nt, nz;
    a1 = ctrl.c_m1 ? my : mx;
    a2 = ctrl.c_m2 ? my : mx;
    b3 = ctrl.c_m3 ? mz : mx;
    nx = ctrl.ld_x ? int'(in_x) : mx;
    ny = ctrl.ld_y ? int'(in_y) : my;
    nt = ctrl.ld_tmp ? (a1 * a2) % 256 : mt;
    nz = ctrl.ld_z ? alu_ref(mt, b3, ctrl.c_alu) : mz;
    @(posedge clk);
    mx = nx; my = ny; mt = nt; mz = nz;
    #1;
    checks++;
    if (int'(x) != mx || int'(y) != my || int'(tmp) != mt || int'(z) != mz) begin
      failures++;
      $display("FAIL x=%0d y=%0d tmp=%0d z=%0d expected %0d %0d %0d %0d", x, y, tmp, z, mx, my, mt, mz);
    end
  endtask

  initial begin
    ctrl = '0;
    in_x = '0;
    in_y = '0;
    mx = 0; my = 0; mt = 0; mz = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      ctrl = ex_ctrl_t'($urandom);
      in_x = W'($urandom);
      in_y = W'($urandom);
      step();
    end
    // Scheduled sequence: load x, y; tmp := x*y; z := tmp + z.
    @(negedge clk);
    ctrl = '0; ctrl.ld_x = 1; ctrl.ld_y = 1; in_x = 8'd7; in_y = 8'd9;
    step();
    @(negedge clk);
    ctrl = '0; ctrl.c_m2 = 1; ctrl.ld_tmp = 1;
    step();
    @(negedge clk);
    ctrl = '0; ctrl.c_m3 = 1; ctrl.c_alu = ALU_ADD; ctrl.ld_z = 1;
    step();
    checks++;
    if (int'(tmp) != 63) begin failures++; $display("FAIL tmp=%0d, expected 63", tmp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
