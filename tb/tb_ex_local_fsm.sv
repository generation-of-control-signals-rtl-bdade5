// tb_ex_local_fsm -- self-checking test of the example's local controller.
//
// Holds s low for a random number of cycles (the FSM must wait in st1 with
// all controls 0), raises s for one cycle, then checks the state sequence
// st1 -> st1_1 -> st1_2 -> st2 and the control word of every state against
// the scheduled control list, and that st2 is kept.  Repeated after resets.
module tb_ex_local_fsm;
  import sdl_hls_pkg::*;

  logic      clk = 0, rst_n = 0, s = 0;
  ex_ctrl_t  ctrl;
  ex_state_t state;
  int        checks = 0, failures = 0, cycles = 0;

  ex_local_fsm dut (.clk(clk), .rst_n(rst_n), .s(s), .ctrl(ctrl), .state(state));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_(ex_state_t st, logic [9:0] word, string what);
    // word = {c_m1, c_m2, c_m3, c_alu1, c_alu0, ld_x, ld_y, ld_tmp, ld_z, 0}
    logic [9:0] got;
    got = {ctrl.c_m1, ctrl.c_m2, ctrl.c_m3, ctrl.c_alu[1], ctrl.c_alu[0],
           ctrl.ld_x, ctrl.ld_y, ctrl.ld_tmp, ctrl.ld_z, 1'b0};
    checks++;
    if (state !== st || got !== word) begin
      failures++;
      $display("FAIL %s: state=%0d ctrl=%b expected state=%0d ctrl=%b", what, state, got, st, word);
    end
  endtask

  initial begin
    for (int trial = 0; trial < 20; trial++) begin
      rst_n = 0;
      s     = 0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      repeat ($urandom_range(0, 5)) begin
        @(negedge clk);
        expect_(ST1, 10'b0, "idle in st1");
      end
      @(negedge clk);
      s = 1;
      #1 expect_(ST1, 10'b00000_1100_0, "st1 taking s");
      @(negedge clk);
      s = $urandom_range(0, 1);   // don't care from here on
      expect_(ST1_1, 10'b01000_0010_0, "step 1 (c_m1=0 c_m2=1 ld_tmp)");
      @(negedge clk);
      expect_(ST1_2, 10'b00110_0001_0, "step 2 (c_m1=0 c_m3=1 c_alu0=0 c_alu1=1 ld_z)");
      repeat (3) begin
        @(negedge clk);
        s = $urandom_range(0, 1);
        #1 expect_(ST2, 10'b0, "final st2");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
