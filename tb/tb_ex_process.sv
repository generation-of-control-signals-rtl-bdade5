// tb_ex_process -- self-checking test of the example SDL process.
//
// Each trial resets the process, waits a random time with s low, presents
// x and y on the data ports, raises s for one clock, and then checks that z
// equals x*y (mod 2**W; z starts at 0) exactly two clocks after the edge
// that sampled s, that the process is then in st2 and not before, and that
// z stays put in st2 even if s comes again.
module tb_ex_process;
  import sdl_hls_pkg::*;

  localparam int unsigned W = 8;

  logic         clk = 0, rst_n = 0, s = 0, in_st2;
  logic [W-1:0] s_x, s_y, z;
  ex_state_t    state;
  int           checks = 0, failures = 0, cycles = 0;

  ex_process #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .s(s), .s_x(s_x), .s_y(s_y),
                           .z(z), .state(state), .in_st2(in_st2));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (z=%0d state=%0d)", what, z, state);
    end
  endtask

  initial begin
    for (int trial = 0; trial < 200; trial++) begin
      int unsigned vx, vy, expz, t0;
      vx = $urandom_range(0, 255);
      vy = $urandom_range(0, 255);
      if (trial == 0) begin vx = 255; vy = 255; end
      expz = (vx * vy) % 256;
      rst_n = 0;
      s     = 0;
      @(negedge clk);
      rst_n = 1;
      repeat ($urandom_range(0, 4)) @(negedge clk);
      check(state == ST1 && z == 0 && !in_st2, "waiting in st1");
      s_x = W'(vx);
      s_y = W'(vy);
      s   = 1;
      @(negedge clk);
      t0  = cycles;         // number of the edge that sampled s
      s   = 0;
      s_x = W'($urandom);   // data only needs to be stable when s is sampled
      s_y = W'($urandom);
      check(!in_st2, "not in st2 one clock after s");
      @(negedge clk);
      check(!in_st2, "not in st2 before the edge that writes z");
      wait (in_st2);
      check(cycles - t0 == 2, "z written two clocks after s");
      check(int'(z) == expz, "z = x*y + 0");
      @(negedge clk);
      s = 1;
      @(negedge clk);
      s = 0;
      check(int'(z) == expz && in_st2, "st2 is final");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
