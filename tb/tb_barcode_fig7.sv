// tb_barcode_fig7 -- the barcode reader run on a short barcode of the size
// shown in the reader's published simulation: maxtrans = 4, stripe widths of
// one to four bits (1, 2, 3, 4 here), one newbit every few clocks.  Checks
// the four published widths, their order, done, and the total cycle count
// from start to done (start, init and wait for the first bit, one bit every
// GAP + 1 clocks, two clocks from the last bit to done).
module tb_barcode_fig7;
  localparam int unsigned W   = 8;
  localparam int          GAP = 4;   // clocks between newbit pulses

  logic         clk = 0, rst_n = 0, start = 0, video = 0, newbit = 0;
  logic [W-1:0] maxtrans = 8'd4, out_data;
  logic         out_valid, done, error;
  logic [3:0]   state;
  int           checks = 0, failures = 0, cycles = 0, t_done = 0, got [$];

  barcode_reader dut (
    .clk(clk), .rst_n(rst_n), .start(start), .video(video), .newbit(newbit),
    .maxtrans(maxtrans), .out_data(out_data), .out_valid(out_valid), .done(done),
    .error(error), .state(state));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (out_valid) got.push_back(int'(out_data));
  end

  always @(posedge done) t_done = cycles;

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int widths [5] = '{1, 2, 3, 4, 1};
    int t_start, nbits;
    logic colour;
    #12 rst_n = 1;
    @(negedge clk);
    start   = 1;
    t_start = cycles;
    @(negedge clk);
    start  = 0;
    colour = 1'b0;
    nbits  = 0;
    foreach (widths[j]) begin
      for (int k = 0; k < widths[j]; k++) begin
        @(negedge clk);
        video  = colour;
        newbit = 1;
        nbits++;
        @(negedge clk);
        newbit = 0;
        repeat (GAP - 1) @(negedge clk);
      end
      colour = ~colour;
    end
    wait (done);
    checks++;
    if (got.size() != 4) begin
      failures++;
      $display("FAIL %0d widths published, expected 4", got.size());
    end
    foreach (got[i]) begin
      checks++;
      if (i < 4 && got[i] != widths[i]) begin
        failures++;
        $display("FAIL width %0d = %0d, expected %0d", i, got[i], widths[i]);
      end
    end
    // start is sampled on edge t_start+1, the first bit on edge t_start+3,
    // bit n on edge t_start+3+(n-1)*(GAP+1); done follows the last by two.
    @(negedge clk);
    $display("start to done: %0d clocks for %0d bits", t_done - t_start, nbits);
    checks++;
    if (t_done - t_start != 3 + (nbits - 1) * (GAP + 1) + 2) begin
      failures++;
      $display("FAIL cycle count");
    end
    checks++;
    if (error) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
