// tb_barcode_reader -- self-checking test of the barcode reader.
//
// Builds random barcodes (stripes of alternating colour and random width),
// feeds them bit by bit with newbit pulses at random spacing (at least two
// idle clocks between pulses), and checks every published width, the exact
// cycle of each out_valid pulse and of done, that nothing is published after
// done, and that a start pulse restarts the reader.  Then checks the widest
// stripe that still fits (2**W - 1 bits) and one bit wider, which must raise
// error.
module tb_barcode_reader;
  localparam int unsigned W = 8;

  logic         clk = 0, rst_n = 0, start = 0, video = 0, newbit = 0;
  logic [W-1:0] maxtrans, out_data;
  logic         out_valid, done, error;
  logic [3:0]   state;
  int           checks = 0, failures = 0, cycles = 0, valid_seen = 0, valid_expected = 0;

  barcode_reader #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .video(video), .newbit(newbit),
    .maxtrans(maxtrans), .out_data(out_data), .out_valid(out_valid), .done(done),
    .error(error), .state(state));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (out_valid) valid_seen++;
  end

  initial begin
    wait (cycles == 400000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d (out_data=%0d valid=%b done=%b error=%b)",
               what, cycles, out_data, out_valid, done, error);
    end
  endtask

  task automatic do_start();
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    @(negedge clk);
  endtask

  // One scanner bit.  change: this bit ends a stripe of width expw;
  // last: that transition is number maxtrans.
  task automatic send_bit(logic v, logic change, int expw, logic last, logic quiet);
    @(negedge clk);
    video  = v;
    newbit = 1;
    @(negedge clk);
    newbit = 0;
    video  = $urandom_range(0, 1);
    if (!quiet) check(!out_valid, "no out_valid right after newbit");
    @(negedge clk);
    if (!quiet && change) begin
      check(out_valid, "out_valid one clock after the colour change");
      check(int'(out_data) == expw, $sformatf("width %0d published", expw));
      valid_expected++;
    end
    @(negedge clk);
    if (!quiet && last) check(done, "done two clocks after transition maxtrans");
    if (!quiet && !last) check(!done && !error, "still running");
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  initial begin
    #12 rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      int  mt, widths [$];
      logic colour;
      mt       = $urandom_range(1, 12);
      maxtrans = W'(mt);
      for (int j = 0; j <= mt; j++) widths.push_back($urandom_range(1, 9));
      colour = $urandom_range(0, 1);
      do_start();
      for (int j = 0; j <= mt; j++) begin
        for (int k = 0; k < widths[j]; k++) begin
          if (j == mt && k > 0) break;        // one bit of the last stripe ends it
          send_bit(colour, (j > 0 && k == 0), (j > 0) ? widths[j-1] : 0,
                   (j == mt && k == 0), 1'b0);
        end
        colour = ~colour;
      end
      // Bits after done are ignored.
      repeat (3) send_bit(colour, 1'b0, 0, 1'b0, 1'b1);
      colour = ~colour;
      repeat (2) send_bit(colour, 1'b0, 0, 1'b0, 1'b1);
      check(done, "done is held");
      check(valid_seen == valid_expected, "one out_valid per transition, none after done");
    end

    // Widest stripe that fits, then one that does not.
    maxtrans = 8'd1;
    do_start();
    for (int k = 0; k < 255; k++) send_bit(1'b1, 1'b0, 0, 1'b0, 1'b0);
    send_bit(1'b0, 1'b1, 255, 1'b1, 1'b0);
    check(valid_seen == valid_expected, "width 255 published");

    maxtrans = 8'd3;
    do_start();
    for (int k = 0; k < 255; k++) send_bit(1'b0, 1'b0, 0, 1'b0, 1'b0);
    send_bit(1'b0, 1'b0, 0, 1'b0, 1'b1);
    check(error && !done, "error on a 256-bit stripe");
    // Restart from error.
    maxtrans = 8'd1;
    do_start();
    check(!error, "start clears error");
    send_bit(1'b1, 1'b0, 0, 1'b0, 1'b0);
    send_bit(1'b1, 1'b0, 0, 1'b0, 1'b0);
    send_bit(1'b0, 1'b1, 2, 1'b1, 1'b0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
