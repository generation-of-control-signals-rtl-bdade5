// tb_multiplier -- self-checking test of the multiplier functional block.
//
// Exhaustive over all 8-bit operand pairs; the expected product is the low
// 8 bits of the integer product, computed here.
module tb_multiplier;
  localparam int unsigned W = 8;

  logic [W-1:0] a, b, p;
  int           checks = 0, failures = 0;

  multiplier #(.W(W)) dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = W'(i);
        b = W'(j);
        #1;
        checks++;
        if (int'(p) != (i * j) % 256) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
