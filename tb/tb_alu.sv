// tb_alu -- self-checking test of the ALU functional block.
//
// Applies every operation code to the corner operands and to random operands
// and compares result and zero flag with values computed here from the
// operation table (pass B, a - b, a + b, a + 1, all modulo 2**W).
module tb_alu;
  import sdl_hls_pkg::*;

  localparam int unsigned W = 8;

  logic [W-1:0] a, b, y;
  alu_op_t      op;
  logic         zero;
  int           checks = 0, failures = 0;

  alu #(.W(W)) dut (.a(a), .b(b), .op(op), .y(y), .zero(zero));

  function automatic logic [W-1:0] ref_y(logic [W-1:0] ra, logic [W-1:0] rb, logic [1:0] rop);
    int unsigned s;
    case (rop)
      2'b00:   s = rb;
      2'b01:   s = int'(ra) + 256 - int'(rb);
      2'b10:   s = int'(ra) + int'(rb);
      default: s = int'(ra) + 1;
    endcase
    return W'(s % 256);
  endfunction

  task automatic apply(logic [W-1:0] ta, logic [W-1:0] tb_, logic [1:0] top);
    logic [W-1:0] e;
    a  = ta;
    b  = tb_;
    op = alu_op_t'(top);
    #1;
    e = ref_y(ta, tb_, top);
    checks++;
    if (y !== e || zero !== (e == 0)) begin
      failures++;
      $display("FAIL op=%b a=%0d b=%0d y=%0d zero=%b expected %0d", top, ta, tb_, y, zero, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] corner [4] = '{8'd0, 8'd1, 8'd128, 8'd255};
    for (int o = 0; o < 4; o++)
      foreach (corner[i])
        foreach (corner[j])
          apply(corner[i], corner[j], 2'(o));
    // Addition is code c_alu0 = 0, c_alu1 = 1.
    apply(8'd3, 8'd4, {1'b1, 1'b0});
    for (int n = 0; n < 2000; n++)
      apply(W'($urandom), W'($urandom), 2'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
