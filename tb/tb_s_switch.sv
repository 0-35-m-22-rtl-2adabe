// Exhaustive test of the S cell: with sx = 1 the output must be the AND of
// both inputs, with sx = 0 it must follow in1 whatever in2 does.
module tb_s_switch;
  logic in1, in2, sx, out;
  int checks = 0, failures = 0;

  s_switch dut (.in1(in1), .in2(in2), .sx(sx), .out(out));

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp;
      {sx, in2, in1} = 3'(v);
      #1;
      if (sx) exp = in1 && in2;
      else    exp = in1;
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL sx=%b in1=%b in2=%b out=%b expected %b", sx, in1, in2, out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
